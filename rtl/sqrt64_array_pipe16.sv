// sqrt64_array_pipe16: pipelined integer square root of a 64-bit number.
//
// root = floor(sqrt(radicand)), a 32-bit result. The digit-by-digit (restoring)
// method produces one root bit per step from two radicand bits: the partial
// remainder is shifted left by two and the next two radicand bits appended; if
// it is at least 4*root + 1 that amount is subtracted and the new root bit is 1.
// The 32 steps are spread over 16 pipeline stages of two steps each, so a new
// radicand can enter every clock and its root appears 16 clocks later, the
// output latency the design specifies. The array structure and the two steps
// per stage are this implementation's choices.
//
// Interface: radicand and in_valid are sampled on the rising edge; root and
// out_valid are valid 16 rising edges later.
module sqrt64_array_pipe16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] radicand,
  output logic        out_valid,
  output logic [31:0] root
);

  localparam int unsigned STAGES = 16;

  typedef struct packed {
    logic [63:0] rad;   // radicand bits not yet consumed, left aligned
    logic [35:0] rem;   // partial remainder
    logic [31:0] q;     // root bits found so far
  } sq_state_t;

  sq_state_t  st [STAGES+1];
  logic [STAGES:0] vld;

  // One digit step of the restoring square root.
  function automatic sq_state_t sq_step(input sq_state_t s);
    sq_state_t  r;
    logic [35:0] cur;
    logic [35:0] trial;
    cur   = {s.rem[33:0], s.rad[63:62]};
    trial = {2'b00, s.q, 2'b01};
    r.rad = {s.rad[61:0], 2'b00};
    if (cur >= trial) begin
      r.rem = cur - trial;
      r.q   = {s.q[30:0], 1'b1};
    end else begin
      r.rem = cur;
      r.q   = {s.q[30:0], 1'b0};
    end
    return r;
  endfunction

  always_comb begin
    st[0].rad = radicand;
    st[0].rem = '0;
    st[0].q   = '0;
    vld[0]    = in_valid;
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld[i+1] <= 1'b0;
        st[i+1]  <= '0;
      end else begin
        vld[i+1] <= vld[i];
        st[i+1]  <= sq_step(sq_step(st[i]));
      end
    end
  end

  assign out_valid = vld[STAGES];
  assign root      = st[STAGES].q;

endmodule
