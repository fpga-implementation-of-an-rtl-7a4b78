// imse_control_logic: the IMSE control block between the register bank, the
// stage evaluator and the shared multiplier.
//
// The accelerator works in one of two modes, chosen by Config bit 0. In face
// detection mode a start command launches the stage evaluator; when it
// finishes, its result is written to the Status register and, if enabled, an
// interrupt is raised. In free mode the host CPU uses the 41x33 multiplier
// directly: MUL_OP1 and MUL_OP2 (32-bit signed) feed it every cycle and the
// 64-bit product is loaded into MUL_Result_HIGH/LOW one cycle later. The two
// modes and the interrupt at the end of detection are the design's; the rules
// below are this implementation's:
//  - A start command is taken only in detection mode and only when idle.
//  - The multiplier belongs to the evaluator while it is busy, even if the
//    mode is switched to free meanwhile; the result registers then hold.
//  - irq is a level: Status.done and Config.irq_en; clearing done clears it.
module imse_control_logic
  import imse_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // register bank
  input  logic                      mode_detect,
  input  logic                      irq_en,
  input  logic                      start_cmd,
  input  logic                      done,
  input  logic [31:0]               mul_op1,
  input  logic [31:0]               mul_op2,
  output logic                      mul_res_we,
  output logic [63:0]               mul_res,
  output logic                      irq,
  // stage evaluator
  output logic                      eval_start,
  input  logic                      eval_busy,
  // evaluator's multiplier request
  input  logic                      ev_mul_valid,
  input  logic signed [MUL_AW-1:0]  ev_mul_a,
  input  logic signed [MUL_BW-1:0]  ev_mul_b,
  // shared multiplier
  output logic                      mul_valid,
  output logic signed [MUL_AW-1:0]  mul_a,
  output logic signed [MUL_BW-1:0]  mul_b,
  input  logic                      mul_out_valid,
  input  logic signed [MUL_PW-1:0]  mul_p
);

  logic evaluator_owns;   // multiplier owned by the evaluator
  logic free_q;           // product in the pipeline came from free mode

  assign eval_start     = start_cmd && mode_detect && !eval_busy;
  assign evaluator_owns = eval_busy || eval_start;

  always_comb begin
    if (evaluator_owns) begin
      mul_valid = ev_mul_valid;
      mul_a     = ev_mul_a;
      mul_b     = ev_mul_b;
    end else begin
      mul_valid = !mode_detect;
      mul_a     = MUL_AW'($signed(mul_op1));
      mul_b     = MUL_BW'($signed(mul_op2));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) free_q <= 1'b0;
    else        free_q <= !evaluator_owns && !mode_detect;
  end

  assign mul_res_we = mul_out_valid && free_q;
  assign mul_res    = mul_p[63:0];
  assign irq        = done && irq_en;

endmodule
