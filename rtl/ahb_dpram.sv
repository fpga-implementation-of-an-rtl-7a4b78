// ahb_dpram: the accelerator's shared memory, a dual-port RAM with an AHB
// slave interface.
//
// The host CPU loads the compressed Haar-like features here through the AHB
// slave port before a detection; the stage evaluator reads them through the
// second port. In free mode the CPU may use the memory as ordinary RAM.
// The 64 KB size and the dual-port, AHB-attached organisation are the design's.
//
// AHB slave timing (this implementation's choice): the address phase is
// registered and the RAM is accessed in the data phase. Writes complete with
// no wait state (HWDATA is written in the data phase). Reads insert one wait
// state: the RAM is read in the first data-phase cycle and HRDATA is returned
// with HREADY in the second. Byte lanes are big-endian as on the SPARC host:
// the byte at offset 0 of a word is HWDATA[31:24]. Byte, halfword and word
// transfers are supported; the response is always OKAY.
//
// Port B: b_en and b_addr (word address) sampled on the rising edge, b_rdata
// valid on the next.
module ahb_dpram #(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned WORDS      = SIZE_BYTES / 4,
  parameter int unsigned ADDR_W     = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB slave
  input  logic              hsel,
  input  logic [31:0]       haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic              hready_in,
  input  logic [31:0]       hwdata,
  output logic [31:0]       hrdata,
  output logic              hready_out,
  output logic [1:0]        hresp,
  // internal read port
  input  logic              b_en,
  input  logic [ADDR_W-1:0] b_addr,
  output logic [31:0]       b_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ_WAIT, S_READ_DONE} slv_state_e;
  slv_state_e state;

  logic [ADDR_W-1:0] addr_q;
  logic [3:0]        be_q;
  logic              a_en;
  logic [3:0]        a_we;
  logic [31:0]       a_rdata;

  function automatic logic [3:0] byte_enables(input logic [2:0] size, input logic [1:0] off);
    unique case (size)
      3'b000:  return 4'b1000 >> off;
      3'b001:  return off[1] ? 4'b0011 : 4'b1100;
      default: return 4'b1111;
    endcase
  endfunction

  logic accept;
  assign accept = hsel && hready_in && htrans[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      addr_q <= '0;
      be_q   <= '0;
    end else begin
      // A new address phase can only be accepted when this slave's
      // previous data phase ends (hready_out high).
      if (hready_out) begin
        if (accept) begin
          addr_q <= haddr[ADDR_W+1:2];
          be_q   <= byte_enables(hsize, haddr[1:0]);
          state  <= hwrite ? S_WRITE : S_READ_WAIT;
        end else begin
          state  <= S_IDLE;
        end
      end else if (state == S_READ_WAIT) begin
        state <= S_READ_DONE;
      end
    end
  end

  assign hready_out = (state != S_READ_WAIT);
  assign hresp      = 2'b00;
  assign a_en       = (state == S_WRITE) || (state == S_READ_WAIT);
  assign a_we       = (state == S_WRITE) ? be_q : 4'b0000;
  assign hrdata     = a_rdata;

  dpram #(.WORDS(WORDS), .ADDR_W(ADDR_W)) u_ram (
    .clk     (clk),
    .a_en    (a_en),
    .a_we    (a_we),
    .a_addr  (addr_q),
    .a_wdata (hwdata),
    .a_rdata (a_rdata),
    .b_en    (b_en),
    .b_addr  (b_addr),
    .b_rdata (b_rdata)
  );

endmodule
