// apb_slave_if: connects the accelerator's register bank to the AMBA 2.0 APB.
//
// An APB transfer has a setup cycle (psel high, penable low) and an access
// cycle (psel and penable high). This interface decodes the register index
// from paddr[5:2] (sixteen 32-bit registers), requests the read in the setup
// cycle and registers the read data so that prdata is stable throughout the
// access cycle, and issues a one-cycle write strobe in the access cycle of a
// write. APB 2.0 has no wait states. That the CPU reaches the register bank
// through an APB slave is the design's; the decoding is this implementation's.
module apb_slave_if (
  input  logic        clk,
  input  logic        rst_n,
  // APB
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  // register bank
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [3:0]  reg_idx,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);

  assign reg_idx   = paddr[5:2];
  assign reg_wdata = pwdata;
  assign reg_wr    = psel && penable && pwrite;
  assign reg_rd    = psel && !penable && !pwrite;

  always_ff @(posedge clk) begin
    if (!rst_n) prdata <= '0;
    else if (reg_rd) prdata <= reg_rdata;
  end

  a_apb_setup_first: assert property (@(posedge clk) disable iff (!rst_n)
                                      (psel && !penable) |=> (psel && penable));

endmodule
