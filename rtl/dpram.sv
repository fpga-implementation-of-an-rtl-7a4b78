// dpram: dual-port synchronous RAM, the storage of the shared memory.
//
// Port A reads and writes 32-bit words with four byte enables; port B only
// reads. Both ports are synchronous: read data appears on the clock after the
// address. Port A returns the old contents on a write cycle. Written as an
// array so synthesis can map it to block RAM.
module dpram #(
  parameter int unsigned WORDS  = 16384,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic [3:0]        a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [31:0]       a_wdata,
  output logic [31:0]       a_rdata,
  // port B
  input  logic              b_en,
  input  logic [ADDR_W-1:0] b_addr,
  output logic [31:0]       b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
