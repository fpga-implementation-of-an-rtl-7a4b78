// tb_ahb_master_if: checks DMA word reads over AHB with random bus delays.
//
// The behavioural arbiter and memory (tb_ahb_slave_model) hold a 40x30 test
// image's integral images. Random word reads of both images must return the
// words the memory holds, whatever the grant delay and wait states; a read
// outside the images must come back with rsp_err. The AHB control signals of
// every address phase are checked (NONSEQ, read, word, single).
module tb_ahb_master_if;
  import tb_vj_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0, req_ready, rsp_valid, rsp_err;
  logic [31:0] addr = 0, rsp_data;
  logic hbusreq, hgrant, hready, hwrite;
  logic [1:0] hresp, htrans;
  logic [31:0] hrdata, haddr, hwdata;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  int checks = 0, failures = 0;

  ahb_master_if dut (.*);
  tb_ahb_slave_model #(.MAX_WAIT(4)) mem (.clk, .rst_n, .hbusreq, .hgrant, .hready, .hresp,
                                          .hrdata, .haddr, .htrans, .hwrite);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && htrans == 2'b10 && hready) begin
    checks++;
    if (hwrite || hsize != 3'b010 || hburst != 3'b000) begin
      failures++; $display("bad control signals");
    end
  end

  task automatic read(logic [31:0] a, output logic [31:0] d, output logic e);
    while (!req_ready) @(posedge clk);
    req <= 1; addr <= a;
    @(posedge clk);
    req <= 0;
    while (!rsp_valid) @(posedge clk);
    d = rsp_data; e = rsp_err;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    bit ok;
    make_image(40, 30, 1);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 150; n++) begin
      automatic logic [31:0] a = ($urandom % 2) ? SUM_BASE + 4 * ($urandom % (41*31))
                                                : SQ_BASE + 4 * ($urandom % (2*41*31));
      automatic logic [31:0] ex = mem_word(a, ok);
      read(a, d, e);
      checks++;
      if (d !== ex || e) begin failures++; $display("read %h: %h expected %h", a, d, ex); end
    end
    read(32'h1000_0000, d, e);
    checks++;
    if (!e) begin failures++; $display("no error response"); end
    read(SUM_BASE + 4 * 100, d, e);
    checks++;
    if (e || d !== mem_word(SUM_BASE + 4 * 100, ok)) begin failures++; $display("read after error"); end
    checks++;
    if (mem.n_waits == 0 || mem.n_grant_delays == 0) begin failures++; $display("no bus delays seen"); end
    $display("wait states %0d, grant delays %0d", mem.n_waits, mem.n_grant_delays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
