// tb_apb_slave_if: checks APB writes and reads through the slave interface.
//
// A sixteen-word register model in the testbench answers reg_rdata and takes
// write strobes. The testbench performs APB transfers (setup, then access
// cycle) and checks that each write reaches the right register exactly once,
// in the access cycle, and that prdata holds the addressed register during the
// access cycle of a read.
module tb_apb_slave_if;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic reg_wr, reg_rd;
  logic [3:0] reg_idx;
  logic [31:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;
  int wr_count = 0;

  apb_slave_if dut (.*);
  always #5 clk = ~clk;

  logic [31:0] model [16];
  assign reg_rdata = model[reg_idx];
  always @(posedge clk) if (reg_wr) begin
    model[reg_idx] <= reg_wdata;
    wr_count++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(logic [31:0] a, logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk);
    penable <= 1;
    @(posedge clk);
    psel <= 0; penable <= 0; pwrite <= 0;
    @(posedge clk);
  endtask

  task automatic apb_read(logic [31:0] a, output logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk);
    penable <= 1;
    @(posedge clk);
    d = prdata;              // sampled at the end of the access cycle
    psel <= 0; penable <= 0;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] golden [16];
    logic [31:0] d;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      golden[i] = $urandom;
      apb_write(32'h8000_0A00 + 32'(i * 4), golden[i]);
      @(posedge clk);
    end
    checks++;
    if (wr_count != 16) begin failures++; $display("write count %0d", wr_count); end
    for (int n = 0; n < 64; n++) begin
      automatic int i = $urandom % 16;
      apb_read(32'h8000_0A00 + 32'(i * 4), d);
      checks++;
      if (d !== golden[i]) begin failures++; $display("reg %0d read %h expected %h", i, d, golden[i]); end
      if ($urandom % 2) begin
        golden[i] = $urandom;
        apb_write(32'h8000_0A00 + 32'(i * 4), golden[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
