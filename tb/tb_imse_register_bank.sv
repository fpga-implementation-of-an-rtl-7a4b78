// tb_imse_register_bank: checks the register map and the special registers.
//
// Plain registers must read back what was written and appear in the right
// field of the configuration struct. Config bit 1 must give a one-cycle
// start_cmd and read back as 0. Status must show done/face/error/stage after
// result_valid, the live busy bit, and clear done on a write of 1 to bit 0 or
// on a start command. The multiplier result registers must ignore writes and
// take mul_res when mul_res_we.
module tb_imse_register_bank;
  import imse_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [3:0] reg_idx = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  win_cfg_t cfg;
  logic mode_detect, irq_en, start_cmd, done;
  logic [31:0] mul_op1, mul_op2;
  logic busy = 0, result_valid = 0, mul_res_we = 0;
  eval_result_t result = '0;
  logic [63:0] mul_res = 0;
  int checks = 0, failures = 0;
  int starts = 0;

  imse_register_bank dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (start_cmd) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int i, logic [31:0] d);
    reg_wr <= 1; reg_idx <= 4'(i); reg_wdata <= d;
    @(posedge clk);
    reg_wr <= 0;
    @(posedge clk);
  endtask

  task automatic rd_check(int i, logic [31:0] e, string what);
    reg_idx <= 4'(i);
    @(posedge clk);
    #1;
    checks++;
    if (reg_rdata !== e) begin failures++; $display("%s: read %h expected %h", what, reg_rdata, e); end
  endtask

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] v [16];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 2; i < 16; i++) begin
      v[i] = $urandom;
      if (i == 10 || i == 11) continue;
      wr(i, v[i]);
    end
    for (int i = 2; i < 16; i++) if (i != 10 && i != 11) rd_check(i, v[i], "plain register");
    check(cfg.scale == v[2], "scale field");
    check(cfg.win_x == v[3][15:0] && cfg.win_y == v[3][31:16], "coordinates");
    check(cfg.addr_sum == v[4] && cfg.addr_sqsum == v[5], "addresses");
    check(cfg.img_w == v[6][15:0] && cfg.img_h == v[6][31:16], "image dimension");
    check(cfg.start_node == v[7][15:0] && cfg.start_stage == v[7][23:16], "start node");
    check(mul_op1 == v[8] && mul_op2 == v[9], "mul operands");
    check(cfg.end_stage == v[12][7:0], "end stage");
    check(cfg.win_wh == v[13], "window area");
    check(cfg.win_w == v[14][15:0] && cfg.win_h == v[14][31:16], "window dimension");
    check(cfg.stride == v[15][15:0], "stride");
    // multiplier result registers are read-only
    rd_check(10, 0, "mul low after reset");
    mul_res <= 64'h0123_4567_89AB_CDEF; mul_res_we <= 1;
    @(posedge clk);
    mul_res_we <= 0;
    rd_check(10, 32'h89AB_CDEF, "mul low");
    rd_check(11, 32'h0123_4567, "mul high");
    wr(10, 32'hFFFF_FFFF);
    rd_check(10, 32'h89AB_CDEF, "mul low not writable");
    // config and start
    wr(1, 32'h7);
    @(posedge clk);
    check(starts == 1, "one start pulse");
    check(mode_detect && irq_en, "mode and irq enable");
    rd_check(1, 32'h5, "start bit reads 0");
    wr(1, 32'h1);
    @(posedge clk);
    check(starts == 1 && !irq_en, "no start without bit 1");
    // status
    busy <= 1;
    rd_check(0, 32'h4, "busy");
    result <= '{face: 1'b1, error: 1'b0, stage: 8'd21};
    result_valid <= 1;
    busy <= 0;
    @(posedge clk);
    result_valid <= 0;
    rd_check(0, {16'd0, 8'd21, 4'd0, 4'b0011}, "status after face");
    check(done, "done output");
    wr(0, 32'h0);
    rd_check(0, {16'd0, 8'd21, 4'd0, 4'b0011}, "write 0 keeps done");
    wr(0, 32'h1);
    rd_check(0, {16'd0, 8'd21, 4'd0, 4'b0010}, "write 1 clears done");
    result <= '{face: 1'b0, error: 1'b1, stage: 8'd3};
    result_valid <= 1;
    @(posedge clk);
    result_valid <= 0;
    rd_check(0, {16'd0, 8'd3, 4'd0, 4'b1001}, "status after error");
    wr(1, 32'h3);
    @(posedge clk);
    check(starts == 2, "second start");
    rd_check(0, {16'd0, 8'd3, 4'd0, 4'b1000}, "start clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
