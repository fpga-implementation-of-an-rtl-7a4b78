// tb_imse_control_logic: checks mode handling, multiplier sharing and the
// interrupt.
//
// A real mul41x33signed is attached to the shared multiplier port. In free
// mode the product of MUL_OP1 x MUL_OP2 (signed 32-bit) must reach mul_res
// with mul_res_we. In detection mode a start command must start the evaluator
// only when it is idle, the evaluator's operands must reach the multiplier
// while it is busy (also after a switch to free mode) and free-mode results
// must then not be written. irq must equal done AND irq_en.
module tb_imse_control_logic;
  import imse_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mode_detect = 0, irq_en = 0, start_cmd = 0, done = 0;
  logic [31:0] mul_op1 = 0, mul_op2 = 0;
  logic mul_res_we;
  logic [63:0] mul_res;
  logic irq, eval_start;
  logic eval_busy = 0;
  logic ev_mul_valid = 0;
  logic signed [MUL_AW-1:0] ev_mul_a = 0, mul_a;
  logic signed [MUL_BW-1:0] ev_mul_b = 0, mul_b;
  logic mul_valid, mul_out_valid;
  logic signed [MUL_PW-1:0] mul_p;
  int checks = 0, failures = 0;

  imse_control_logic dut (.*);
  mul41x33signed u_mul (.clk, .rst_n, .in_valid(mul_valid), .a(mul_a), .b(mul_b),
                        .out_valid(mul_out_valid), .p(mul_p));
  always #5 clk = ~clk;

  int we_count = 0;
  always @(posedge clk) if (mul_res_we) we_count++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // free mode products
    for (int n = 0; n < 40; n++) begin
      automatic logic signed [31:0] x = $urandom, y = $urandom;
      automatic longint e = longint'(x) * longint'(y);
      mul_op1 <= x; mul_op2 <= y;
      @(posedge clk); @(posedge clk);
      #1;
      check(mul_res === e && mul_res_we, "free mode product");
    end
    // start ignored in free mode
    start_cmd <= 1; #1;
    check(!eval_start, "no start in free mode");
    @(posedge clk);
    start_cmd <= 0;
    // detection mode start
    mode_detect <= 1;
    @(posedge clk);
    start_cmd <= 1; #1;
    check(eval_start, "start in detection mode");
    @(posedge clk);
    start_cmd <= 0;
    eval_busy <= 1;
    @(posedge clk);
    start_cmd <= 1; #1;
    check(!eval_start, "no start while busy");
    @(posedge clk);
    start_cmd <= 0;
    // evaluator owns the multiplier, also after switching to free mode
    mode_detect <= 0;
    we_count = 0;
    ev_mul_valid <= 1; ev_mul_a <= 41'sd123456; ev_mul_b <= -33'sd789;
    mul_op1 <= 32'd5; mul_op2 <= 32'd7;
    @(posedge clk);
    ev_mul_valid <= 0;
    @(posedge clk); #1;
    check(mul_p == -74'sd97406784, "evaluator product");
    repeat (3) @(posedge clk);
    check(we_count == 0, "free result held while evaluator busy");
    eval_busy <= 0;
    repeat (3) @(posedge clk); #1;
    check(mul_res == 64'd35 && we_count > 0, "free mode resumes");
    // interrupt
    done <= 1; irq_en <= 0; #1;
    check(!irq, "irq masked");
    irq_en <= 1; #1;
    check(irq, "irq raised");
    done <= 0; #1;
    check(!irq, "irq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
