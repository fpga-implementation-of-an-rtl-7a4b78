// tb_mul41x33signed: checks the signed product and its one-cycle latency.
//
// Operands include the extreme values of both widths and random values of
// both signs, applied back to back. The expected product is built by
// shift-and-add on magnitudes with a separate sign, so it does not reuse the
// multiplier's own expression.
module tb_mul41x33signed;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [40:0] a;
  logic signed [32:0] b;
  logic signed [73:0] p;
  int checks = 0, failures = 0;

  mul41x33signed dut (.*);
  always #5 clk = ~clk;

  logic [73:0] exp_q[$];
  logic prev_valid = 0;

  function automatic logic [73:0] ref_mul(logic signed [40:0] x, logic signed [32:0] y);
    automatic logic [40:0] mx = x[40] ? -x : x;
    automatic logic [32:0] my = y[32] ? -y : y;
    automatic logic [73:0] acc = 0;
    for (int i = 0; i < 33; i++) if (my[i]) acc += 74'(mx) << i;
    return (x[40] ^ y[32]) ? -acc : acc;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid !== prev_valid) begin failures++; $display("latency error"); end
    if (out_valid) begin
      automatic logic [73:0] e = exp_q.pop_front();
      checks++;
      if (p !== e) begin failures++; $display("p=%h expected %h", p, e); end
    end
    prev_valid <= in_valid;
  end

  initial begin
    automatic logic signed [40:0] av [6] = '{41'sh0, 41'sh1, -41'sh1, {1'b0, {40{1'b1}}}, {1'b1, 40'b0}, 41'sh123456789};
    automatic logic signed [32:0] bv [6] = '{33'sh0, 33'sh1, -33'sh1, {1'b0, {32{1'b1}}}, {1'b1, 32'b0}, -33'sh5555};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
      a <= av[i]; b <= bv[j]; in_valid <= 1;
      @(posedge clk);
      exp_q.push_back(ref_mul(av[i], bv[j]));
    end
    for (int n = 0; n < 300; n++) begin
      automatic logic signed [40:0] ra = {$urandom, $urandom} >> ($urandom % 40);
      automatic logic signed [32:0] rb = {$urandom, $urandom} >> ($urandom % 32);
      if ($urandom % 2) ra = -ra;
      if ($urandom % 2) rb = -rb;
      a <= ra; b <= rb; in_valid <= ($urandom % 5 != 0);
      @(posedge clk);
      if (in_valid) exp_q.push_back(ref_mul(ra, rb));
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
