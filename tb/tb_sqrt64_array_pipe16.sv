// tb_sqrt64_array_pipe16: checks the integer square root and its 16-clock
// latency with a continuous stream of radicands.
//
// Each root r is checked by r*r <= x < (r+1)*(r+1) in 128-bit arithmetic.
// Radicands cover 0, 1, perfect squares and their neighbours, 2^64-1 and random
// values of every magnitude. out_valid must appear exactly 16 clocks after
// in_valid.
module tb_sqrt64_array_pipe16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [63:0] radicand;
  logic [31:0] root;
  int checks = 0, failures = 0;

  sqrt64_array_pipe16 dut (.*);
  always #5 clk = ~clk;

  logic [63:0] in_q[$];
  int unsigned in_t[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic logic [63:0] x = in_q.pop_front();
    automatic int unsigned t = in_t.pop_front();
    automatic logic [127:0] r = 128'(root);
    checks++;
    if (!(r * r <= 128'(x) && (r + 1) * (r + 1) > 128'(x))) begin
      failures++; $display("sqrt(%0d) gave %0d", x, root);
    end
    checks++;
    if (int'($time / 10) - t != 16) begin failures++; $display("latency %0d", int'($time / 10) - t); end
  end

  task automatic put(logic [63:0] x);
    radicand <= x; in_valid <= 1;
    @(posedge clk);
    in_q.push_back(x);
    in_t.push_back(int'($time / 10));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    put(0); put(1); put(2); put(3); put(4); put(64'hFFFF_FFFF_FFFF_FFFF);
    put(64'hFFFF_FFFE_0000_0001); put(64'hFFFF_FFFE_0000_0000);
    for (int n = 0; n < 200; n++) begin
      automatic logic [63:0] x = {$urandom, $urandom} >> ($urandom % 64);
      if (n % 3 == 0) begin
        automatic logic [31:0] s = $urandom >> ($urandom % 32);
        x = 64'(s) * 64'(s) - 64'(n % 2);
      end
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      put(x);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    if (in_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
