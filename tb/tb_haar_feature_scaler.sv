// tb_haar_feature_scaler: checks scaled corner addresses and the 4-clock
// pipeline latency.
//
// Random rectangles of a 20x20 base window, random Q16.16 scales between 1 and
// 8, window origins, strides and base addresses enter one per clock (with
// gaps). The expected corners are computed with real arithmetic:
// round(c * scale) for each coordinate, then base + (row*stride + col)*size.
// Unscaled (scale_en = 0) and 8-byte entries are covered too.
module tb_haar_feature_scaler;
  import imse_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [COORD_W-1:0] x, y, w, h, win_x, win_y, stride;
  logic scale_en, wide;
  logic [31:0] scale, base, addr1, addr2, addr3, addr4;
  int checks = 0, failures = 0;

  haar_feature_scaler dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic [31:0] a[4]; int t; } exp_t;
  exp_t exp_q[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int c, int unsigned s);
    return int'($floor(real'(c) * real'(s) / 65536.0 + 0.5));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic exp_t e = exp_q.pop_front();
    checks++;
    if ({addr1, addr2, addr3, addr4} !== {e.a[0], e.a[1], e.a[2], e.a[3]}) begin
      failures++;
      $display("got %h %h %h %h expected %h %h %h %h", addr1, addr2, addr3, addr4,
               e.a[0], e.a[1], e.a[2], e.a[3]);
    end
    checks++;
    if (int'($time / 10) - e.t != 4) begin failures++; $display("latency %0d", int'($time / 10) - e.t); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      automatic int rx = $urandom % 18, ry = $urandom % 18;
      automatic int rw = 1 + $urandom % (20 - rx), rh = 1 + $urandom % (20 - ry);
      automatic int unsigned sc = 32'h1_0000 + ($urandom % 32'h7_0000);
      automatic bit se = ($urandom % 5 != 0), wd = ($urandom % 3 == 0);
      automatic int wx = $urandom % 400, wy = $urandom % 300, st = 641;
      automatic int unsigned bs = 32'h4000_0000 + (($urandom % 1024) << 4);
      automatic int c0, c1, r0, r1, es;
      automatic exp_t e;
      if (!se) begin rw = 1 + $urandom % 200; rh = 1 + $urandom % 150; end
      c0 = wx + (se ? rnd(rx, sc) : rx);
      c1 = c0 + (se ? rnd(rw, sc) : rw);
      r0 = wy + (se ? rnd(ry, sc) : ry);
      r1 = r0 + (se ? rnd(rh, sc) : rh);
      es = wd ? 8 : 4;
      e.a[0] = bs + (r0 * st + c0) * es;
      e.a[1] = bs + (r0 * st + c1) * es;
      e.a[2] = bs + (r1 * st + c0) * es;
      e.a[3] = bs + (r1 * st + c1) * es;
      x <= 16'(rx); y <= 16'(ry); w <= 16'(rw); h <= 16'(rh);
      scale <= sc; scale_en <= se; wide <= wd;
      win_x <= 16'(wx); win_y <= 16'(wy); stride <= 16'(st); base <= bs;
      in_valid <= 1;
      @(posedge clk);
      e.t = int'($time / 10);
      exp_q.push_back(e);
      if ($urandom % 4 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
