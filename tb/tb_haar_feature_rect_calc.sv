// tb_haar_feature_rect_calc: checks rectangle areas against direct pixel sums.
//
// A random 24x16 image is summed into an integral image by the testbench; for
// random rectangles the four corner values are applied (one rectangle per
// cycle) and each area is compared with the sum of the pixels inside,
// counted pixel by pixel. The output must follow its input by exactly one
// clock. A second pass uses 32-bit values that wrap around.
module tb_haar_feature_rect_calc;
  localparam int W = 24, H = 16, N = 200;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [63:0] ii1, ii2, ii3, ii4, area;
  logic out_valid;
  int checks = 0, failures = 0;

  haar_feature_rect_calc dut (.*);

  always #5 clk = ~clk;

  int unsigned pix [H][W];
  longint unsigned ii [H+1][W+1];
  longint unsigned exp_q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: exactly one cycle after every input
  logic prev_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid !== prev_valid) begin
        failures++;
        $display("latency error");
      end
      if (out_valid) begin
        automatic longint unsigned e = exp_q.pop_front();
        checks++;
        if (area !== e) begin
          failures++;
          $display("area %0d expected %0d", area, e);
        end
      end
      prev_valid <= in_valid;
    end
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) pix[y][x] = $urandom % 256;
    for (int y = 0; y <= H; y++) for (int x = 0; x <= W; x++) begin
      ii[y][x] = 0;
      for (int yy = 0; yy < y; yy++) for (int xx = 0; xx < x; xx++) ii[y][x] += pix[yy][xx];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      automatic int x0 = $urandom % W, y0 = $urandom % H;
      automatic int w = 1 + $urandom % (W - x0), h = 1 + $urandom % (H - y0);
      automatic longint unsigned s = 0;
      for (int y = y0; y < y0 + h; y++) for (int x = x0; x < x0 + w; x++) s += pix[y][x];
      ii1 <= ii[y0][x0];     ii2 <= ii[y0][x0+w];
      ii3 <= ii[y0+h][x0];   ii4 <= ii[y0+h][x0+w];
      in_valid <= ($urandom % 4 != 0) || n == 0;
      @(posedge clk);
      if (in_valid) exp_q.push_back(s);
      else n--;
    end
    in_valid <= 0;
    // wrap-around: corner values offset by 2^64 - k still give the true area
    for (int n = 0; n < 20; n++) begin
      automatic longint unsigned off = {$urandom, $urandom};
      automatic longint unsigned a = $urandom % 1000;
      ii1 <= off;        ii2 <= off + 5;
      ii3 <= off + 7;    ii4 <= off + 12 + a;
      in_valid <= 1;
      @(posedge clk);
      exp_q.push_back(a);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
