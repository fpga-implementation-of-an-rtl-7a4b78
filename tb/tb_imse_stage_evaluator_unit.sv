// tb_imse_stage_evaluator_unit: evaluates search windows against the
// reference model.
//
// A 64x48 test image and a random four-stage classifier (3, 5, 6 and 8
// features) are set up by tb_vj_ref_pkg; the stage thresholds are tuned so
// that one window passes every stage. The shared memory is a testbench array
// with one clock of read latency, the DMA port answers after a random delay
// of 1 to 6 clocks, and a real mul41x33signed is attached. For each window
// (random scales and positions, a partial cascade from stage 1 to 2, a window
// outside the image and an integral image address outside memory) the face
// flag, the error flag and the last stage evaluated must match the model.
module tb_imse_stage_evaluator_unit;
  import imse_pkg::*;
  import tb_vj_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  win_cfg_t cfg;
  logic busy, result_valid;
  eval_result_t result;
  logic sm_en;
  logic [13:0] sm_addr;
  logic [31:0] sm_rdata;
  logic dma_req, dma_req_ready, dma_rsp_valid, dma_rsp_err;
  logic [31:0] dma_addr, dma_rsp_data;
  logic mul_valid, mul_out_valid;
  logic signed [MUL_AW-1:0] mul_a;
  logic signed [MUL_BW-1:0] mul_b;
  logic signed [MUL_PW-1:0] mul_p;
  int checks = 0, failures = 0;
  int n_face = 0, n_reject = 0, n_error = 0, n_late = 0;

  imse_stage_evaluator_unit dut (.*);
  mul41x33signed u_mul (.clk, .rst_n, .in_valid(mul_valid), .a(mul_a), .b(mul_b),
                        .out_valid(mul_out_valid), .p(mul_p));
  always #5 clk = ~clk;

  // shared memory model
  logic [31:0] smem [16384];
  always @(posedge clk) if (sm_en) sm_rdata <= smem[sm_addr];

  // DMA model
  int dly = 0;
  logic [31:0] dma_a;
  bit dma_busy = 0;
  assign dma_req_ready = !dma_busy;
  always @(posedge clk) begin
    dma_rsp_valid <= 0;
    if (!rst_n) dma_busy <= 0;
    else if (!dma_busy && dma_req) begin
      dma_busy <= 1; dma_a <= dma_addr; dly <= $urandom % 6;
    end else if (dma_busy && dly > 0) dly <= dly - 1;
    else if (dma_busy) begin
      automatic bit ok;
      dma_rsp_data  <= mem_word(dma_a, ok);
      dma_rsp_err   <= !ok;
      dma_rsp_valid <= 1;
      dma_busy      <= 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int unsigned scale, int wx, int wy, int s0, int s1, int node,
                     bit bad_addr, bit exp_err);
    automatic int ww = scl(20, scale), wh = scl(20, scale);
    int last;
    automatic bit face = 0;
    cfg.scale = scale; cfg.win_x = 16'(wx); cfg.win_y = 16'(wy);
    cfg.addr_sum = bad_addr ? 32'h2000_0000 : SUM_BASE;
    cfg.addr_sqsum = SQ_BASE;
    cfg.img_w = 16'(img_w); cfg.img_h = 16'(img_h);
    cfg.start_node = 16'(node); cfg.start_stage = 8'(s0); cfg.end_stage = 8'(s1);
    cfg.win_wh = ww * wh; cfg.win_w = 16'(ww); cfg.win_h = 16'(wh);
    cfg.stride = 16'(img_w + 1);
    if (!exp_err) face = eval_window(scale, wx, wy, ww, wh, s0, s1, last);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    while (!result_valid) @(posedge clk);
    checks++;
    if (exp_err) begin
      if (!result.error || result.face) begin failures++; $display("expected error"); end
      n_error++;
    end else begin
      if (result.error || result.face != face || result.stage != 8'(last)) begin
        failures++;
        $display("window (%0d,%0d) scale %h: face %0d stage %0d, expected %0d %0d",
                 wx, wy, scale, result.face, result.stage, face, last);
      end
      if (face) n_face++; else n_reject++;
      if (!face && last > 0) n_late++;
    end
    @(posedge clk);
  endtask

  initial begin
    int unsigned words[$];
    automatic int nf[] = '{3, 5, 6, 8};
    int node1;
    make_image(64, 48, 3);
    make_classifier(4, nf);
    tune_for(32'h1_4000, 10, 8, scl(20, 32'h1_4000), scl(20, 32'h1_4000), 50);
    serialize(words);
    foreach (words[i]) smem[i] = words[i];
    node1 = 4 * (2 + 6 * nf[0]);
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(32'h1_4000, 10, 8, 0, 3, 0, 0, 0);             // tuned window: face
    for (int n = 0; n < 14; n++) begin
      automatic int unsigned sc = 32'h1_0000 + $urandom % 32'h1_0000;
      automatic int ws = scl(20, sc);
      run(sc, $urandom % (64 - ws), $urandom % (48 - ws), 0, 3, 0, 0, 0);
    end
    run(32'h1_4000, 10, 8, 1, 2, node1, 0, 0);        // partial cascade
    run(32'h1_0000, 50, 40, 0, 3, 0, 0, 1);           // outside the image
    run(32'h1_0000, 5, 5, 0, 3, 0, 1, 1);             // bus error
    checks++;
    if (n_face == 0 || n_reject == 0 || n_error != 2) begin
      failures++; $display("outcomes: face %0d reject %0d error %0d", n_face, n_reject, n_error);
    end
    $display("faces %0d, rejections %0d (after stage 0: %0d), errors %0d", n_face, n_reject, n_late, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
