// tb_imse_object_detection: end-to-end test of the accelerator at its default
// size, driven the way host software would drive it.
//
// Setup: a 640x480 (VGA) grey test image with its integral and squared
// integral images in a behavioural system memory (random grant delays and
// wait states on the AHB master port), and a random 22-stage cascade with
// 2135 Haar-like features (3, 16, 21, ... 213 per stage), 51,416 bytes in the
// accelerator's format. The stage thresholds are tuned so that one 30x30
// window (scale 1.5) passes the whole cascade.
// Sequence:
//  1. The cascade is written into the 64 KB shared memory over AHB and a
//     sample of it read back (shared memory used as RAM).
//  2. Free mode: products of MUL_OP1 x MUL_OP2 read from MUL_Result_HIGH/LOW;
//     a start command in free mode must do nothing.
//  3. Detection mode: the tuned window (full 22-stage cascade, face, interrupt)
//     and random windows at several scales (rejections at various stages) are
//     evaluated; Status must match the reference model each time.
//  4. A window outside the image and an integral image address outside memory
//     must end with the error bit; switching to free mode during an evaluation
//     must not disturb it.
// Each of these mechanisms is counted and must occur at least once.
module tb_imse_object_detection;
  import imse_pkg::*;
  import tb_vj_ref_pkg::*;

  localparam logic [31:0] APB_BASE = 32'h8000_0A00;
  localparam logic [31:0] SHM_BASE = 32'hA000_0000;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic hsel_s = 0, hwrite_s = 0, hready_s;
  logic [31:0] haddr_s = 0, hwdata_s = 0, hrdata_s;
  logic [1:0] htrans_s = 0, hresp_s;
  logic [2:0] hsize_s = 3'b010;
  logic hreadyout_s;
  logic hbusreq_m, hgrant_m, hready_m, hwrite_m;
  logic [1:0] hresp_m, htrans_m;
  logic [31:0] hrdata_m, haddr_m, hwdata_m;
  logic [2:0] hsize_m, hburst_m;
  logic [3:0] hprot_m;
  logic irq;
  int checks = 0, failures = 0;

  imse_object_detection dut (.*);
  tb_ahb_slave_model #(.MAX_WAIT(2)) sysmem (.clk, .rst_n, .hbusreq(hbusreq_m), .hgrant(hgrant_m),
      .hready(hready_m), .hresp(hresp_m), .hrdata(hrdata_m), .haddr(haddr_m),
      .htrans(htrans_m), .hwrite(hwrite_m));
  assign hready_s = hreadyout_s;

  always #5 clk = ~clk;   // 100 MHz in simulation; the design targets 80 MHz

  // mechanism counters
  int n_face = 0, n_reject = 0, n_late_reject = 0, n_win_err = 0, n_bus_err = 0;
  int n_free_mul = 0, n_irq = 0, n_free_start_ignored = 0, n_switch_busy = 0, n_shm_reads = 0;
  int max_stage_seen = 0;

  logic irq_q = 0;
  always @(posedge clk) begin
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- APB host accesses
  task automatic apb_write(reg_idx_e r, logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= APB_BASE + 32'(r) * 4; pwdata <= d;
    @(posedge clk);
    penable <= 1;
    @(posedge clk);
    psel <= 0; penable <= 0; pwrite <= 0;
    @(posedge clk);
  endtask

  task automatic apb_read(reg_idx_e r, output logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= APB_BASE + 32'(r) * 4;
    @(posedge clk);
    penable <= 1;
    @(posedge clk);
    d = prdata;
    psel <= 0; penable <= 0;
    @(posedge clk);
  endtask

  // ---- AHB host accesses to the shared memory (single transfers)
  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    automatic bit r;
    hsel_s <= 1; htrans_s <= 2'b10; hwrite_s <= 1; hsize_s <= 3'b010; haddr_s <= a;
    @(posedge clk);
    hsel_s <= 0; htrans_s <= 2'b00; hwdata_s <= d;
    do begin @(negedge clk); r = hreadyout_s; @(posedge clk); end while (!r);
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    automatic bit r;
    hsel_s <= 1; htrans_s <= 2'b10; hwrite_s <= 0; hsize_s <= 3'b010; haddr_s <= a;
    @(posedge clk);
    hsel_s <= 0; htrans_s <= 2'b00;
    do begin @(negedge clk); r = hreadyout_s; d = hrdata_s; @(posedge clk); end while (!r);
  endtask

  // ---- one window, checked against the reference model
  task automatic detect(int unsigned scale, int wx, int wy, bit bad_addr, bit exp_err,
                        bit switch_mode, string what);
    automatic int ww = scl(20, scale), wh = scl(20, scale);
    automatic int last = 0;
    automatic bit face = 0;
    automatic logic [31:0] st;
    automatic int cyc0, cycles;
    apb_write(REG_SCALE, scale);
    apb_write(REG_COORD_XY, {16'(wy), 16'(wx)});
    apb_write(REG_ADDR_SUM, bad_addr ? 32'h2000_0000 : SUM_BASE);
    apb_write(REG_WIN_WH, 32'(ww * wh));
    apb_write(REG_WIN_DIM, {16'(wh), 16'(ww)});
    if (!exp_err) face = eval_window(scale, wx, wy, ww, wh, 0, n_stages - 1, last);
    apb_write(REG_CONFIG, 32'h7);            // detection mode, irq enable, start
    cyc0 = int'($time / 10);
    if (switch_mode) begin
      apb_read(REG_STATUS, st);
      check(st[ST_BUSY] == 1, "busy during evaluation");
      apb_write(REG_CONFIG, 32'h4);          // switch to free mode while busy
      n_switch_busy++;
    end
    while (!irq) @(posedge clk);
    cycles = int'($time / 10) - cyc0;
    apb_read(REG_STATUS, st);
    check(st[ST_DONE] == 1 && st[ST_BUSY] == 0, {what, ": done"});
    if (exp_err) begin
      check(st[ST_ERROR] == 1 && st[ST_FACE] == 0, {what, ": error expected"});
      if (bad_addr) n_bus_err++; else n_win_err++;
    end else begin
      check(st[ST_ERROR] == 0 && st[ST_FACE] == face && st[15:8] == 8'(last),
            $sformatf("%s: status %h, expected face %0d stage %0d", what, st, face, last));
      if (face) n_face++; else n_reject++;
      if (!face && last > 0) n_late_reject++;
      if (last > max_stage_seen) max_stage_seen = last;
    end
    $display("%s: scale %0.3f window %0dx%0d at (%0d,%0d): face %0d stage %0d error %0d, %0d cycles",
             what, real'(scale) / 65536.0, ww, wh, wx, wy, st[ST_FACE], st[15:8], st[ST_ERROR], cycles);
    apb_write(REG_STATUS, 32'h1);            // clear done and the interrupt
    check(!irq, "interrupt cleared");
  endtask

  initial begin
    automatic int nf[] = '{3, 16, 21, 39, 33, 44, 50, 51, 56, 71, 80, 103, 111, 102, 135,
                           137, 140, 160, 177, 182, 211, 213};
    automatic int unsigned words[$];
    automatic int total = 0;
    automatic logic [31:0] d;
    automatic int unsigned tuned_scale = 32'h1_8000;   // 1.5: a 30x30 window

    make_image(640, 480, 7);
    make_classifier(22, nf);
    foreach (nf[i]) total += nf[i];
    check(total == 2135, "2135 features");
    tune_for(tuned_scale, 300, 200, scl(20, tuned_scale), scl(20, tuned_scale), 20);
    serialize(words);
    $display("cascade: %0d stages, %0d features, %0d bytes", n_stages, total, words.size() * 4);

    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // 1. load the cascade, read a sample back
    foreach (words[i]) ahb_write(SHM_BASE + 32'(i) * 4, words[i]);
    for (int n = 0; n < 64; n++) begin
      automatic int i = $urandom % words.size();
      ahb_read(SHM_BASE + 32'(i) * 4, d);
      check(d == words[i], "shared memory read back");
      n_shm_reads++;
    end

    // 2. free mode multiplier
    for (int n = 0; n < 8; n++) begin
      automatic logic signed [31:0] x = $urandom, y = $urandom;
      automatic longint e = longint'(x) * longint'(y);
      automatic logic [31:0] lo, hi;
      apb_write(REG_MUL_OP1, x);
      apb_write(REG_MUL_OP2, y);
      apb_read(REG_MUL_RES_LO, lo);
      apb_read(REG_MUL_RES_HI, hi);
      check({hi, lo} == e, $sformatf("free mode product %h x %h = %h%h, expected %h", x, y, hi, lo, e));
      n_free_mul++;
    end
    apb_write(REG_CONFIG, 32'h2);            // start in free mode: ignored
    repeat (5) @(posedge clk);
    apb_read(REG_STATUS, d);
    check(d[ST_DONE] == 0 && d[ST_BUSY] == 0, "start ignored in free mode");
    if (d[ST_DONE] == 0) n_free_start_ignored++;

    // 3. detection mode configuration
    apb_write(REG_ADDR_SQSUM, SQ_BASE);
    apb_write(REG_IMG_DIM, {16'(img_h), 16'(img_w)});
    apb_write(REG_IMG_WIDTH, 32'(img_w + 1));
    apb_write(REG_START_NODE, 32'h0);        // stage 0 at shared memory offset 0
    apb_write(REG_END_STAGE, 32'(n_stages - 1));
    detect(tuned_scale, 300, 200, 0, 0, 0, "tuned window");
    for (int n = 0; n < 10; n++) begin
      automatic int unsigned sc = 32'h1_0000 + ($urandom % 32'h3_0000);
      automatic int ws = scl(20, sc);
      detect(sc, $urandom % (640 - ws), $urandom % (480 - ws), 0, 0, 0, "random window");
    end
    detect(tuned_scale, 300, 200, 0, 0, 1, "mode switch while busy");
    // free mode works again after the evaluation
    apb_write(REG_MUL_OP1, 32'd1000);
    apb_write(REG_MUL_OP2, -32'sd3);
    apb_read(REG_MUL_RES_LO, d);
    check(d == -32'sd3000, "free mode after detection");
    // 4. errors
    detect(32'h1_0000, 630, 100, 0, 1, 0, "window outside image");
    detect(32'h1_0000, 10, 10, 1, 1, 0, "integral image outside memory");

    $display("faces %0d, rejections %0d (after stage 0: %0d, deepest stage %0d), window errors %0d, bus errors %0d",
             n_face, n_reject, n_late_reject, max_stage_seen, n_win_err, n_bus_err);
    $display("free products %0d, ignored free-mode starts %0d, mode switches while busy %0d, interrupts %0d, shared memory reads %0d",
             n_free_mul, n_free_start_ignored, n_switch_busy, n_irq, n_shm_reads);
    $display("AHB master: %0d reads, %0d wait states, %0d grant delay cycles, %0d error responses",
             sysmem.n_reads, sysmem.n_waits, sysmem.n_grant_delays, sysmem.n_errors);
    check(n_face >= 1, "face detected");
    check(n_reject >= 1, "window rejected");
    check(n_late_reject >= 1, "rejection after the first stage");
    check(n_win_err >= 1 && n_bus_err >= 1, "both error kinds");
    check(n_free_mul >= 1 && n_free_start_ignored >= 1, "free mode");
    check(n_switch_busy >= 1, "mode switch while busy");
    check(n_irq >= 1, "interrupt");
    check(n_shm_reads >= 1, "shared memory read by the host");
    check(sysmem.n_waits > 0 && sysmem.n_grant_delays > 0, "AHB wait states and grant delays");
    check(max_stage_seen == n_stages - 1, "full cascade evaluated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
