// tb_vga_scan_setups: the four detection set-ups on a VGA image, in the
// scaled-classifier mode the accelerator implements.
//
// Set-ups: minimum window 30x30 with scale step 1.2 and 1.1, and 20x20 with
// step 1.2 and 1.1. For each set-up every scale of the scan is visited, from
// the minimum window up to the largest that fits the 640x480 image (scale
// factors rounded to Q16.16, window side round(20*scale)); at each scale a few
// windows at random positions are evaluated through the registers and checked
// against the reference model, and one window tuned to pass the whole
// 22-stage, 2135-feature cascade is evaluated as well. The testbench prints the
// number of scales, the number of windows a full scan would visit (position
// step max(2, round(scale)) pixels) and the measured cycles per window for
// this random test cascade. A real cascade rejects windows at other rates, so
// these cycle counts are not a prediction of real detection times.
module tb_vga_scan_setups;
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
    repeat (20_000_000) @(posedge clk);
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
    n_windows++;
    total_cycles += cycles;
    apb_write(REG_STATUS, 32'h1);            // clear done and the interrupt
    check(!irq, "interrupt cleared");
  endtask

  int n_windows = 0;
  longint total_cycles = 0;

  initial begin
    automatic int nf[] = '{3, 16, 21, 39, 33, 44, 50, 51, 56, 71, 80, 103, 111, 102, 135,
                           137, 140, 160, 177, 182, 211, 213};
    automatic int unsigned words[$];
    automatic int min_side[4] = '{30, 30, 20, 20};
    automatic real step[4] = '{1.2, 1.1, 1.2, 1.1};
    automatic int unsigned tuned_scale = 32'h1_8000;

    make_image(640, 480, 11);
    make_classifier(22, nf);
    tune_for(tuned_scale, 200, 150, scl(20, tuned_scale), scl(20, tuned_scale), 20);
    serialize(words);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    foreach (words[i]) ahb_write(SHM_BASE + 32'(i) * 4, words[i]);
    apb_write(REG_ADDR_SQSUM, SQ_BASE);
    apb_write(REG_IMG_DIM, {16'(img_h), 16'(img_w)});
    apb_write(REG_IMG_WIDTH, 32'(img_w + 1));
    apb_write(REG_START_NODE, 32'h0);
    apb_write(REG_END_STAGE, 32'(n_stages - 1));

    for (int su = 0; su < 4; su++) begin
      automatic real f = real'(min_side[su]) / 20.0;
      automatic int n_scales = 0;
      automatic longint scan_windows = 0;
      automatic longint c0 = total_cycles;
      automatic int w0 = n_windows;
      while (1) begin
        automatic int unsigned sc = int'(f * 65536.0 + 0.5);
        automatic int ws = scl(20, sc);
        automatic int ps;
        if (ws > 480) break;
        ps = (scl(1, sc) > 2) ? scl(1, sc) : 2;
        scan_windows += longint'((640 - ws) / ps + 1) * ((480 - ws) / ps + 1);
        n_scales++;
        for (int n = 0; n < 3; n++)
          detect(sc, $urandom % (641 - ws), $urandom % (481 - ws), 0, 0, 0,
                 $sformatf("setup %0d", su + 1));
        f = f * step[su];
      end
      $display("SETUP %0d: minimum window %0dx%0d, step %0.1f: %0d scales, %0d windows in a full scan, %0d cycles per checked window",
               su + 1, min_side[su], min_side[su], step[su], n_scales, scan_windows,
               (total_cycles - c0) / (n_windows - w0));
      check(n_scales > 0, "set-up has scales");
    end
    detect(tuned_scale, 200, 150, 0, 0, 0, "tuned window");
    check(n_face >= 1 && n_reject >= 1, "faces and rejections");
    $display("windows %0d, faces %0d, rejections %0d", n_windows, n_face, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
