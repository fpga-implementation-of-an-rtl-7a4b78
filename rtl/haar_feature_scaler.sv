// haar_feature_scaler: scales a Haar-like rectangle and computes its corner
// addresses in an integral image.
//
// A rectangle (x, y, w, h), given in the coordinates of the 20x20 training
// window, is scaled by the Q16.16 factor `scale`: each of x, y, w and h is
// multiplied and rounded to the nearest integer on its own. The scaled
// rectangle is offset by the search window origin (win_x, win_y), giving
// columns c0 = win_x + x', c1 = c0 + w' and rows r0 = win_y + y', r1 = r0 + h'.
// The four corner addresses are base + (row * stride + col) * entry_size, with
// entry_size 4 bytes (integral image) or 8 bytes (squared integral, `wide`).
// With scale_en low the rectangle is used unscaled (window variance).
// That the block scales features and computes window addresses, and that it is
// pipelined, is the design's; the four stages below are this implementation's:
//   1: four coordinate products   2: rounding and window offset
//   3: row times stride           4: column add, entry size and base address
// One rectangle can enter per clock; results follow 4 clocks later.
// Corners: addr1 top-left, addr2 top-right, addr3 bottom-left, addr4 bottom-right.
module haar_feature_scaler
  import imse_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] x,
  input  logic [COORD_W-1:0] y,
  input  logic [COORD_W-1:0] w,
  input  logic [COORD_W-1:0] h,
  input  logic               scale_en,
  input  logic [31:0]        scale,     // Q16.16
  input  logic [COORD_W-1:0] win_x,
  input  logic [COORD_W-1:0] win_y,
  input  logic [COORD_W-1:0] stride,    // integral image row length in entries
  input  logic [31:0]        base,      // byte address of the integral image
  input  logic               wide,      // 1: 8-byte entries, 0: 4-byte entries
  output logic               out_valid,
  output logic [31:0]        addr1,
  output logic [31:0]        addr2,
  output logic [31:0]        addr3,
  output logic [31:0]        addr4
);

  localparam int unsigned PW = COORD_W + 32;
  localparam logic [PW-1:0] HALF = PW'(1) << (SCALE_FB - 1);

  // stage 1
  logic          v1, wide1;
  logic [PW-1:0] xs1, ys1, ws1, hs1;
  logic [COORD_W-1:0] wx1, wy1, str1;
  logic [31:0]   base1;
  // stage 2
  logic          v2, wide2;
  logic [COORD_W-1:0] c0_2, c1_2, r0_2, r1_2, str2;
  logic [31:0]   base2;
  // stage 3
  logic          v3, wide3;
  logic [COORD_W-1:0] c0_3, c1_3;
  logic [31:0]   row0_3, row1_3, base3;

  logic [31:0] scale_eff;
  assign scale_eff = scale_en ? scale : (32'd1 << SCALE_FB);

  function automatic logic [COORD_W-1:0] round_q(input logic [PW-1:0] v);
    logic [PW-1:0] t;
    t = (v + HALF) >> SCALE_FB;
    return t[COORD_W-1:0];
  endfunction

  function automatic logic [31:0] corner(input logic [31:0] b, input logic [31:0] row,
                                         input logic [COORD_W-1:0] col, input logic wd);
    logic [31:0] idx;
    idx = row + 32'(col);
    return b + (wd ? (idx << 3) : (idx << 2));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; out_valid <= v3;
    end
  end

  always_ff @(posedge clk) begin
    // stage 1: products
    xs1   <= PW'(x) * PW'(scale_eff);
    ys1   <= PW'(y) * PW'(scale_eff);
    ws1   <= PW'(w) * PW'(scale_eff);
    hs1   <= PW'(h) * PW'(scale_eff);
    wx1   <= win_x;
    wy1   <= win_y;
    str1  <= stride;
    base1 <= base;
    wide1 <= wide;
    // stage 2: rounding, window offset
    c0_2  <= wx1 + round_q(xs1);
    c1_2  <= wx1 + round_q(xs1) + round_q(ws1);
    r0_2  <= wy1 + round_q(ys1);
    r1_2  <= wy1 + round_q(ys1) + round_q(hs1);
    str2  <= str1;
    base2 <= base1;
    wide2 <= wide1;
    // stage 3: row offsets
    row0_3 <= 32'(r0_2) * 32'(str2);
    row1_3 <= 32'(r1_2) * 32'(str2);
    c0_3   <= c0_2;
    c1_3   <= c1_2;
    base3  <= base2;
    wide3  <= wide2;
    // stage 4: corner addresses
    addr1 <= corner(base3, row0_3, c0_3, wide3);
    addr2 <= corner(base3, row0_3, c1_3, wide3);
    addr3 <= corner(base3, row1_3, c0_3, wide3);
    addr4 <= corner(base3, row1_3, c1_3, wide3);
  end

endmodule
