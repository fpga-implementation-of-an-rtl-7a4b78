// haar_feature_rect_calc: area of a rectangle of an integral image.
//
// With ii1 the integral value at the top-left corner, ii2 top-right, ii3
// bottom-left and ii4 bottom-right, the sum of the pixels inside the rectangle
// is ii4 + ii1 - (ii2 + ii3): four corner reads give any rectangle sum in
// constant time. The formula and corner naming are the design's; the result is
// computed modulo 2^WIDTH, which stays exact for wrapped integral images as long
// as the true rectangle sum fits in WIDTH bits.
//
// Interface: corners and in_valid are sampled on the rising clock edge; area
// and out_valid follow one cycle later (latency 1, one rectangle per cycle).
// Reset is synchronous, active low, and clears out_valid.
module haar_feature_rect_calc #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] ii1,   // top-left
  input  logic [WIDTH-1:0] ii2,   // top-right
  input  logic [WIDTH-1:0] ii3,   // bottom-left
  input  logic [WIDTH-1:0] ii4,   // bottom-right
  output logic             out_valid,
  output logic [WIDTH-1:0] area
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      area      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) area <= (ii4 + ii1) - (ii2 + ii3);
    end
  end

endmodule
