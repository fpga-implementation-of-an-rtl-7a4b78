// mul41x33signed: 41 x 33 bit signed multiplier with a registered product.
//
// The accelerator has one multiplier that both the stage evaluator (variance,
// feature weighting, threshold normalisation) and the host CPU in free mode
// use. The operand widths are the design's; the single output register
// (latency one clock, one product per clock) is this implementation's choice.
//
// Interface: a, b and in_valid are sampled on the rising edge; p (the full
// 74-bit two's complement product) and out_valid appear one cycle later.
module mul41x33signed (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [40:0] a,
  input  logic signed [32:0] b,
  output logic               out_valid,
  output logic signed [73:0] p
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= 74'(a) * 74'(b);
    end
  end

endmodule
