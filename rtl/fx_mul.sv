// fx_mul: signed fixed-point multiplier with overflow detection.
//
// Multiplies two W-bit two's-complement numbers with F fractional bits and
// returns the product in the same format: the 2W-bit exact product shifted
// right by F (rounding toward minus infinity, i.e. the dropped bits are
// truncated). ovf is set when the shifted product does not fit in W bits;
// p then holds its low W bits. The source names the multipliers of the
// cash-flow datapath but not their insides; the truncation and the overflow
// rule are this design's choice. Purely combinational.
module fx_mul #(
  parameter int unsigned W = 32,
  parameter int unsigned F = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic         ovf
);
  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] shifted;

  always_comb begin
    prod    = $signed(a) * $signed(b);
    shifted = prod >>> F;
    p       = shifted[W-1:0];
    // Fits when all bits above W-1 equal the sign bit of the result.
    ovf     = (shifted[2*W-1:W-1] != {(W+1){shifted[W-1]}});
  end
endmodule
