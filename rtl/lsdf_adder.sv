// lsdf_adder: conventional least-significant-digit-first two's-complement
// adder (SUB=0) or subtractor (SUB=1) of W-bit words, with overflow detection.
//
// The result is the low W bits of a +/- b. ovf is set when the exact result
// lies outside [-2^(W-1), 2^(W-1)-1], found from the sign bits of the
// operands and the result. This is the adder the cash-flow datapath is meant
// to use: its overflow flags feed the solver's warning. Purely combinational.
module lsdf_adder #(
  parameter int unsigned W   = 32,
  parameter bit          SUB = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         ovf
);
  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = SUB ? ~b : b;
    sum   = a + b_eff + W'(SUB);
    // Same-signed operands giving a result of the other sign overflowed.
    ovf   = (a[W-1] == b_eff[W-1]) && (sum[W-1] != a[W-1]);
  end
endmodule
