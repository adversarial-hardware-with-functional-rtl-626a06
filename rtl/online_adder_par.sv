// online_adder_par: radix-2 digit-parallel online (MSDF) adder.
//
// Operands are M-digit signed-digit numbers in borrow-save form: digit k has
// value xp[k] - xn[k] in {-1,0,1} and weight 2^k. The adder is the serial
// online adder cell copied M times with its registers removed: each digit
// position holds two full adders and there is no carry chain, so the delay is
// two full adders whatever M is.
//   level 1 at position k: FA(xp, ~xn, yp) -> carry h(k+1) to the next
//                          position up, inverted sum gn(k) (negative weight)
//   level 2 at position k: FA(h(k), ~gn(k), ~yn(k)) -> sum s(k) (positive),
//                          inverted carry cn(k+1) (negative, to position k+1)
// The result has M+1 digits, zp[k] - zn[k], and covers the full range of the
// sum (no overflow is possible): z(M) = h(M) - cn(M), z(0) = s(0).
// Digit k of the result depends only on input positions k, k-1 and k-2, the
// online delay of 2. The cell follows the source's description of the radix-2
// online adder; the borrow-save encoding of the digits is this design's choice.
// Purely combinational.
module online_adder_par
  import cf_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  logic [M-1:0] xp,
  input  logic [M-1:0] xn,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] yn,
  output logic [M:0]   zp,
  output logic [M:0]   zn
);
  logic [M:0]   h;    // level-1 carries, h[k] enters position k
  logic [M-1:0] gn;   // level-1 sums, negative weight
  logic [M:0]   cn;   // level-2 carries (inverted), cn[k] has weight 2^k
  logic [M-1:0] s;    // level-2 sums

  always_comb begin
    h[0]  = 1'b0;
    cn[0] = 1'b0;
    for (int k = 0; k < M; k++) begin
      logic [1:0] r1, r2;
      r1      = fa(xp[k], ~xn[k], yp[k]);
      h[k+1]  = r1[1];
      gn[k]   = ~r1[0];
      r2      = fa(h[k], ~gn[k], ~yn[k]);
      s[k]    = r2[0];
      cn[k+1] = ~r2[1];
    end
    zp = {h[M], s};
    zn = cn;
  end
endmodule
