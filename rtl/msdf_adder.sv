// msdf_adder: the functionally camouflaged adder, a drop-in replacement for
// lsdf_adder built around the radix-2 online (MSDF) adder.
//
// Both W-bit two's-complement operands are recoded to borrow-save signed
// digits without any logic: the low W-1 bits become positive digits and the
// sign bit becomes a negative digit of weight 2^(W-1). Subtraction (SUB=1)
// swaps the positive and negative digits of b, which negates it. The online
// adder returns W+1 signed digits, a range one digit wider than the LSDF
// adder's, so the sum never overflows inside this adder: sum_full (W+1 bits)
// is always the exact a +/- b. The conversion back to two's complement is a
// plain subtraction of the negative digits from the positive ones.
//
// The datapath around it carries W-bit words, so sum is the low W bits of
// the exact result: where the LSDF adder would raise its overflow flag, this
// adder hands on the wrapped word and raises nothing. That silent loss of
// the overflow is the payload of the Trojan the source describes. The
// recoding, the conversion back and the W-bit interface are this design's
// reading of how the MSDF core is put in place of the LSDF one.
// Purely combinational.
module msdf_adder #(
  parameter int unsigned W   = 32,
  parameter bit          SUB = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic [W:0]   sum_full
);
  logic [W-1:0] ap, an, bp, bn, yp, yn;
  logic [W:0]   zp, zn;

  always_comb begin
    ap = {1'b0, a[W-2:0]};
    an = {a[W-1], {(W-1){1'b0}}};
    bp = {1'b0, b[W-2:0]};
    bn = {b[W-1], {(W-1){1'b0}}};
    yp = SUB ? bn : bp;
    yn = SUB ? bp : bn;
  end

  online_adder_par #(.M(W)) u_add (
    .xp(ap), .xn(an), .yp(yp), .yn(yn), .zp(zp), .zn(zn)
  );

  always_comb begin
    sum_full = zp - zn;
    sum      = sum_full[W-1:0];
  end
endmodule
