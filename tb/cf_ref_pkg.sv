// cf_ref_pkg: bit-accurate reference model of the cash-flow Newton solver,
// used only by the testbenches. It works on 64-bit integers, so it computes
// every sum and product exactly and then decides overflow and wrapping from
// the exact value, independently of how the RTL detects them. The word
// format is Q16.16 (W=32, F=16), the defaults of the RTL.
package cf_ref_pkg;
  localparam int W = 32;
  localparam int F = 16;
  localparam longint MAXV = 64'sd2147483647;
  localparam longint MINV = -64'sd2147483648;

  // Flags, same bit order as cf_pkg::ovf_src_t.
  localparam int B_ADD_F = 0, B_MUL_F = 1, B_ADD_D = 2, B_MUL_D = 3,
                 B_DIV = 4, B_DIV0 = 5, B_UPD = 6;

  function automatic longint wrap(input longint v);
    logic [31:0] t;
    t = v[31:0];
    return longint'($signed(t));
  endfunction

  function automatic bit oor(input longint v);
    return (v > MAXV) || (v < MINV);
  endfunction

  // Fixed-point value of a real number (rounded to nearest).
  function automatic longint to_fx(input real r);
    return longint'($rtoi(r * 65536.0 + (r >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real to_real(input longint v);
    return real'(v) / 65536.0;
  endfunction

  // hack: 0 none, 1 f adder, 2 f' adder, 3 update subtractor (as cf_pkg).
  // masked counts the overflows the MSDF adder swallowed.
  function automatic void horner(input longint c[12], input int n, input longint x,
                                 input int hack, output longint f, output longint fd,
                                 output logic [6:0] flags, inout int masked);
    longint b, d, pb, pd, sb, sd;
    b = c[n-1]; d = 0; flags = '0;
    for (int i = n - 2; i >= 0; i--) begin
      pb = (b * x) >>> F;
      pd = (d * x) >>> F;
      if (oor(pb)) flags[B_MUL_F] = 1'b1;
      if (oor(pd)) flags[B_MUL_D] = 1'b1;
      pb = wrap(pb); pd = wrap(pd);
      sb = pb + c[i];
      sd = pd + b;
      if (oor(sb)) begin if (hack == 1) masked++; else flags[B_ADD_F] = 1'b1; end
      if (oor(sd)) begin if (hack == 2) masked++; else flags[B_ADD_D] = 1'b1; end
      b = wrap(sb); d = wrap(sd);
    end
    f = b; fd = d;
  endfunction

  // One Newton iteration: returns x - f/f' and ORs this iteration's flags.
  function automatic longint newton_step(input longint c[12], input int n, input longint x,
                                         input int hack, inout logic [6:0] flags,
                                         inout int masked);
    longint f, fd, q, xn;
    logic [6:0] hf;
    horner(c, n, x, hack, f, fd, hf, masked);
    flags |= hf;
    if (fd == 0) begin
      flags[B_DIV0] = 1'b1;
      q = 0;
    end else begin
      q = (f * 65536) / fd;
      if (oor(q)) flags[B_DIV] = 1'b1;
      q = wrap(q);
    end
    xn = x - q;
    if (oor(xn)) begin if (hack == 3) masked++; else flags[B_UPD] = 1'b1; end
    return wrap(xn);
  endfunction
endpackage
