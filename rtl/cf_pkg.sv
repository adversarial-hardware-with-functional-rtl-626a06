// cf_pkg: shared types and constants of the cash-flow Newton solver.
//
// Numbers are signed two's-complement fixed point with W bits, F of them
// fractional (Q16.16 by default). The source only says the datapath is
// fixed-point two's complement with overflow detection; the word and fraction
// widths are this design's choice, wide enough for the payment coefficients
// of its example cash flows (|c_i| < 2^15).
//
// hack_site_e names the adder, if any, that is built as the camouflaged
// MSDF (online) adder instead of the LSDF adder with overflow detection.
package cf_pkg;

  typedef enum logic [1:0] {
    HACK_NONE = 2'd0,  // every adder is the LSDF adder: the requested design
    HACK_F    = 2'd1,  // Horner accumulator of f(x) is the MSDF adder
    HACK_D    = 2'd2,  // Horner accumulator of f'(x) is the MSDF adder
    HACK_UPD  = 2'd3   // Newton update subtractor is the MSDF adder
  } hack_site_e;

  // Per-unit overflow sources, reported sticky by the solver.
  typedef struct packed {
    logic upd;    // update subtractor x - q
    logic div0;   // f'(x) = 0
    logic div;    // quotient f/f' out of range
    logic mul_d;  // Horner multiplier of f'
    logic add_d;  // Horner adder of f'
    logic mul_f;  // Horner multiplier of f
    logic add_f;  // Horner adder of f  (bit 0)
  } ovf_src_t;

  // Full adder: returns {carry, sum}.
  function automatic logic [1:0] fa(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

endpackage
