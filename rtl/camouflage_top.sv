// camouflage_top: top level holding the two pieces of hardware of this
// design side by side, each with its own ports.
//
//  - u_solver, a cashflow_newton: the cash-flow interest-rate solver whose
//    f(x) accumulator is, in this default configuration, the camouflaged
//    MSDF adder (see cashflow_newton for the interface and timing).
//  - u_serial, an online_adder_serial: the digit-serial radix-2 online adder
//    from which the digit-parallel online adder inside the camouflaged adder
//    is derived (one digit per cycle, most significant first, online delay
//    2; see online_adder_serial). It is brought out on the ser_* ports so
//    the serial form can be used, or compared with the parallel one.
// The two share only clock and reset. Grouping them in one top is this
// design's choice; all parameters keep the solver's defaults.
module camouflage_top
  import cf_pkg::*;
#(
  parameter int unsigned N         = 12,
  parameter int unsigned ITER      = 8,
  parameter int unsigned W         = 32,
  parameter int unsigned F         = 16,
  parameter hack_site_e  HACK_SITE = HACK_F,
  localparam int unsigned AW       = $clog2(N),
  localparam int unsigned IW       = $clog2(ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // cash-flow solver
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  logic [W-1:0]  coef_wdata,
  input  logic          start,
  input  logic [W-1:0]  x0,
  output logic          busy,
  output logic          iter_valid,
  output logic [IW-1:0] iter_idx,
  output logic [W-1:0]  x_out,
  output logic          warning,
  output ovf_src_t      ovf_src,
  output logic          done,
  // digit-serial online adder
  input  logic          ser_in_valid,
  input  logic          ser_in_first,
  input  logic [1:0]    ser_x,
  input  logic [1:0]    ser_y,
  output logic          ser_out_valid,
  output logic [1:0]    ser_z
);
  cashflow_newton #(
    .N(N), .ITER(ITER), .W(W), .F(F), .HACK_SITE(HACK_SITE)
  ) u_solver (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .start, .x0,
    .busy, .iter_valid, .iter_idx, .x_out, .warning, .ovf_src, .done
  );

  online_adder_serial u_serial (
    .clk, .rst_n,
    .in_valid(ser_in_valid), .in_first(ser_in_first), .x(ser_x), .y(ser_y),
    .out_valid(ser_out_valid), .z(ser_z)
  );
endmodule
