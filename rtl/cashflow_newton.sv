// cashflow_newton: fixed-point cash-flow analysis engine that finds the
// interest rate x as a root of f(x) = c_0 + c_1 x + ... + c_(N-1) x^(N-1) by
// Newton's method, x <- x - f(x) / f'(x), starting from x0 - with one adder
// optionally replaced by a functionally camouflaged MSDF adder (a hardware
// Trojan).
//
// Structure: a coefficient register file (N words, written one per cycle),
// horner_eval for f(x) and f'(x), fx_div for the Newton step q = f / f', and
// the update subtractor x - q. Every arithmetic unit detects overflow; the
// flags of a solve are collected in ovf_src and their OR is the warning that
// tells the user an extreme payment set has driven the datapath out of range.
//
// HACK_SITE picks the adder that is built as msdf_adder (see cf_pkg):
// HACK_F (default, the configuration this design models) replaces the
// Horner accumulator of f(x), the adder through which the payment
// coefficients enter. That adder computes the same sums as the LSDF adder
// but has no overflow condition, so an overflow there is not reported and the
// wrapped word flows on: with the right payments the design prints plausible
// but wrong rates with no warning. HACK_NONE gives the requested design.
//
// Interface and timing: write c_i with coef_we/coef_addr/coef_wdata while
// idle. Pulse start with x0 valid. The engine runs ITER iterations; each one
// takes N+W+F+5 cycles (N-1 of Horner, W+F+1 of division, one of update and
// four of hand-over between the units; 65 at the defaults), then pulses
// iter_valid with iter_idx (1..ITER), x_out = x(k) and the warning so far:
// the first iter_valid comes N+W+F+5 cycles after the cycle that sampled
// start. done pulses with the last iter_valid. warning and
// ovf_src are cleared by start and sticky within a solve. The iteration
// count, the payment count and the starting point follow the source's
// example; word widths, schedule and interface are this design's choice.
module cashflow_newton
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
  output logic          done
);
  typedef enum logic [2:0] {S_IDLE, S_HORNER, S_WAIT_H, S_DIV, S_WAIT_D, S_UPD} state_e;

  // Coefficient store.
  logic [W-1:0] coef_q [N];
  logic [AW-1:0] h_addr;

  always_ff @(posedge clk) begin
    if (coef_we && !busy) coef_q[coef_addr] <= coef_wdata;
  end

  state_e        state_q;
  logic [W-1:0]  x_q;
  logic [IW-1:0] it_q;
  ovf_src_t      src_q;

  logic          h_start, h_busy, h_done;
  logic [W-1:0]  h_f, h_fd;
  ovf_src_t      h_ovf;
  logic          d_start, d_busy, d_done, d_ovf, d_dz;
  logic [W-1:0]  d_q;
  logic [W-1:0]  x_nxt;
  logic          upd_ovf;

  horner_eval #(
    .N(N), .W(W), .F(F),
    .HACK_F_ADD(HACK_SITE == HACK_F),
    .HACK_D_ADD(HACK_SITE == HACK_D)
  ) u_horner (
    .clk, .rst_n, .start(h_start), .x(x_q),
    .coef_addr(h_addr), .coef_rdata(coef_q[h_addr]),
    .busy(h_busy), .done(h_done), .f(h_f), .fd(h_fd), .ovf(h_ovf)
  );

  fx_div #(.W(W), .F(F)) u_div (
    .clk, .rst_n, .start(d_start), .n(h_f), .d(h_fd),
    .busy(d_busy), .done(d_done), .q(d_q), .ovf(d_ovf), .dz(d_dz)
  );

  if (HACK_SITE == HACK_UPD) begin : g_upd_msdf
    logic [W:0] unused_full;
    msdf_adder #(.W(W), .SUB(1'b1)) u_upd (
      .a(x_q), .b(d_q), .sum(x_nxt), .sum_full(unused_full));
    assign upd_ovf = 1'b0;
  end else begin : g_upd_lsdf
    lsdf_adder #(.W(W), .SUB(1'b1)) u_upd (
      .a(x_q), .b(d_q), .sum(x_nxt), .ovf(upd_ovf));
  end

  assign h_start = (state_q == S_HORNER);
  assign d_start = (state_q == S_DIV);
  assign busy    = (state_q != S_IDLE);
  assign ovf_src = src_q;
  assign warning = |src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      x_q        <= '0;
      it_q       <= '0;
      src_q      <= '0;
      iter_valid <= 1'b0;
      iter_idx   <= '0;
      x_out      <= '0;
      done       <= 1'b0;
    end else begin
      iter_valid <= 1'b0;
      done       <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          x_q     <= x0;
          it_q    <= '0;
          src_q   <= '0;
          state_q <= S_HORNER;
        end
        S_HORNER: state_q <= S_WAIT_H;
        S_WAIT_H: if (h_done) begin
          src_q   <= src_q | h_ovf;       // Horner sets only its four bits
          state_q <= S_DIV;
        end
        S_DIV: state_q <= S_WAIT_D;
        S_WAIT_D: if (d_done) begin
          src_q.div  <= src_q.div | d_ovf;
          src_q.div0 <= src_q.div0 | d_dz;
          state_q    <= S_UPD;
        end
        S_UPD: begin
          src_q.upd  <= src_q.upd | upd_ovf;
          x_q        <= x_nxt;
          x_out      <= x_nxt;
          iter_idx   <= it_q + 1'b1;
          iter_valid <= 1'b1;
          it_q       <= it_q + 1'b1;
          if (it_q == IW'(ITER - 1)) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_HORNER;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The sub-units are only started from their idle state.
  a_h_idle: assert property (@(posedge clk) h_start |-> !h_busy);
  a_d_idle: assert property (@(posedge clk) d_start |-> !d_busy);
endmodule
