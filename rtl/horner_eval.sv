// horner_eval: evaluates the cash-flow polynomial f(x) = sum c_i x^i and its
// derivative f'(x) together by Horner's rule.
//
// Recurrence, one coefficient per cycle, i = N-2 down to 0:
//     d <- d * x + b        (f' accumulator, starts at 0)
//     b <- b * x + c_i      (f  accumulator, starts at c_(N-1))
// After the last step b = f(x) and d = f'(x). Each accumulator has its own
// fx_mul and its own adder; every unit reports overflow, and the flags are
// ORed over the evaluation into ovf.
// HACK_F_ADD / HACK_D_ADD build the f / f' adder as msdf_adder instead of
// lsdf_adder: that adder then has no overflow flag (its bit of ovf stays 0)
// and passes on wrapped words.
//
// Interface: coefficients are read through coef_addr / coef_rdata, a
// combinational read port of the caller's coefficient store. While idle,
// coef_addr points at c_(N-1). Pulse start with x valid; done pulses for one
// cycle N-1 cycles later, with f, fd and ovf valid until the next start.
// The source shows the datapath of f only as a figure; the Horner form, the
// sequential schedule and the derivative recurrence are this design's choice.
module horner_eval
  import cf_pkg::*;
#(
  parameter int unsigned N      = 12,
  parameter int unsigned W      = 32,
  parameter int unsigned F      = 16,
  parameter bit          HACK_F_ADD = 1'b0,
  parameter bit          HACK_D_ADD = 1'b0,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  x,
  output logic [AW-1:0] coef_addr,
  input  logic [W-1:0]  coef_rdata,
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  f,
  output logic [W-1:0]  fd,
  output ovf_src_t      ovf
);
  logic [W-1:0]  x_q, b_q, d_q;
  logic [AW-1:0] idx_q;
  logic          run_q;
  ovf_src_t      ovf_q;

  logic [W-1:0]  pb, pd, b_nxt, d_nxt;
  logic          ovf_mb, ovf_md, ovf_ab, ovf_ad;

  fx_mul #(.W(W), .F(F)) u_mul_f (.a(b_q), .b(x_q), .p(pb), .ovf(ovf_mb));
  fx_mul #(.W(W), .F(F)) u_mul_d (.a(d_q), .b(x_q), .p(pd), .ovf(ovf_md));

  if (HACK_F_ADD) begin : g_add_f_msdf
    logic [W:0] unused_full;
    msdf_adder #(.W(W), .SUB(1'b0)) u_add_f (
      .a(pb), .b(coef_rdata), .sum(b_nxt), .sum_full(unused_full));
    assign ovf_ab = 1'b0;
  end else begin : g_add_f_lsdf
    lsdf_adder #(.W(W), .SUB(1'b0)) u_add_f (
      .a(pb), .b(coef_rdata), .sum(b_nxt), .ovf(ovf_ab));
  end

  if (HACK_D_ADD) begin : g_add_d_msdf
    logic [W:0] unused_full;
    msdf_adder #(.W(W), .SUB(1'b0)) u_add_d (
      .a(pd), .b(b_q), .sum(d_nxt), .sum_full(unused_full));
    assign ovf_ad = 1'b0;
  end else begin : g_add_d_lsdf
    lsdf_adder #(.W(W), .SUB(1'b0)) u_add_d (
      .a(pd), .b(b_q), .sum(d_nxt), .ovf(ovf_ad));
  end

  assign coef_addr = run_q ? idx_q : AW'(N - 1);
  assign busy      = run_q;
  assign f         = b_q;
  assign fd        = d_q;
  assign ovf       = ovf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      b_q   <= '0;
      d_q   <= '0;
      idx_q <= '0;
      run_q <= 1'b0;
      ovf_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          x_q   <= x;
          b_q   <= coef_rdata;             // c_(N-1)
          d_q   <= '0;
          idx_q <= AW'(N - 2);
          ovf_q <= '0;
          run_q <= 1'b1;
        end
      end else begin
        b_q         <= b_nxt;
        d_q         <= d_nxt;
        ovf_q.add_f <= ovf_q.add_f | ovf_ab;
        ovf_q.mul_f <= ovf_q.mul_f | ovf_mb;
        ovf_q.add_d <= ovf_q.add_d | ovf_ad;
        ovf_q.mul_d <= ovf_q.mul_d | ovf_md;
        if (idx_q == '0) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end else begin
          idx_q <= idx_q - 1'b1;
        end
      end
    end
  end

  if (N < 2) begin : g_bad_n
    $error("horner_eval needs N >= 2");
  end
endmodule
