// fx_div: sequential signed fixed-point divider with overflow detection.
//
// Computes q = n / d for W-bit two's-complement numbers with F fractional
// bits, i.e. q = trunc(n * 2^F / d), rounded toward zero. It divides the
// magnitudes by restoring division, one quotient bit per cycle, over a
// (W+F)-bit dividend, and applies the sign at the end.
//
// Interface: pulse start for one cycle with n and d valid; busy is high
// while it works; done pulses for one cycle with q, ovf and dz valid, exactly
// W+F+1 cycles after the start cycle (W+F iterations plus one cycle to sign
// and check the result). q, ovf and dz hold until the next start.
// ovf: the quotient does not fit in W bits (q holds its low W bits).
// dz:  d is zero (q is then 0).
// The source only says the Newton step divides f(x) by f'(x); the algorithm,
// rounding and handshake are this design's choice.
module fx_div #(
  parameter int unsigned W = 32,
  parameter int unsigned F = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n,
  input  logic [W-1:0] d,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q,
  output logic         ovf,
  output logic         dz
);
  localparam int unsigned DW = W + F;          // dividend / quotient width
  localparam int unsigned CW = $clog2(DW + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;

  state_e         state_q;
  logic [DW-1:0]  dividend_q;                  // shifts out MSB first
  logic [DW-1:0]  quot_q;
  logic [W-1:0]   rem_q;                       // remainder, below |d|
  logic [W-1:0]   dmag_q;
  logic           neg_q;
  logic [CW-1:0]  cnt_q;

  logic [W-1:0]   nmag, dmag;
  logic [W:0]     rem_sh, rem_sub;
  logic [DW:0]    qsigned;                     // signed, DW+1 bits

  always_comb begin
    nmag    = n[W-1] ? (~n + 1'b1) : n;
    dmag    = d[W-1] ? (~d + 1'b1) : d;
    rem_sh  = {rem_q, dividend_q[DW-1]};
    rem_sub = rem_sh - {1'b0, dmag_q};
    qsigned = neg_q ? (~{1'b0, quot_q} + 1'b1) : {1'b0, quot_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      dividend_q <= '0;
      quot_q     <= '0;
      rem_q      <= '0;
      dmag_q     <= '0;
      neg_q      <= 1'b0;
      cnt_q      <= '0;
      q          <= '0;
      ovf        <= 1'b0;
      dz         <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          // The magnitude of the most negative number is 2^(W-1): held
          // correctly as an unsigned W-bit value.
          dividend_q <= {nmag, {F{1'b0}}};
          dmag_q     <= dmag;
          neg_q      <= n[W-1] ^ d[W-1];
          rem_q      <= '0;
          quot_q     <= '0;
          cnt_q      <= '0;
          state_q    <= S_RUN;
        end
        S_RUN: begin
          if (!rem_sub[W]) begin               // rem_sh >= |d|
            rem_q  <= rem_sub[W-1:0];
            quot_q <= {quot_q[DW-2:0], 1'b1};
          end else begin
            rem_q  <= rem_sh[W-1:0];
            quot_q <= {quot_q[DW-2:0], 1'b0};
          end
          dividend_q <= {dividend_q[DW-2:0], 1'b0};
          cnt_q      <= cnt_q + 1'b1;
          if (cnt_q == CW'(DW - 1)) state_q <= S_FIN;
        end
        S_FIN: begin
          dz      <= (dmag_q == '0);
          q       <= (dmag_q == '0) ? '0 : qsigned[W-1:0];
          ovf     <= (dmag_q != '0) &&
                     (qsigned[DW:W-1] != {(DW-W+2){qsigned[W-1]}});
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);
endmodule
