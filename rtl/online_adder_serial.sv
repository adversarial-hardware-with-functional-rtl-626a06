// online_adder_serial: radix-2 digit-serial online (MSDF) adder.
//
// One signed digit of each operand enters per cycle, most significant first,
// in borrow-save form (x_p - x_n). The cell is one position of
// online_adder_par with registers between the two full-adder levels:
// the level-1 full adder of the digit entering now produces the carry that
// the level-2 full adder of the previous (more significant) digit needs, so
// that digit's level-1 sum and y_n are held for a cycle; the level-2 sum is
// held one more cycle until the carry of the digit below arrives.
//
// Timing: the output digit z_j appears in the same cycle as input digit
// x_(j+2), i.e. the online delay is 2. For an n-digit operand (positions
// n-1 .. 0), the output in the cycle after the first digit is the extra most
// significant digit z_n, and z_0 comes out in cycle n+1 (counting the first
// input cycle as 0), so the caller feeds two zero digits after the last one.
// The output in cycle 0 is always zero and out_valid is low then.
// in_first marks the most significant digit and clears the held state.
// The cell structure follows the source's serial online adder; the handshake
// (in_valid/in_first/out_valid) is this design's choice.
module online_adder_serial
  import cf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic [1:0] x,          // {x_p, x_n}
  input  logic [1:0] y,          // {y_p, y_n}
  output logic       out_valid,
  output logic [1:0] z           // {z_p, z_n}
);
  logic       gn_q, yn_q, s_q, started_q;
  logic       h_now, gn_now, s_now, cn_now;
  logic       gn_prev, yn_prev, s_prev;

  always_comb begin
    logic [1:0] r1, r2;
    // A new operand starts with the state of an all-zero digit above it.
    gn_prev = in_first ? 1'b0 : gn_q;
    yn_prev = in_first ? 1'b0 : yn_q;
    s_prev  = in_first ? 1'b0 : s_q;
    r1      = fa(x[1], ~x[0], y[1]);
    h_now   = r1[1];                 // carry into the digit entered last cycle
    gn_now  = ~r1[0];
    r2      = fa(h_now, ~gn_prev, ~yn_prev);
    s_now   = r2[0];                 // level-2 sum of the previous digit
    cn_now  = ~r2[1];                // negative carry two digits up
    z       = {s_prev, cn_now};
    out_valid = in_valid && !in_first && started_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gn_q      <= 1'b0;
      yn_q      <= 1'b0;
      s_q       <= 1'b0;
      started_q <= 1'b0;
    end else if (in_valid) begin
      gn_q      <= gn_now;
      yn_q      <= y[0];
      s_q       <= s_now;
      started_q <= 1'b1;
    end
  end
endmodule
