// tb_online_adder_serial: self-checking test of the digit-serial online
// adder. Random n-digit borrow-save operands are fed most significant digit
// first, followed by two zero digits. The first valid output digit must come
// one cycle after the first input (online delay 2 relative to the fractional
// digit positions), n+1 digits must come out in all, and their value must
// equal x + y. Half of the operands start right after an abandoned,
// unflushed operand, which the first-digit marker must discard.
module tb_online_adder_serial;
  localparam int NDIG = 24;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, in_valid, in_first, out_valid;
  logic [1:0] x, y, z;

  online_adder_serial dut (.clk, .rst_n, .in_valid, .in_first, .x, .y, .out_valid, .z);

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      logic [NDIG-1:0] xp, xn, yp, yn;
      longint ex, ey, ez;
      int nout, first_out;
      xp = $urandom; xn = $urandom; yp = $urandom; yn = $urandom;
      ex = longint'(xp) - longint'(xn);
      ey = longint'(yp) - longint'(yn);
      ez = 0; nout = 0; first_out = -1;
      // Half of the operands follow an abandoned, unflushed operand: the
      // new first digit must discard whatever state it left.
      if ($urandom % 2) begin
        int len;
        len = 1 + ($urandom % 5);
        for (int t = 0; t < len; t++) begin
          @(negedge clk);
          in_valid = 1'b1; in_first = (t == 0);
          x = 2'($urandom); y = 2'($urandom);
        end
      end
      for (int t = 0; t < NDIG + 2; t++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_first = (t == 0);
        if (t < NDIG) begin
          x = {xp[NDIG-1-t], xn[NDIG-1-t]};
          y = {yp[NDIG-1-t], yn[NDIG-1-t]};
        end else begin
          x = '0; y = '0;
        end
        #1;
        if (out_valid) begin
          if (first_out < 0) first_out = t;
          ez = 2 * ez + longint'(z[1]) - longint'(z[0]);
          nout++;
        end
      end
      // Random idle gap between operands.
      @(negedge clk);
      in_valid = 1'b0; in_first = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
      checks += 3;
      if (first_out != 1) begin failures++; $display("first output at cycle %0d", first_out); end
      if (nout != NDIG + 1) begin failures++; $display("%0d output digits", nout); end
      if (ez != ex + ey) begin failures++; $display("x=%0d y=%0d z=%0d", ex, ey, ez); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
