// tb_online_adder_par: self-checking test of the digit-parallel radix-2
// online adder. Operands are random borrow-save vectors (every digit pattern,
// including the redundant 1-1 encoding of zero); the value of the M+1-digit
// result, sum(zp) - sum(zn), must equal the value of x plus the value of y.
// The online-delay property is checked too: changing the input digits below
// position k-2 must not change result digit k or above.
module tb_online_adder_par;
  localparam int M = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [M-1:0] xp, xn, yp, yn;
  logic [M:0]   zp, zn;

  online_adder_par #(.M(M)) dut (.xp, .xn, .yp, .yn, .zp, .zn);

  function automatic longint val(input logic [M:0] p, input logic [M:0] n);
    return longint'({31'b0, p}) - longint'({31'b0, n});
  endfunction

  initial begin
    logic [M:0] zp0, zn0;
    for (int i = 0; i < 3000; i++) begin
      int k;
      longint ex, ey;
      xp = $urandom; xn = $urandom; yp = $urandom; yn = $urandom;
      if (i == 0) begin xp = '1; xn = '0; yp = '1; yn = '0; end  // largest sum
      if (i == 1) begin xp = '0; xn = '1; yp = '0; yn = '1; end  // smallest sum
      #1;
      ex = val({1'b0, xp}, {1'b0, xn});
      ey = val({1'b0, yp}, {1'b0, yn});
      checks++;
      if (val(zp, zn) != ex + ey) begin
        failures++;
        $display("value: x=%0d y=%0d z=%0d", ex, ey, val(zp, zn));
      end
      // Online delay 2: perturb digits below k-2, digits >= k must hold.
      k = 3 + ($urandom % (M - 3));
      zp0 = zp; zn0 = zn;
      for (int j = 0; j < k - 2; j++) begin
        xp[j] = $urandom; xn[j] = $urandom; yp[j] = $urandom; yn[j] = $urandom;
      end
      #1;
      checks++;
      if ((zp >> k) != (zp0 >> k) || (zn >> k) != (zn0 >> k)) begin
        failures++;
        $display("online delay violated at k=%0d", k);
      end
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
