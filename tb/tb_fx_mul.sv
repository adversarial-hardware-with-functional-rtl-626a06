// tb_fx_mul: self-checking test of the Q(W-F).F multiplier. Products of
// random operands (full range and small fixed-point values) are compared with
// a reference computed from the exact 2W-bit product, arithmetic-shifted by
// F; the overflow flag must be set exactly when that does not fit in W bits.
module tb_fx_mul;
  localparam int W = 32, F = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_ok = 0;

  logic [W-1:0] a, b, p;
  logic         ovf;

  fx_mul #(.W(W), .F(F)) dut (.a, .b, .p, .ovf);

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic signed [127:0] exact, sh;
    logic eovf;
    a = ta; b = tb_;
    #1;
    exact = 128'($signed(ta)) * 128'($signed(tb_));
    sh    = exact >>> F;
    eovf  = (sh > 128'sd2147483647) || (sh < -128'sd2147483648);
    checks += 2;
    if (ovf !== eovf) begin failures++; $display("ovf %h*%h", ta, tb_); end
    if (p !== sh[W-1:0]) begin failures++; $display("p %h*%h got %h", ta, tb_, p); end
    if (eovf) n_ovf++; else n_ok++;
  endtask

  initial begin
    check(32'h0001_0000, 32'h0001_0000);   // 1 * 1
    check(32'hffff_0000, 32'h0000_8000);   // -1 * 0.5
    check(32'h8000_0000, 32'hffff_0000);   // -32768 * -1 = overflow
    check(32'h7fff_ffff, 32'h0001_0000);   // max * 1
    check(32'h4000_0000, 32'h0002_0000);   // 16384 * 2 = overflow
    for (int i = 0; i < 2000; i++) begin
      check($urandom, $urandom);
      check(W'($signed(($urandom % 32'h0100_0000)) - 32'sh0080_0000),
            W'($signed(($urandom % 32'h0004_0000)) - 32'sh0002_0000));
    end
    checks++;
    if (n_ovf == 0 || n_ok == 0) begin failures++; $display("coverage"); end
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
