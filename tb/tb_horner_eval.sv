// tb_horner_eval: self-checking test of the Horner evaluator of f and f'.
// Three copies run side by side on the same coefficients and x: all-LSDF,
// f adder as MSDF, f' adder as MSDF. Each result (f, f', overflow flags) is
// compared with the 64-bit reference model, and done must come N-1 cycles
// after start. Inputs are small values (no overflow: all three must agree
// and match the real-valued polynomial closely) and large ones (overflow:
// the MSDF adder's flag must stay low while its LSDF twin raises it).
module tb_horner_eval;
  import cf_pkg::*;
  import cf_ref_pkg::*;
  localparam int N = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_masked = 0, n_ovf = 0;

  logic         rst_n, start;
  logic [31:0]  x;
  logic [31:0]  coef [N];
  logic [3:0]   addr [3];
  logic         busy [3], done [3];
  logic [31:0]  f [3], fd [3];
  ovf_src_t     ovf [3];

  horner_eval #(.N(N)) dut0 (.clk, .rst_n, .start, .x, .coef_addr(addr[0]), .coef_rdata(coef[addr[0]]),
    .busy(busy[0]), .done(done[0]), .f(f[0]), .fd(fd[0]), .ovf(ovf[0]));
  horner_eval #(.N(N), .HACK_F_ADD(1'b1)) dut1 (.clk, .rst_n, .start, .x, .coef_addr(addr[1]),
    .coef_rdata(coef[addr[1]]), .busy(busy[1]), .done(done[1]), .f(f[1]), .fd(fd[1]), .ovf(ovf[1]));
  horner_eval #(.N(N), .HACK_D_ADD(1'b1)) dut2 (.clk, .rst_n, .start, .x, .coef_addr(addr[2]),
    .coef_rdata(coef[addr[2]]), .busy(busy[2]), .done(done[2]), .f(f[2]), .fd(fd[2]), .ovf(ovf[2]));

  task automatic run(input longint c[12], input longint xv, input bit modest);
    int cyc;
    real rx, rf, rd, ef0, efd0;
    @(negedge clk);
    foreach (coef[i]) coef[i] = c[i][31:0];
    x = xv[31:0]; start = 1'b1;
    @(negedge clk);
    start = 1'b0; x = $urandom;
    cyc = 0;
    while (!done[0] && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N - 1) begin failures++; $display("latency %0d", cyc); end
    for (int k = 0; k < 3; k++) begin
      longint ef, efd;
      logic [6:0] fl;
      int m;
      m = 0;
      horner(c, N, xv, k, ef, efd, fl, m);
      checks += 3;
      if (f[k] !== ef[31:0])  begin failures++; $display("dut%0d f %h want %h", k, f[k], ef[31:0]); end
      if (fd[k] !== efd[31:0]) begin failures++; $display("dut%0d fd %h want %h", k, fd[k], efd[31:0]); end
      if (7'(ovf[k]) !== fl)   begin failures++; $display("dut%0d flags %b want %b", k, ovf[k], fl); end
      if (k > 0) n_masked += m;
      if (k == 0 && fl != 0) n_ovf++;
    end
    if (modest) begin
      // Cross-check against the polynomial in real arithmetic.
      rx = to_real(xv); rf = 0.0; rd = 0.0;
      for (int i = N - 1; i >= 0; i--) begin
        rd = rd * rx + rf;
        rf = rf * rx + to_real(c[i]);
      end
      ef0  = to_real(longint'($signed(f[0])));
      efd0 = to_real(longint'($signed(fd[0])));
      checks += 2;
      if (ef0 - rf > 0.05 || rf - ef0 > 0.05) begin
        failures++;
        $display("real f %f vs %f", ef0, rf);
      end
      if (efd0 - rd > 0.05 || rd - efd0 > 0.05) begin
        failures++;
        $display("real fd %f vs %f", efd0, rd);
      end
    end
  endtask

  initial begin
    longint c[12];
    rst_n = 1'b0; start = 1'b0; x = '0;
    foreach (coef[i]) coef[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Small cash flows, |x| < 0.5: no overflow anywhere.
    for (int t = 0; t < 100; t++) begin
      foreach (c[i]) c[i] = longint'($signed($urandom % 32'h0080_0000)) - 64'sh40_0000;
      run(c, longint'($urandom % 32'h0001_0000) - 64'sh8000, 1'b1);
    end
    // Large cash flows and x up to +-2: overflows.
    for (int t = 0; t < 200; t++) begin
      foreach (c[i]) c[i] = longint'($signed($urandom));
      run(c, longint'($urandom % 32'h0004_0000) - 64'sh2_0000, 1'b0);
    end
    checks++;
    if (n_masked == 0 || n_ovf == 0) begin failures++; $display("coverage: masked=%0d ovf=%0d", n_masked, n_ovf); end
    $display("overflows masked by the MSDF adders: %0d", n_masked);
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
