// tb_fx_div: self-checking test of the sequential fixed-point divider.
// Each random division is checked against trunc(n * 2^F / d) computed with
// 64-bit integers, with the overflow and divide-by-zero flags, and the
// latency from start to done must be W+F+1 cycles.
module tb_fx_div;
  localparam int W = 32, F = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_dz = 0, n_ok = 0;

  logic         rst_n, start, busy, done, ovf, dz;
  logic [W-1:0] n, d, q;

  fx_div #(.W(W), .F(F)) dut (.clk, .rst_n, .start, .n, .d, .busy, .done, .q, .ovf, .dz);

  task automatic run(input logic [W-1:0] tn, input logic [W-1:0] td);
    longint en, ed, num, eq;
    logic eovf, edz;
    int cyc;
    @(negedge clk);
    n = tn; d = td; start = 1'b1;
    @(negedge clk);
    start = 1'b0; n = $urandom; d = $urandom;   // inputs only sampled at start
    cyc = 0;   // clock edges after the one that sampled start
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    en = longint'($signed(tn)); ed = longint'($signed(td));
    edz = (ed == 0);
    num = en * 65536;
    eq = edz ? 0 : num / ed;                     // truncates toward zero
    eovf = !edz && (eq > 64'sd2147483647 || eq < -64'sd2147483648);
    checks += 4;
    if (cyc != W + F + 1) begin failures++; $display("latency %0d", cyc); end
    if (dz !== edz) begin failures++; $display("dz %0d/%0d", en, ed); end
    if (ovf !== eovf) begin failures++; $display("ovf %0d/%0d", en, ed); end
    if (q !== eq[W-1:0]) begin failures++; $display("q %0d/%0d got %0d want %0d", en, ed, $signed(q), eq); end
    if (edz) n_dz++; else if (eovf) n_ovf++; else n_ok++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; n = '0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(32'hbc4b_0000, 32'h40b7_0000);   // -17333 / 16567
    run(32'h0001_0000, 32'h0000_0000);   // divide by zero
    run(32'h8000_0000, 32'hffff_0000);   // -32768 / -1 overflows
    run(32'h8000_0000, 32'h0001_0000);   // -32768 / 1 fits
    run(32'h7fff_ffff, 32'h0000_0001);   // overflow
    for (int i = 0; i < 300; i++) begin
      run($urandom, $urandom);
      run($urandom, W'($urandom % 32'h0010_0000) - 32'h0008_0000);
    end
    checks++;
    if (n_ovf == 0 || n_dz == 0 || n_ok == 0) begin failures++; $display("coverage"); end
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
