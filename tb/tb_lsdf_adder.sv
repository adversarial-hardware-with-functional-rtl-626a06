// tb_lsdf_adder: self-checking test of the LSDF adder and subtractor.
// Random and corner operands (including values at the overflow boundary)
// are compared with a 64-bit integer reference of the sum and of the
// overflow condition (exact result outside the W-bit signed range).
module tb_lsdf_adder;
  localparam int W = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, s_add, s_sub;
  logic         o_add, o_sub;

  lsdf_adder #(.W(W), .SUB(1'b0)) dut_add (.a(a), .b(b), .sum(s_add), .ovf(o_add));
  lsdf_adder #(.W(W), .SUB(1'b1)) dut_sub (.a(a), .b(b), .sum(s_sub), .ovf(o_sub));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    longint ea, eb, es, ed;
    a = ta; b = tb_;
    #1;
    ea = longint'($signed(ta)); eb = longint'($signed(tb_));
    es = ea + eb; ed = ea - eb;
    checks += 4;
    if (s_add !== es[W-1:0]) begin failures++; $display("add %0d+%0d got %0d", ea, eb, $signed(s_add)); end
    if (o_add !== (es > 64'sd2147483647 || es < -64'sd2147483648)) begin failures++; $display("add ovf %0d+%0d", ea, eb); end
    if (s_sub !== ed[W-1:0]) begin failures++; $display("sub %0d-%0d got %0d", ea, eb, $signed(s_sub)); end
    if (o_sub !== (ed > 64'sd2147483647 || ed < -64'sd2147483648)) begin failures++; $display("sub ovf %0d-%0d", ea, eb); end
  endtask

  int n_ovf = 0;
  initial begin
    check(32'h7fff_ffff, 32'h0000_0001);
    check(32'h8000_0000, 32'hffff_ffff);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7fff_ffff, 32'h7fff_ffff);
    check(32'h4000_0000, 32'h3fff_ffff);
    check(32'h0000_0000, 32'h8000_0000);
    check(32'hffff_ffff, 32'h7fff_ffff);
    for (int i = 0; i < 2000; i++) begin
      check($urandom, $urandom);
      if (o_add) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("no overflow was exercised"); end
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
