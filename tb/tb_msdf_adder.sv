// tb_msdf_adder: self-checking test of the camouflaged MSDF adder.
// For random and boundary operands, both configurations (add, subtract) must
// return the exact result on sum_full (W+1 bits, never out of range) and its
// low W bits on sum - the same word the LSDF adder produces. The test also
// counts operand pairs for which the LSDF adder raises overflow: those are
// the cases this adder passes on silently, and at least one must occur.
module tb_msdf_adder;
  localparam int W = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, s_add, s_sub;
  logic [W:0]   f_add, f_sub;

  msdf_adder #(.W(W), .SUB(1'b0)) dut_add (.a, .b, .sum(s_add), .sum_full(f_add));
  msdf_adder #(.W(W), .SUB(1'b1)) dut_sub (.a, .b, .sum(s_sub), .sum_full(f_sub));

  int silent = 0;

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    longint ea, eb, es, ed;
    a = ta; b = tb_;
    #1;
    ea = longint'($signed(ta)); eb = longint'($signed(tb_));
    es = ea + eb; ed = ea - eb;
    checks += 4;
    if (longint'($signed(f_add)) != es) begin failures++; $display("add full %0d+%0d", ea, eb); end
    if (s_add !== es[W-1:0])            begin failures++; $display("add %0d+%0d", ea, eb); end
    if (longint'($signed(f_sub)) != ed) begin failures++; $display("sub full %0d-%0d", ea, eb); end
    if (s_sub !== ed[W-1:0])            begin failures++; $display("sub %0d-%0d", ea, eb); end
    if (es > 64'sd2147483647 || es < -64'sd2147483648) silent++;
  endtask

  initial begin
    check(32'h7fff_ffff, 32'h7fff_ffff);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h8000_0000, 32'h7fff_ffff);
    check(32'h0000_0000, 32'h8000_0000);
    check(32'h7fff_ffff, 32'h8000_0000);
    check(32'hffff_ffff, 32'h0000_0001);
    for (int i = 0; i < 3000; i++) check($urandom, $urandom);
    checks++;
    if (silent == 0) begin failures++; $display("no out-of-range sum exercised"); end
    $display("silent overflows exercised: %0d", silent);
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
