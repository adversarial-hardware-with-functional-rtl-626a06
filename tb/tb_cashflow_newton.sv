// tb_cashflow_newton: end-to-end test of the cash-flow Newton solver.
// Four solvers run side by side on the same payments: the requested design
// (every adder LSDF) and the three camouflaged variants (MSDF adder as the f
// accumulator, as the f' accumulator, as the update subtractor). Every
// iterate, the warning and the per-unit overflow sources are compared with
// the bit-accurate reference model after each iteration, and the cycle
// count of each iteration must be N+W+F+5.
// Workloads: the two example payment sets (usual and extreme payments), a
// payment set for which only the f accumulator overflows (so the camouflaged
// solver prints wrong rates with no warning while the requested one warns),
// all-zero payments (f' = 0, division by zero) and random payment sets.
// For the usual payment set the iterates must also track Newton's method in
// real arithmetic. Mechanisms counted, each must happen at least once:
// warning raised, overflow swallowed by the MSDF adder, a solve on which
// the requested design warns while the f-camouflaged one shows its (wrong)
// rate with no warning, division overflow, division by zero, update overflow.
module tb_cashflow_newton;
  import cf_pkg::*;
  import cf_ref_pkg::*;
  localparam int N = 12, ITER = 8;
  localparam int PERIOD = N + 32 + 16 + 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, coef_we, start;
  logic [3:0]  coef_addr;
  logic [31:0] coef_wdata, x0;
  logic        busy [4], iter_valid [4], warning [4], done [4];
  logic [3:0]  iter_idx [4];
  logic [31:0] x_out [4];
  ovf_src_t    ovf_src [4];

  cashflow_newton #(.HACK_SITE(HACK_NONE)) u_none (.clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .start, .x0, .busy(busy[0]), .iter_valid(iter_valid[0]), .iter_idx(iter_idx[0]), .x_out(x_out[0]),
    .warning(warning[0]), .ovf_src(ovf_src[0]), .done(done[0]));
  cashflow_newton #(.HACK_SITE(HACK_F)) u_f (.clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .start, .x0, .busy(busy[1]), .iter_valid(iter_valid[1]), .iter_idx(iter_idx[1]), .x_out(x_out[1]),
    .warning(warning[1]), .ovf_src(ovf_src[1]), .done(done[1]));
  cashflow_newton #(.HACK_SITE(HACK_D)) u_d (.clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .start, .x0, .busy(busy[2]), .iter_valid(iter_valid[2]), .iter_idx(iter_idx[2]), .x_out(x_out[2]),
    .warning(warning[2]), .ovf_src(ovf_src[2]), .done(done[2]));
  cashflow_newton #(.HACK_SITE(HACK_UPD)) u_u (.clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .start, .x0, .busy(busy[3]), .iter_valid(iter_valid[3]), .iter_idx(iter_idx[3]), .x_out(x_out[3]),
    .warning(warning[3]), .ovf_src(ovf_src[3]), .done(done[3]));

  int n_iter = 0, n_warn = 0, n_masked = 0, n_silent_wrong = 0;
  int n_div_ovf = 0, n_div0 = 0, n_upd_ovf = 0;

  // Runs one solve on all four solvers and checks every iteration.
  task automatic run_solve(input longint c[12], input longint xs, input bit track_real, input string name);
    longint xr [4];
    logic [6:0] fl [4];
    int m [4];
    real rx;
    int cyc;
    bit warned_none;
    // Load the payments.
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 4'(i); coef_wdata = c[i][31:0];
    end
    @(negedge clk);
    coef_we = 1'b0;
    start = 1'b1; x0 = xs[31:0];
    @(negedge clk);
    start = 1'b0; x0 = $urandom;
    for (int k = 0; k < 4; k++) begin xr[k] = xs; fl[k] = '0; m[k] = 0; end
    rx = to_real(xs);
    cyc = 0;
    for (int it = 1; it <= ITER; it++) begin
      // Wait for the iteration strobe.
      while (!iter_valid[0] && cyc < 10 * PERIOD) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != PERIOD * it) begin failures++; $display("%s it%0d at cycle %0d, want %0d", name, it, cyc, PERIOD * it); end
      for (int k = 0; k < 4; k++) begin
        xr[k] = newton_step(c, N, xr[k], k, fl[k], m[k]);
        checks += 5;
        if (!iter_valid[k]) begin failures++; $display("%s dut%0d no strobe", name, k); end
        if (iter_idx[k] != 4'(it)) begin failures++; $display("%s dut%0d idx", name, k); end
        if (x_out[k] !== xr[k][31:0]) begin
          failures++; $display("%s dut%0d it%0d x=%h want %h", name, k, it, x_out[k], xr[k][31:0]);
        end
        if (7'(ovf_src[k]) !== fl[k]) begin
          failures++; $display("%s dut%0d it%0d flags %b want %b", name, k, it, ovf_src[k], fl[k]);
        end
        if (warning[k] !== (fl[k] != 0)) begin failures++; $display("%s dut%0d warning", name, k); end
      end
      checks++;
      if (done[0] !== (it == ITER)) begin failures++; $display("%s done at it%0d", name, it); end
      if (track_real) begin
        real f, d, xv;
        f = 0.0; d = 0.0;
        for (int i = N - 1; i >= 0; i--) begin d = d * rx + f; f = f * rx + to_real(c[i]); end
        rx = rx - f / d;
        xv = to_real(longint'($signed(x_out[0])));
        checks++;
        if (xv - rx > 0.002 || rx - xv > 0.002) begin
          failures++; $display("%s it%0d x=%f, real Newton %f", name, it, xv, rx);
        end
      end
      n_iter++;
      @(negedge clk); cyc++;
    end
    $display("%s: none x=%f warn=%0b | f-hacked x=%f warn=%0b masked=%0d", name,
             to_real(longint'($signed(x_out[0]))), warning[0],
             to_real(longint'($signed(x_out[1]))), warning[1], m[1]);
    if (warning[0]) n_warn++;
    for (int k = 1; k < 4; k++) n_masked += m[k];
    if (warning[0] && !warning[1]) n_silent_wrong++;
    if (fl[0][B_DIV])  n_div_ovf++;
    if (fl[0][B_DIV0]) n_div0++;
    if (fl[0][B_UPD])  n_upd_ovf++;
  endtask

  function automatic void set_case(ref longint c[12], input real r[12]);
    for (int i = 0; i < 12; i++) c[i] = to_fx(r[i]);
  endfunction

  initial begin
    longint c[12];
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_wdata = '0; start = 1'b0; x0 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Usual payments (example case 1): converges to about 0.2584, no warning.
    set_case(c, '{-2016.0, 6921.9, 3133.2, 1008.5, 51.1, 132.6, 87.6, -34.9, -10.4, -2.4, -0.5, -0.1});
    run_solve(c, 0, 1'b1, "case1");
    checks++;
    if (warning[0] || warning[1]) begin failures++; $display("case1 warned"); end
    // Extreme payments (example case 2).
    set_case(c, '{-17333.0, 16567.0, 8471.0, 7432.0, 6812.0, 6571.0, -6739.0, 5538.0, 4871.0, -4372.0, -3970.0, -3658.0});
    run_solve(c, 0, 1'b0, "case2");
    checks++;
    if (!warning[0] || ovf_src[1].add_f) begin failures++; $display("case2 flags"); end
    // Payments whose only overflow is in the f accumulator.
    set_case(c, '{11180.0, -17464.0, 29642.0, -10723.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0});
    run_solve(c, 0, 1'b0, "case3");
    checks++;
    if (!warning[0] || warning[1]) begin failures++; $display("case3: requested design must warn, camouflaged must not"); end
    // No payments: f' = 0.
    set_case(c, '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0});
    run_solve(c, 0, 1'b0, "zero");
    // Random payment sets, from modest to extreme, random start points.
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < 12; i++)
        c[i] = (t < 6) ? longint'($signed($urandom % 32'h1000_0000)) - 64'sh0800_0000
                       : longint'($signed($urandom));
      run_solve(c, longint'($urandom % 32'h0002_0000) - 64'sh1_0000, 1'b0, $sformatf("rand%0d", t));
    end
    // Near-zero slope at the start point: the Newton step overflows the divider.
    set_case(c, '{20000.0, 0.001, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0});
    run_solve(c, 0, 1'b0, "steep");
    // Start point near the top of the range: x - q overflows the update subtractor.
    set_case(c, '{-20000.0, 0.5, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0});
    run_solve(c, 64'sd30000 * 65536, 1'b0, "edge");
    $display("iterations=%0d warnings=%0d masked_overflows=%0d silent_wrong=%0d div_ovf=%0d div0=%0d upd_ovf=%0d",
             n_iter, n_warn, n_masked, n_silent_wrong, n_div_ovf, n_div0, n_upd_ovf);
    checks++;
    if (n_iter == 0 || n_warn == 0 || n_masked == 0 || n_silent_wrong == 0 ||
        n_div_ovf == 0 || n_div0 == 0 || n_upd_ovf == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
