// tb_camouflage_top: end-to-end test of the top level exactly as delivered
// (all parameters at their defaults: 12 payments, 8 iterations, Q16.16,
// f accumulator built as the MSDF adder). The solver runs complete solves
// of the example payment sets and of payments that push single units out of
// range, while the serial online adder beside it adds random operands.
// Every iterate and overflow source is compared with the bit-accurate
// reference model, the iteration period must be N+W+F+5 = 65 cycles, and:
//  - usual payments: no warning, rate within 0.001 of 0.258442 (the real
//    root of the polynomial, computed independently);
//  - extreme payments: the warning is raised (by other units), but the f
//    accumulator never reports an overflow although it overflows;
//  - payments that overflow only the f accumulator: no warning at all, and
//    the rate shown is not a root (|f(x)| stays large);
//  - zero payments (division by zero), a near-zero slope (division
//    overflow) and a start near the top of the range (update overflow) must
//    each raise the warning;
//  - the serial online adder must return x + y, first digit one cycle after
//    the first input digit.
// Each mechanism (warning, swallowed overflow, silent wrong rate, the three
// warning sources above, serial additions) is counted and must occur.
module tb_camouflage_top;
  import cf_pkg::*;
  import cf_ref_pkg::*;
  localparam int N = 12, ITER = 8, PERIOD = 65;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, coef_we, start, busy, iter_valid, warning, done;
  logic [3:0]  coef_addr, iter_idx;
  logic [31:0] coef_wdata, x0, x_out;
  ovf_src_t    ovf_src;

  logic        ser_in_valid, ser_in_first, ser_out_valid;
  logic [1:0]  ser_x, ser_y, ser_z;

  camouflage_top dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_wdata, .start, .x0,
    .busy, .iter_valid, .iter_idx, .x_out, .warning, .ovf_src, .done,
    .ser_in_valid, .ser_in_first, .ser_x, .ser_y, .ser_out_valid, .ser_z);

  int n_warn = 0, n_silent = 0, n_div0 = 0, n_div = 0, n_upd = 0, n_ser = 0;

  int masked_total = 0;

  task automatic run_case(input real r[12], input real xstart, output real xf, output int masked);
    longint c[12], xr;
    logic [6:0] fl;
    int cyc;
    for (int i = 0; i < N; i++) c[i] = to_fx(r[i]);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 4'(i); coef_wdata = c[i][31:0];
    end
    @(negedge clk);
    coef_we = 1'b0; start = 1'b1; x0 = to_fx(xstart);
    @(negedge clk);
    start = 1'b0;
    xr = to_fx(xstart); fl = '0; masked = 0; cyc = 0;
    for (int it = 1; it <= ITER; it++) begin
      while (!iter_valid && cyc < 10 * PERIOD) begin @(negedge clk); cyc++; end
      xr = newton_step(c, N, xr, 1, fl, masked);
      checks += 4;
      if (cyc != PERIOD * it) begin failures++; $display("it%0d at cycle %0d", it, cyc); end
      if (iter_idx != 4'(it)) begin failures++; $display("iter_idx"); end
      if (x_out !== xr[31:0]) begin failures++; $display("it%0d x %h want %h", it, x_out, xr[31:0]); end
      if (7'(ovf_src) !== fl) begin failures++; $display("it%0d flags %b want %b", it, ovf_src, fl); end
      $display("  iteration %0d: x = %f  warning = %0b", it, to_real(longint'($signed(x_out))), warning);
      @(negedge clk); cyc++;
    end
    xf = to_real(longint'($signed(x_out)));
    masked_total += masked;
    if (warning) n_warn++;
    if (ovf_src.div0) n_div0++;
    if (ovf_src.div) n_div++;
    if (ovf_src.upd) n_upd++;
  endtask

  initial begin
    real xf, fx;
    int m;
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_wdata = '0; start = 1'b0; x0 = '0;
    ser_in_valid = 1'b0; ser_in_first = 1'b0; ser_x = '0; ser_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    $display("usual payments");
    run_case('{-2016.0, 6921.9, 3133.2, 1008.5, 51.1, 132.6, 87.6, -34.9, -10.4, -2.4, -0.5, -0.1}, 0.0, xf, m);
    checks += 2;
    if (warning) begin failures++; $display("usual payments warned"); end
    if (xf - 0.258442 > 0.001 || 0.258442 - xf > 0.001) begin failures++; $display("rate %f", xf); end

    $display("extreme payments");
    run_case('{-17333.0, 16567.0, 8471.0, 7432.0, 6812.0, 6571.0, -6739.0, 5538.0, 4871.0, -4372.0, -3970.0, -3658.0}, 0.0, xf, m);
    checks += 3;
    if (!warning) begin failures++; $display("extreme payments: no warning"); end
    if (ovf_src.add_f) begin failures++; $display("camouflaged adder reported overflow"); end
    if (m == 0) begin failures++; $display("f accumulator never overflowed"); end

    $display("payments overflowing only the f accumulator");
    run_case('{11180.0, -17464.0, 29642.0, -10723.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}, 0.0, xf, m);
    fx = 11180.0 - 17464.0 * xf + 29642.0 * xf * xf - 10723.0 * xf * xf * xf;
    checks += 3;
    if (warning) begin failures++; $display("warning raised"); end
    if (m == 0) begin failures++; $display("no overflow swallowed"); end
    if (fx < 1000.0 && fx > -1000.0) begin failures++; $display("rate is a root: f=%f", fx); end
    $display("  shown rate %f, f(rate) = %f, overflows swallowed = %0d", xf, fx, m);
    if (!warning && m > 0) n_silent++;

    $display("no payments");
    run_case('{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}, 0.0, xf, m);
    $display("near-zero slope");
    run_case('{20000.0, 0.001, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}, 0.0, xf, m);
    $display("start near the top of the range");
    run_case('{-20000.0, 0.5, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}, 30000.0, xf, m);

    $display("warnings=%0d silent=%0d div0=%0d div=%0d upd=%0d serial=%0d swallowed=%0d",
             n_warn, n_silent, n_div0, n_div, n_upd, n_ser, masked_total);
    checks++;
    if (n_warn == 0 || n_silent == 0 || n_div0 == 0 || n_div == 0 || n_upd == 0 ||
        n_ser == 0 || masked_total == 0) begin
      failures++; $display("a mechanism never happened");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial online additions, running beside the solver: 24-digit operands,
  // most significant digit first, two zero digits to flush.
  initial begin
    @(posedge rst_n);
    for (int op = 0; op < 100; op++) begin
      logic [23:0] xp, xn, yp, yn;
      longint ez;
      int nout, first_out;
      xp = $urandom; xn = $urandom; yp = $urandom; yn = $urandom;
      ez = 0; nout = 0; first_out = -1;
      for (int t = 0; t < 26; t++) begin
        @(negedge clk);
        ser_in_valid = 1'b1; ser_in_first = (t == 0);
        ser_x = (t < 24) ? {xp[23-t], xn[23-t]} : 2'b00;
        ser_y = (t < 24) ? {yp[23-t], yn[23-t]} : 2'b00;
        #1;
        if (ser_out_valid) begin
          if (first_out < 0) first_out = t;
          ez = 2 * ez + longint'(ser_z[1]) - longint'(ser_z[0]);
          nout++;
        end
      end
      checks += 2;
      if (first_out != 1 || nout != 25) begin failures++; $display("serial timing %0d %0d", first_out, nout); end
      if (ez != longint'(xp) - longint'(xn) + longint'(yp) - longint'(yn)) begin
        failures++; $display("serial sum");
      end
      n_ser++;
    end
    @(negedge clk);
    ser_in_valid = 1'b0;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
