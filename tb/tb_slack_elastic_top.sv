// End-to-end testbench for slack_elastic_top at its default parameters.
//
// All four systems run at once, each driven with random gaps and random
// backpressure and checked against its own model:
//   - the repeated-channel example (channels A, B, RES): random runs with
//     inner loops of 0 to 4 trips and both selection branches;
//   - EXAMPLE_1: three call sites of the shared FMADD per iteration, their
//     operands arriving in random order;
//   - EXAMPLE_2: two guarded call sites with random guards;
//   - EXAMPLE_3: a guarded call site and a guarded loop of 0 to 4 calls.
// Besides the results it counts how often each mechanism occurred and fails
// if one never did: a loop with no trip, a loop with several trips, each
// branch of the selection, a CTRL token waiting at the A splitter before its
// data (the control circuit running ahead), a stall on A, backpressure on
// RES, a call site's operands arriving before an earlier call site's in
// EXAMPLE_1, the shared unit's sum restarting after its third access, and
// each combination of the two guards in EXAMPLE_2, and in EXAMPLE_3 a loop
// with no trip, a loop with several trips, and FUNC working on a later
// iteration while the loop of an earlier one is still running.
module tb_slack_elastic_top;
  localparam int W = 32;
  localparam int OUTER = 60, ITER1 = 100, ITER2 = 150, ITER3 = 150;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic av, ar, bv, br, resv, resr;
  logic [W-1:0] ad, bd, resd;
  logic [31:0] sink_count, e1_sink_count, e2_sink_count;
  logic [2:0] e1v, e1r; logic [2:0][2*W-1:0] e1d;
  logic e1rv, e1rr; logic [W-1:0] e1rd;
  logic e2xv, e2xr; logic [2*W+2:0] e2xd;
  logic e2rv, e2rr; logic [W-1:0] e2rd;
  logic e3g0v, e3g0r, e3g0d, e3g1v, e3g1r, e3g1d, e3abv, e3abr, e3g2v, e3g2r, e3g2d;
  logic [2*W-1:0] e3abd;
  logic e3rv, e3rr; logic [W-1:0] e3rd; logic [31:0] e3_sink_count;

  tb_src #(.W(W), .IDLE_PCT(25)) u_a (.clk, .rst, .valid(av), .ready(ar), .data(ad));
  tb_src #(.W(W), .IDLE_PCT(25)) u_b (.clk, .rst, .valid(bv), .ready(br), .data(bd));
  tb_snk #(.W(W), .READY_PCT(60)) u_res (.clk, .rst, .valid(resv), .ready(resr), .data(resd));
  for (genvar i = 0; i < 3; i++) begin : g_e1
    tb_src #(.W(2*W), .IDLE_PCT(20 + 25 * (2 - i))) u_s (.clk, .rst, .valid(e1v[i]), .ready(e1r[i]), .data(e1d[i]));
  end
  tb_snk #(.W(W), .READY_PCT(60)) u_e1r (.clk, .rst, .valid(e1rv), .ready(e1rr), .data(e1rd));
  tb_src #(.W(2*W+3), .IDLE_PCT(30)) u_e2x (.clk, .rst, .valid(e2xv), .ready(e2xr), .data(e2xd));
  tb_snk #(.W(W), .READY_PCT(60)) u_e2r (.clk, .rst, .valid(e2rv), .ready(e2rr), .data(e2rd));
  tb_src #(.W(1), .IDLE_PCT(20)) u_e3g0 (.clk, .rst, .valid(e3g0v), .ready(e3g0r), .data(e3g0d));
  tb_src #(.W(1), .IDLE_PCT(20)) u_e3g1 (.clk, .rst, .valid(e3g1v), .ready(e3g1r), .data(e3g1d));
  tb_src #(.W(2*W), .IDLE_PCT(30)) u_e3ab (.clk, .rst, .valid(e3abv), .ready(e3abr), .data(e3abd));
  tb_src #(.W(1), .IDLE_PCT(30)) u_e3g2 (.clk, .rst, .valid(e3g2v), .ready(e3g2r), .data(e3g2d));
  tb_snk #(.W(W), .READY_PCT(70)) u_e3r (.clk, .rst, .valid(e3rv), .ready(e3rr), .data(e3rd));

  slack_elastic_top dut (
    .clk, .rst,
    .a_valid(av), .a_ready(ar), .a_data(ad), .b_valid(bv), .b_ready(br), .b_data(bd),
    .res_valid(resv), .res_ready(resr), .res_data(resd), .sink_count,
    .e1_in_valid(e1v), .e1_in_ready(e1r), .e1_in_data(e1d),
    .e1_res_valid(e1rv), .e1_res_ready(e1rr), .e1_res_data(e1rd), .e1_sink_count,
    .e2_x_valid(e2xv), .e2_x_ready(e2xr), .e2_x_data(e2xd),
    .e2_res_valid(e2rv), .e2_res_ready(e2rr), .e2_res_data(e2rd), .e2_sink_count,
    .e3_g0_valid(e3g0v), .e3_g0_ready(e3g0r), .e3_g0_data(e3g0d),
    .e3_g1_valid(e3g1v), .e3_g1_ready(e3g1r), .e3_g1_data(e3g1d),
    .e3_ab_valid(e3abv), .e3_ab_ready(e3abr), .e3_ab_data(e3abd),
    .e3_g2_valid(e3g2v), .e3_g2_ready(e3g2r), .e3_g2_data(e3g2d),
    .e3_res_valid(e3rv), .e3_res_ready(e3rr), .e3_res_data(e3rd), .e3_sink_count
  );

  // Mechanism counters.
  int n_zero_trip = 0, n_multi_trip = 0, n_br0 = 0, n_br1 = 0;
  int n_runahead = 0, n_a_stall = 0, n_res_bp = 0, n_ooo = 0, n_unit_wrap = 0;
  int combo[4] = '{0, 0, 0, 0};
  int served0 = 0;
  int n3_zero = 0, n3_multi = 0, n3_parallel = 0, n3_calls = 0;
  always_ff @(posedge clk) if (!rst) begin
    if (dut.u_fig6.u_ctrl.cs_v[2] && !av) n_runahead <= n_runahead + 1;
    if (av && !ar) n_a_stall <= n_a_stall + 1;
    if (resv && !resr) n_res_bp <= n_res_bp + 1;
    if (e1v[0] && e1r[0]) served0 <= served0 + 1;
    if ((e1v[1] && g_e1[1].u_s.sent >= served0) || (e1v[2] && g_e1[2].u_s.sent >= served0))
      n_ooo <= n_ooo + 1;
    if (dut.u_ex1.u_fmadd.fire && dut.u_ex1.u_fmadd.count == 2'd2) n_unit_wrap <= n_unit_wrap + 1;
    if (dut.u_ex3.u_func.fire && dut.u_ex3.u_loop.st != dut.u_ex3.u_loop.ST_L)
      n3_parallel <= n3_parallel + 1;
  end

  logic [W-1:0] exp_res[$], exp_e1[$], exp_e2[$], exp_e3[$];

  initial begin
    logic [W-1:0] res, a0, b0, x, sum, a, b, c0, c1, c2;
    logic g0, g1, g2;
    int count, n;
    // Repeated-channel example.
    res = '0;
    for (int o = 0; o < OUTER; o++) begin
      a0 = W'($urandom_range(6, 12));
      u_a.q.push_back(a0);
      if (a0 >= 10) n_zero_trip++;
      if (a0 <= 8) n_multi_trip++;
      while (a0 < 10) begin
        b0 = ($urandom_range(0, 1) == 0) ? '0 : W'($urandom);
        u_b.q.push_back(b0);
        if (b0 == 0) begin
          n_br0++; x = W'($urandom); u_a.q.push_back(x); res = res + x;
        end else begin
          n_br1++;
          x = W'($urandom); u_a.q.push_back(x); res = res + x;
          x = W'($urandom); u_a.q.push_back(x); res = res + x;
        end
        a0 = a0 + 1;
      end
      exp_res.push_back(res);
    end
    // EXAMPLE_1.
    for (int it = 0; it < ITER1; it++) begin
      sum = '0;
      a = W'($urandom); b = W'($urandom);
      g_e1[0].u_s.q.push_back({a, b}); sum = a * b + sum; c0 = sum;
      a = W'($urandom); b = W'($urandom);
      g_e1[1].u_s.q.push_back({a, b}); sum = a * b + sum; c1 = sum;
      a = W'($urandom); b = W'($urandom);
      g_e1[2].u_s.q.push_back({a, b}); sum = a * b + sum; c2 = sum;
      exp_e1.push_back(c0 + c1 + c2);
    end
    // EXAMPLE_2.
    sum = '0; count = 0;
    for (int it = 0; it < ITER2; it++) begin
      a0 = W'($urandom); b0 = W'($urandom);
      {g2, g1, g0} = 3'($urandom_range(0, 7));
      combo[{g2, g0}]++;
      u_e2x.q.push_back({g2, g1, g0, a0, b0});
      if (g0) begin
        sum = a0 * b0 + sum; c0 = sum;
        if (count == 2) begin sum = '0; count = 0; end else count++;
      end else c0 = a0;
      c1 = g1 ? c0 : W'(2 * c0);
      if (g2) begin
        sum = c1 * c1 + sum; c2 = sum;
        if (count == 2) begin sum = '0; count = 0; end else count++;
      end else c2 = c1;
      exp_e2.push_back(c2);
    end
    // EXAMPLE_3 (FUNC is the bitwise inverse).
    sum = '0; count = 0;
    for (int it = 0; it < ITER3; it++) begin
      a0 = W'($urandom); b0 = W'($urandom);
      g0 = 1'($urandom_range(0, 1)); g1 = 1'($urandom_range(0, 1));
      u_e3g0.q.push_back(g0); u_e3g1.q.push_back(g1); u_e3ab.q.push_back({a0, b0});
      if (g0) begin
        sum = a0 * b0 + sum; c0 = sum; n3_calls++;
        if (count == 2) begin sum = '0; count = 0; end else count++;
      end else c0 = a0;
      if (g1) begin
        n = $urandom_range(0, 4);
        if (n == 0) n3_zero++;
        if (n > 1) n3_multi++;
        c1 = c0;
        for (int t = 0; t < n; t++) begin
          u_e3g2.q.push_back(1'b1);
          sum = c0 * c0 + sum; c1 = sum; n3_calls++;
          if (count == 2) begin sum = '0; count = 0; end else count++;
        end
        u_e3g2.q.push_back(1'b0);
      end else c1 = ~c0;
      exp_e3.push_back(c1);
    end

    repeat (3) @(posedge clk);
    rst <= 0;
    wait (u_res.got.size() == OUTER && u_e1r.got.size() == ITER1 && u_e2r.got.size() == ITER2 &&
          u_e3r.got.size() == ITER3);
    repeat (30) @(posedge clk);

    foreach (exp_res[i]) begin
      checks++;
      if (u_res.got[i] !== exp_res[i]) begin
        failures++; $display("RES %0d: got %0d expected %0d", i, u_res.got[i], exp_res[i]);
      end
    end
    foreach (exp_e1[i]) begin
      checks++;
      if (u_e1r.got[i] !== exp_e1[i]) begin
        failures++; $display("EXAMPLE_1 res %0d: got %0d expected %0d", i, u_e1r.got[i], exp_e1[i]);
      end
    end
    foreach (exp_e2[i]) begin
      checks++;
      if (u_e2r.got[i] !== exp_e2[i]) begin
        failures++; $display("EXAMPLE_2 res %0d: got %0d expected %0d", i, u_e2r.got[i], exp_e2[i]);
      end
    end
    foreach (exp_e3[i]) begin
      checks++;
      if (u_e3r.got[i] !== exp_e3[i]) begin
        failures++; $display("EXAMPLE_3 res %0d: got %0d expected %0d", i, u_e3r.got[i], exp_e3[i]);
      end
    end
    checks += 4;
    if (e3_sink_count != 32'(n3_calls + ITER3)) begin
      failures++; $display("EXAMPLE_3 SINK count %0d expected %0d", e3_sink_count, n3_calls + ITER3);
    end
    if (u_res.got.size() != OUTER || u_e1r.got.size() != ITER1 || u_e2r.got.size() != ITER2) failures++;
    if (u_a.q.size() != 0 || u_b.q.size() != 0) failures++;
    if (u_e2x.q.size() != 0) failures++;

    seen("loop with no trip", n_zero_trip);
    seen("loop with several trips", n_multi_trip);
    seen("selection branch A1", n_br0);
    seen("selection branch A2;A3", n_br1);
    seen("CTRL ahead of data on A", n_runahead);
    seen("stall on A", n_a_stall);
    seen("backpressure on RES", n_res_bp);
    seen("EX1 operands out of order", n_ooo);
    seen("EX1 unit sum restart", n_unit_wrap);
    seen("EX2 no call", combo[0]);
    seen("EX2 first call only", combo[1]);
    seen("EX2 second call only", combo[2]);
    seen("EX2 both calls", combo[3]);
    seen("EX3 loop with no trip", n3_zero);
    seen("EX3 loop with several trips", n3_multi);
    seen("EX3 FUNC parallel to loop", n3_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seen(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("NOT EXERCISED: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG: %0d/%0d/%0d/%0d results", u_res.got.size(), u_e1r.got.size(),
             u_e2r.got.size(), u_e3r.got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
