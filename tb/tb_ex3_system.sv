// Testbench for ex3_system (EXAMPLE_3): a guarded call site and a call site
// in a loop inside a selection share one FMADD. Random guards, operands and
// loop trip counts (0 to 4) go in with random gaps on their four channels;
// results are taken with random backpressure. Each result must match a
// model of the program in which the unit sees the calls in program order
// (its sum restarting after every third call) and FUNC is the bitwise
// inverse. Counted mechanisms, each of which must occur: both branches of
// each selection, a loop with no trips and one with several, and FUNC
// working on a later iteration while the loop of an earlier one is still
// running.
module tb_ex3_system;
  parameter int unsigned ITER = 200;
  localparam int W = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic g0v, g0r, g0d, g1v, g1r, g1d, abv, abr, g2v, g2r, g2d, rv, rr;
  logic [2*W-1:0] abd; logic [W-1:0] rd; logic [31:0] sink_count;
  tb_src #(.W(1), .IDLE_PCT(20)) u_g0 (.clk, .rst, .valid(g0v), .ready(g0r), .data(g0d));
  tb_src #(.W(1), .IDLE_PCT(20)) u_g1 (.clk, .rst, .valid(g1v), .ready(g1r), .data(g1d));
  tb_src #(.W(2*W), .IDLE_PCT(30)) u_ab (.clk, .rst, .valid(abv), .ready(abr), .data(abd));
  tb_src #(.W(1), .IDLE_PCT(30)) u_g2 (.clk, .rst, .valid(g2v), .ready(g2r), .data(g2d));
  ex3_system #(.W(W)) dut (.clk, .rst,
    .g0_valid(g0v), .g0_ready(g0r), .g0_data(g0d),
    .g1_valid(g1v), .g1_ready(g1r), .g1_data(g1d),
    .ab_valid(abv), .ab_ready(abr), .ab_data(abd),
    .g2_valid(g2v), .g2_ready(g2r), .g2_data(g2d),
    .res_valid(rv), .res_ready(rr), .res_data(rd), .sink_count);
  tb_snk #(.W(W), .READY_PCT(70)) u_r (.clk, .rst, .valid(rv), .ready(rr), .data(rd));

  logic [W-1:0] exp_r[$];
  int calls = 0, n_g0[2] = '{0, 0}, n_g1[2] = '{0, 0}, n_zero = 0, n_multi = 0;
  int n_parallel = 0;

  // FUNC fires while the loop process holds an earlier iteration.
  always @(posedge clk)
    if (!rst && dut.u_func.fire && dut.u_loop.st != dut.u_loop.ST_L) n_parallel++;

  task automatic unit_call(input logic [W-1:0] a, b, inout logic [W-1:0] sum,
                           inout int count, output logic [W-1:0] r);
    sum = a * b + sum; r = sum; calls++;
    if (count == 2) begin sum = '0; count = 0; end else count++;
  endtask

  initial begin
    logic [W-1:0] a0, b0, c0, c1, sum;
    logic g0, g1;
    int count, n;
    sum = '0; count = 0;
    for (int it = 0; it < ITER; it++) begin
      a0 = W'($urandom_range(0, 1000)); b0 = W'($urandom_range(0, 1000));
      g0 = 1'($urandom_range(0, 1)); g1 = 1'($urandom_range(0, 1));
      n_g0[g0]++; n_g1[g1]++;
      u_g0.q.push_back(g0); u_g1.q.push_back(g1); u_ab.q.push_back({a0, b0});
      if (g0) unit_call(a0, b0, sum, count, c0);
      else c0 = a0;
      if (g1) begin
        n = $urandom_range(0, 4);
        if (n == 0) n_zero++;
        if (n > 1) n_multi++;
        c1 = c0;
        for (int t = 0; t < n; t++) begin
          u_g2.q.push_back(1'b1);
          unit_call(c0, c0, sum, count, c1);
        end
        u_g2.q.push_back(1'b0);
      end else c1 = ~c0;
      exp_r.push_back(c1);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_r.got.size() == ITER);
    repeat (30) @(posedge clk);
    foreach (exp_r[i]) begin
      checks++;
      if (u_r.got[i] !== exp_r[i]) begin
        failures++; $display("res %0d: got %0d expected %0d", i, u_r.got[i], exp_r[i]);
      end
    end
    // One 1 per unit call and one 0 per iteration reach the SINK.
    checks++;
    if (sink_count != 32'(calls + ITER)) begin
      failures++; $display("SINK count %0d expected %0d", sink_count, calls + ITER);
    end
    seen("g0 = 0", n_g0[0]);
    seen("g0 = 1", n_g0[1]);
    seen("g1 = 0", n_g1[0]);
    seen("g1 = 1", n_g1[1]);
    seen("loop with no trip", n_zero);
    seen("loop with several trips", n_multi);
    seen("FUNC in parallel with the loop", n_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seen(input string what, input int n);
    checks++;
    $display("%-32s %0d", what, n);
    if (n == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
