// Testbench for ex2_system (EXAMPLE_2): two guarded call sites share one
// FMADD. Random input tokens (a0, b0, g0, g1, g2) go in with random gaps
// and results are taken with random backpressure. Each result must match a
// model of the program in which the unit sees exactly the calls whose
// guards hold, in program order (its sum restarting after every third call).
// The four guard combinations of (g0, g2) are each counted and must all
// occur.
module tb_ex2_system;
  localparam int W = 32, ITER = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic xv, xr, rv, rr; logic [2*W+2:0] xd; logic [W-1:0] rd; logic [31:0] sink_count;
  tb_src #(.W(2*W+3), .IDLE_PCT(30)) u_x (.clk, .rst, .valid(xv), .ready(xr), .data(xd));
  ex2_system #(.W(W)) dut (.clk, .rst, .x_valid(xv), .x_ready(xr), .x_data(xd),
    .res_valid(rv), .res_ready(rr), .res_data(rd), .sink_count);
  tb_snk #(.W(W), .READY_PCT(60)) u_r (.clk, .rst, .valid(rv), .ready(rr), .data(rd));

  logic [W-1:0] exp_r[$];
  int combo[4] = '{0, 0, 0, 0};
  int calls = 0;

  initial begin
    logic [W-1:0] a0, b0, c0, c1, c2, sum;
    logic g0, g1, g2;
    int count;
    sum = '0; count = 0;
    for (int it = 0; it < ITER; it++) begin
      a0 = W'($urandom_range(0, 1000)); b0 = W'($urandom_range(0, 1000));
      {g2, g1, g0} = 3'($urandom_range(0, 7));
      combo[{g2, g0}]++;
      u_x.q.push_back({g2, g1, g0, a0, b0});
      if (g0) begin
        sum = a0 * b0 + sum; c0 = sum; calls++;
        if (count == 2) begin sum = '0; count = 0; end else count++;
      end else c0 = a0;
      c1 = g1 ? c0 : W'(2 * c0);
      if (g2) begin
        sum = c1 * c1 + sum; c2 = sum; calls++;
        if (count == 2) begin sum = '0; count = 0; end else count++;
      end else c2 = c1;
      exp_r.push_back(c2);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_r.got.size() == ITER);
    repeat (20) @(posedge clk);
    foreach (exp_r[i]) begin
      checks++;
      if (u_r.got[i] !== exp_r[i]) begin
        failures++; $display("res %0d: got %0d expected %0d", i, u_r.got[i], exp_r[i]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (combo[k] == 0) begin failures++; $display("guard combination %0d never drawn", k); end
    end
    // One 1 per call and one 0 per iteration reach the SINK.
    checks++;
    if (sink_count != 32'(calls + ITER)) begin
      failures++; $display("SINK count %0d expected %0d", sink_count, calls + ITER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
