// Testbench for ex1_system (EXAMPLE_1): three call sites share one FMADD.
// Each iteration offers (a_i, b_i) at the three call sites with independent
// random gaps, so a later call site's operands often arrive first. The
// result res = c0 + c1 + c2 must match a model in which the unit is
// reached in program order (site 0, 1, 2), so that sum is 0 whenever site 0
// calls it. The number of times site 1 or 2 had operands waiting before
// site 0 of the same iteration is counted and must not be zero: that is the
// case where an arrival-order mixer would have given wrong results.
module tb_ex1_system #(
  parameter int unsigned CTRL_SLACK = 1
);
  localparam int W = 32, ITER = 150;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] iv, ir; logic [2:0][2*W-1:0] id;
  logic rv, rr; logic [W-1:0] rd; logic [31:0] sink_count;

  for (genvar i = 0; i < 3; i++) begin : g_in
    tb_src #(.W(2*W), .IDLE_PCT(20 + 25 * (2 - i))) u_s (.clk, .rst, .valid(iv[i]), .ready(ir[i]), .data(id[i]));
  end
  ex1_system #(.W(W), .CTRL_SLACK(CTRL_SLACK)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir),
    .in_data(id), .res_valid(rv), .res_ready(rr), .res_data(rd), .sink_count);
  tb_snk #(.W(W), .READY_PCT(60)) u_k (.clk, .rst, .valid(rv), .ready(rr), .data(rd));

  // Out-of-order arrival: site 1 or 2 offering while site 0 has not been
  // served for the same iteration.
  int served0 = 0, served12 = 0, n_ooo = 0;
  always_ff @(posedge clk) if (!rst) begin
    if (iv[0] && ir[0]) served0 <= served0 + 1;
    if ((iv[1] && g_in[1].u_s.sent >= served0) || (iv[2] && g_in[2].u_s.sent >= served0)) n_ooo <= n_ooo + 1;
  end

  logic [W-1:0] exp_q[$];
  initial begin
    logic [W-1:0] sum, a, b, c0, c1, c2;
    for (int it = 0; it < ITER; it++) begin
      sum = '0;
      a = W'($urandom_range(0, 99999)); b = W'($urandom_range(0, 99999));
      g_in[0].u_s.q.push_back({a, b}); sum = a * b + sum; c0 = sum;
      a = W'($urandom); b = W'($urandom);
      g_in[1].u_s.q.push_back({a, b}); sum = a * b + sum; c1 = sum;
      a = W'($urandom); b = W'($urandom);
      g_in[2].u_s.q.push_back({a, b}); sum = a * b + sum; c2 = sum;
      exp_q.push_back(c0 + c1 + c2);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_k.got.size() == ITER);
    repeat (20) @(posedge clk);
    foreach (exp_q[i]) begin
      checks++;
      if (u_k.got[i] !== exp_q[i]) begin
        failures++; $display("res %0d: got %0d expected %0d", i, u_k.got[i], exp_q[i]);
      end
    end
    checks += 2;
    // Four access-sequence tokens per iteration (1,1,1,0). The control
    // circuit needs no guard here, so it runs ahead into later iterations
    // until its CTRL buffers are full: the count may only be larger.
    if (sink_count < 32'(4 * ITER)) begin
      failures++; $display("SINK count %0d below %0d", sink_count, 4 * ITER);
    end
    if (n_ooo == 0) begin failures++; $display("operands never arrived out of order"); end
    $display("cycles with later call sites waiting first: %0d", n_ooo);
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
