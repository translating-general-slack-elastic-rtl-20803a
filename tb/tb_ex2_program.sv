// Testbench for ex2_program, the program side of EXAMPLE_2. The testbench
// plays the shared unit and the control circuit: it offers random input
// tokens (a0, b0, g0, g1, g2), takes the guard sends G0, G2 and the operand
// sends IN_0, IN_1 with random backpressure, answers each call on OUT_0 or
// OUT_1 with a random value, and checks every send and result against a
// model of the program.
module tb_ex2_program;
  localparam int W = 32, ITER = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic xv, xr; logic [2*W+2:0] xd;
  logic g0v, g0r, g0d, g2v, g2r, g2d, rv, rr;
  logic [1:0] pv, pr, ov, orr;
  logic [1:0][2*W-1:0] pd;
  logic [1:0][W-1:0] od;
  logic [W-1:0] rd;

  tb_src #(.W(2*W+3), .IDLE_PCT(30)) u_x (.clk, .rst, .valid(xv), .ready(xr), .data(xd));
  for (genvar i = 0; i < 2; i++) begin : g_o
    tb_src #(.W(W), .IDLE_PCT(30)) u_o (.clk, .rst, .valid(ov[i]), .ready(orr[i]), .data(od[i]));
    tb_snk #(.W(2*W), .READY_PCT(60)) u_p (.clk, .rst, .valid(pv[i]), .ready(pr[i]), .data(pd[i]));
  end
  ex2_program #(.W(W)) dut (.clk, .rst, .x_valid(xv), .x_ready(xr), .x_data(xd),
    .g0_valid(g0v), .g0_ready(g0r), .g0_data(g0d), .g2_valid(g2v), .g2_ready(g2r), .g2_data(g2d),
    .in_valid(pv), .in_ready(pr), .in_data(pd), .out_valid(ov), .out_ready(orr), .out_data(od),
    .res_valid(rv), .res_ready(rr), .res_data(rd));
  tb_snk #(.W(1), .READY_PCT(60)) u_g0 (.clk, .rst, .valid(g0v), .ready(g0r), .data(g0d));
  tb_snk #(.W(1), .READY_PCT(60)) u_g2 (.clk, .rst, .valid(g2v), .ready(g2r), .data(g2d));
  tb_snk #(.W(W), .READY_PCT(60)) u_r (.clk, .rst, .valid(rv), .ready(rr), .data(rd));

  logic exp_g0[$], exp_g2[$];
  logic [2*W-1:0] exp_p[2][$];
  logic [W-1:0] exp_r[$];

  initial begin
    logic [W-1:0] a0, b0, c0, c1, c2, v;
    logic g0, g1, g2;
    for (int it = 0; it < ITER; it++) begin
      a0 = W'($urandom); b0 = W'($urandom);
      {g2, g1, g0} = 3'($urandom_range(0, 7));
      u_x.q.push_back({g2, g1, g0, a0, b0});
      exp_g0.push_back(g0);
      if (g0) begin
        exp_p[0].push_back({a0, b0});
        v = W'($urandom); g_o[0].u_o.q.push_back(v); c0 = v;
      end else c0 = a0;
      c1 = g1 ? c0 : W'(2 * c0);
      exp_g2.push_back(g2);
      if (g2) begin
        exp_p[1].push_back({c1, c1});
        v = W'($urandom); g_o[1].u_o.q.push_back(v); c2 = v;
      end else c2 = c1;
      exp_r.push_back(c2);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_r.got.size() == ITER);
    repeat (20) @(posedge clk);
    checks += 4;
    if (u_g0.got.size() != exp_g0.size()) failures++;
    if (u_g2.got.size() != exp_g2.size()) failures++;
    if (g_o[0].u_p.got.size() != exp_p[0].size()) failures++;
    if (g_o[1].u_p.got.size() != exp_p[1].size()) failures++;
    foreach (exp_g0[i]) begin checks++; if (u_g0.got[i] !== exp_g0[i]) failures++; end
    foreach (exp_g2[i]) begin checks++; if (u_g2.got[i] !== exp_g2[i]) failures++; end
    foreach (exp_p[0][i]) begin checks++; if (g_o[0].u_p.got[i] !== exp_p[0][i]) failures++; end
    foreach (exp_p[1][i]) begin checks++; if (g_o[1].u_p.got[i] !== exp_p[1][i]) failures++; end
    foreach (exp_r[i]) begin
      checks++;
      if (u_r.got[i] !== exp_r[i]) begin
        failures++; $display("res %0d: got %0d expected %0d", i, u_r.got[i], exp_r[i]);
      end
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
