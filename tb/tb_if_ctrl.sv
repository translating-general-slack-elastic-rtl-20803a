// Testbench for if_ctrl, both variants. Per iteration a random guard g is
// drawn; IF0 (USED_BRANCH = 0) must forward the branch's access sequence
// (k 1s, 0 to 3, then a 0) when g = 0 and send a single 0 otherwise, taking
// nothing from SA; IF1 (USED_BRANCH = 1) the same with g = 1. Guards and
// access sequences are offered with random gaps and S is taken with random
// backpressure.
module tb_if_ctrl;
  localparam int ITER = 250;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] gv, gr, gd, av, ar, ad, sv, sr, sd;
  logic exp_s[2][$];

  for (genvar u = 0; u < 2; u++) begin : g_v
    tb_src #(.W(1), .IDLE_PCT(30)) u_g (.clk, .rst, .valid(gv[u]), .ready(gr[u]), .data(gd[u]));
    tb_src #(.W(1), .IDLE_PCT(30)) u_a (.clk, .rst, .valid(av[u]), .ready(ar[u]), .data(ad[u]));
    if_ctrl #(.USED_BRANCH(u[0])) dut (.clk, .rst, .g_valid(gv[u]), .g_ready(gr[u]), .g_data(gd[u]),
      .sa_valid(av[u]), .sa_ready(ar[u]), .sa_data(ad[u]),
      .s_valid(sv[u]), .s_ready(sr[u]), .s_data(sd[u]));
    tb_snk #(.W(1), .READY_PCT(60)) u_s (.clk, .rst, .valid(sv[u]), .ready(sr[u]), .data(sd[u]));
  end

  task automatic gen(input int u);
    for (int it = 0; it < ITER; it++) begin
      automatic logic g = 1'($urandom_range(0, 1));
      if (u == 0) g_v[0].u_g.q.push_back(g); else g_v[1].u_g.q.push_back(g);
      if (g == 1'(u)) begin
        automatic int k = $urandom_range(0, 3);
        repeat (k) begin
          if (u == 0) g_v[0].u_a.q.push_back(1'b1); else g_v[1].u_a.q.push_back(1'b1);
          exp_s[u].push_back(1'b1);
        end
        if (u == 0) g_v[0].u_a.q.push_back(1'b0); else g_v[1].u_a.q.push_back(1'b0);
      end
      exp_s[u].push_back(1'b0);
    end
  endtask

  initial begin
    gen(0);
    gen(1);
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (g_v[0].u_s.got.size() == exp_s[0].size() && g_v[1].u_s.got.size() == exp_s[1].size());
    repeat (20) @(posedge clk);
    foreach (exp_s[0][i]) begin checks++; if (g_v[0].u_s.got[i] !== exp_s[0][i]) failures++; end
    foreach (exp_s[1][i]) begin checks++; if (g_v[1].u_s.got[i] !== exp_s[1][i]) failures++; end
    checks += 4;
    if (g_v[0].u_s.got.size() != exp_s[0].size()) failures++;
    if (g_v[1].u_s.got.size() != exp_s[1].size()) failures++;
    if (g_v[0].u_a.q.size() != 0 || g_v[1].u_a.q.size() != 0) failures++;
    if (g_v[0].u_g.q.size() != 0 || g_v[1].u_g.q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
