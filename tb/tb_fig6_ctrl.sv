// Testbench for fig6_ctrl, the control circuit of channel A. The testbench
// plays the program: it draws a random run (outer iterations, 0 to 4 inner
// trips each, a random b0 guard per trip), and offers the whole A stream,
// the b0 guard stream and the loop guard stream up front, with random gaps.
// Each replica A0..A3 must receive exactly the A tokens the original
// program reads at that point, in order, while the replicas are drained
// with random backpressure. Offering all guards early lets the control
// circuit run ahead of the program, which a slack-elastic circuit must
// tolerate. Also checked: the SINK count and that every token was used.
module tb_fig6_ctrl;
  localparam int W = 32, OUTER = 80;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic av, ar, gsv, gsr, gsd, glv, glr, gld;
  logic [W-1:0] ad;
  logic [3:0] rv, rr;
  logic [3:0][W-1:0] rd;
  logic [31:0] sink_count;

  tb_src #(.W(W), .IDLE_PCT(30)) u_a (.clk, .rst, .valid(av), .ready(ar), .data(ad));
  tb_src #(.W(1), .IDLE_PCT(30)) u_gs (.clk, .rst, .valid(gsv), .ready(gsr), .data(gsd));
  tb_src #(.W(1), .IDLE_PCT(30)) u_gl (.clk, .rst, .valid(glv), .ready(glr), .data(gld));
  fig6_ctrl #(.W(W), .CTRL_SLACK(1)) dut (.clk, .rst,
    .a_valid(av), .a_ready(ar), .a_data(ad),
    .gsel_valid(gsv), .gsel_ready(gsr), .gsel_data(gsd),
    .gloop_valid(glv), .gloop_ready(glr), .gloop_data(gld),
    .ar_valid(rv), .ar_ready(rr), .ar_data(rd), .sink_count);
  for (genvar i = 0; i < 4; i++) begin : g_r
    tb_snk #(.W(W), .READY_PCT(50 + 10 * i)) u_k (.clk, .rst, .valid(rv[i]), .ready(rr[i]), .data(rd[i]));
  end

  logic [W-1:0] exp_r[4][$];
  int n_a = 0;

  function automatic logic [W-1:0] put_a(int r);
    logic [W-1:0] x = W'($urandom);
    u_a.q.push_back(x);
    exp_r[r].push_back(x);
    n_a++;
    return x;
  endfunction

  initial begin
    for (int o = 0; o < OUTER; o++) begin
      automatic int t = $urandom_range(0, 4);
      void'(put_a(0));
      for (int j = 0; j < t; j++) begin
        automatic logic g = 1'($urandom_range(0, 1));
        u_gl.q.push_back(1'b1);
        u_gs.q.push_back(g);
        if (!g) void'(put_a(1));
        else begin void'(put_a(2)); void'(put_a(3)); end
      end
      u_gl.q.push_back(1'b0);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (g_r[0].u_k.got.size() == exp_r[0].size() && g_r[1].u_k.got.size() == exp_r[1].size()
       && g_r[2].u_k.got.size() == exp_r[2].size() && g_r[3].u_k.got.size() == exp_r[3].size());
    repeat (30) @(posedge clk);
    foreach (exp_r[0][i]) begin checks++; if (g_r[0].u_k.got[i] !== exp_r[0][i]) failures++; end
    foreach (exp_r[1][i]) begin checks++; if (g_r[1].u_k.got[i] !== exp_r[1][i]) failures++; end
    foreach (exp_r[2][i]) begin checks++; if (g_r[2].u_k.got[i] !== exp_r[2][i]) failures++; end
    foreach (exp_r[3][i]) begin checks++; if (g_r[3].u_k.got[i] !== exp_r[3][i]) failures++; end
    checks += 5;
    if (g_r[0].u_k.got.size() != exp_r[0].size() || g_r[1].u_k.got.size() != exp_r[1].size()
     || g_r[2].u_k.got.size() != exp_r[2].size() || g_r[3].u_k.got.size() != exp_r[3].size()) failures++;
    if (u_a.q.size() != 0) failures++;
    if (u_gs.q.size() != 0) failures++;
    if (u_gl.q.size() != 0) failures++;
    // One 1 per access of A, one 0 per outer iteration, and the 1 that
    // announces the A0 access of the next outer iteration.
    if (sink_count != 32'(n_a + OUTER + 1)) begin
      failures++; $display("SINK count %0d expected %0d", sink_count, n_a + OUTER + 1);
    end
    $display("replica tokens: A0 %0d A1 %0d A2 %0d A3 %0d", exp_r[0].size(), exp_r[1].size(),
             exp_r[2].size(), exp_r[3].size());
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
