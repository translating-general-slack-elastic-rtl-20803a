// Testbench for guard_merge. Per run of a loop with t trips (0 to 4) the
// program sends the first guard on G0 and the following t guards on G1
// (the last one 0). The merged stream G must be 1 (t times) then 0 for each
// run in order, and each guard must be taken from the right input.
module tb_guard_merge;
  localparam int RUNS = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v0, r0, d0, v1, r1, d1, gv, gr, gd;
  tb_src #(.W(1), .IDLE_PCT(40)) u_0 (.clk, .rst, .valid(v0), .ready(r0), .data(d0));
  tb_src #(.W(1), .IDLE_PCT(40)) u_1 (.clk, .rst, .valid(v1), .ready(r1), .data(d1));
  guard_merge dut (.clk, .rst, .g0_valid(v0), .g0_ready(r0), .g0_data(d0),
    .g1_valid(v1), .g1_ready(r1), .g1_data(d1), .g_valid(gv), .g_ready(gr), .g_data(gd));
  tb_snk #(.W(1), .READY_PCT(60)) u_g (.clk, .rst, .valid(gv), .ready(gr), .data(gd));

  logic exp_g[$];
  initial begin
    for (int r = 0; r < RUNS; r++) begin
      automatic int t = $urandom_range(0, 4);
      for (int j = 0; j <= t; j++) begin
        automatic logic g = (j < t);
        if (j == 0) u_0.q.push_back(g); else u_1.q.push_back(g);
        exp_g.push_back(g);
      end
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_g.got.size() == exp_g.size());
    repeat (20) @(posedge clk);
    checks += 2;
    if (u_g.got.size() != exp_g.size()) failures++;
    if (u_0.q.size() != 0 || u_1.q.size() != 0) failures++;
    foreach (exp_g[i]) begin checks++; if (u_g.got[i] !== exp_g[i]) failures++; end
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
