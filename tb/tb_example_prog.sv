// Testbench for example_prog, the program side of the Section IV example.
// The testbench plays the control circuit: it offers each replica A0..A3
// and channel B the tokens the program will read there, with random gaps,
// and takes the guard and result channels with random backpressure. The
// guards G0 (a0 < 10 before the loop), G1 (after each body), GS (b0 != 0)
// and the RES values must match a model of the original program.
module tb_example_prog;
  localparam int W = 32, OUTER = 80;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] rv, rr; logic [3:0][W-1:0] rd;
  logic bv, br; logic [W-1:0] bd;
  logic g0v, g0r, g0d, g1v, g1r, g1d, gsv, gsr, gsd, resv, resr;
  logic [W-1:0] resd;

  for (genvar i = 0; i < 4; i++) begin : g_r
    tb_src #(.W(W), .IDLE_PCT(30)) u_s (.clk, .rst, .valid(rv[i]), .ready(rr[i]), .data(rd[i]));
  end
  tb_src #(.W(W), .IDLE_PCT(30)) u_b (.clk, .rst, .valid(bv), .ready(br), .data(bd));
  example_prog #(.W(W)) dut (.clk, .rst, .ar_valid(rv), .ar_ready(rr), .ar_data(rd),
    .b_valid(bv), .b_ready(br), .b_data(bd),
    .g0_valid(g0v), .g0_ready(g0r), .g0_data(g0d), .g1_valid(g1v), .g1_ready(g1r), .g1_data(g1d),
    .gs_valid(gsv), .gs_ready(gsr), .gs_data(gsd),
    .res_valid(resv), .res_ready(resr), .res_data(resd));
  tb_snk #(.W(1), .READY_PCT(60)) u_g0 (.clk, .rst, .valid(g0v), .ready(g0r), .data(g0d));
  tb_snk #(.W(1), .READY_PCT(60)) u_g1 (.clk, .rst, .valid(g1v), .ready(g1r), .data(g1d));
  tb_snk #(.W(1), .READY_PCT(60)) u_gs (.clk, .rst, .valid(gsv), .ready(gsr), .data(gsd));
  tb_snk #(.W(W), .READY_PCT(60)) u_res (.clk, .rst, .valid(resv), .ready(resr), .data(resd));

  logic exp_g0[$], exp_g1[$], exp_gs[$];
  logic [W-1:0] exp_res[$];

  initial begin
    logic [W-1:0] res, a0, b0, x, y;
    res = '0;
    for (int o = 0; o < OUTER; o++) begin
      a0 = W'($urandom_range(6, 12));
      g_r[0].u_s.q.push_back(a0);
      exp_g0.push_back(a0 < 10);
      while (a0 < 10) begin
        b0 = ($urandom_range(0, 1) == 0) ? '0 : W'($urandom);
        u_b.q.push_back(b0);
        exp_gs.push_back(b0 != 0);
        x = W'($urandom); y = W'($urandom);
        if (b0 == 0) begin g_r[1].u_s.q.push_back(x); res = res + x; end
        else begin g_r[2].u_s.q.push_back(x); g_r[3].u_s.q.push_back(y); res = res + x + y; end
        a0 = a0 + 1;
        exp_g1.push_back(a0 < 10);
      end
      exp_res.push_back(res);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_res.got.size() == OUTER);
    repeat (20) @(posedge clk);
    checks += 3;
    if (u_g0.got.size() != exp_g0.size()) failures++;
    if (u_g1.got.size() != exp_g1.size()) failures++;
    if (u_gs.got.size() != exp_gs.size()) failures++;
    foreach (exp_g0[i]) begin checks++; if (u_g0.got[i] !== exp_g0[i]) failures++; end
    foreach (exp_g1[i]) begin checks++; if (u_g1.got[i] !== exp_g1[i]) failures++; end
    foreach (exp_gs[i]) begin checks++; if (u_gs.got[i] !== exp_gs[i]) failures++; end
    foreach (exp_res[i]) begin
      checks++;
      if (u_res.got[i] !== exp_res[i]) begin
        failures++; $display("RES[%0d] got %0d expected %0d", i, u_res.got[i], exp_res[i]);
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
