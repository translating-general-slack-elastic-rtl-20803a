// Testbench for loop_ctrl (LOOP_C). Per run of the loop a trip count t (0
// to 4) is drawn; the guard stream is t 1s then a 0, and each body
// iteration makes k accesses (0 to 3, then the body's 0). S must be all the
// body's 1s, without the body's 0s, then a single 0. The first run is the
// document's STEP 4 case: three trips with S1 = 1,0,1,1,0,1,1,0, which must
// give S2 = 1,1,1,1,1,0.
module tb_loop_ctrl;
  localparam int RUNS = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic gv, gr, gd, av, ar, ad, sv, sr, sd;
  tb_src #(.W(1), .IDLE_PCT(30)) u_g (.clk, .rst, .valid(gv), .ready(gr), .data(gd));
  tb_src #(.W(1), .IDLE_PCT(30)) u_a (.clk, .rst, .valid(av), .ready(ar), .data(ad));
  loop_ctrl dut (.clk, .rst, .g_valid(gv), .g_ready(gr), .g_data(gd),
    .sa_valid(av), .sa_ready(ar), .sa_data(ad), .s_valid(sv), .s_ready(sr), .s_data(sd));
  tb_snk #(.W(1), .READY_PCT(60)) u_s (.clk, .rst, .valid(sv), .ready(sr), .data(sd));

  logic exp_s[$];
  int n_zero = 0;
  initial begin
    for (int r = 0; r < RUNS; r++) begin
      automatic int t = (r == 0) ? 3 : $urandom_range(0, 4);
      if (t == 0) n_zero++;
      for (int j = 0; j < t; j++) begin
        automatic int k = (r == 0) ? ((j == 0) ? 1 : 2) : $urandom_range(0, 3);
        u_g.q.push_back(1'b1);
        repeat (k) begin u_a.q.push_back(1'b1); exp_s.push_back(1'b1); end
        u_a.q.push_back(1'b0);
      end
      u_g.q.push_back(1'b0);
      exp_s.push_back(1'b0);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_s.got.size() == exp_s.size());
    repeat (20) @(posedge clk);
    checks += 3;
    if (u_s.got.size() != exp_s.size()) failures++;
    if (u_a.q.size() != 0 || u_g.q.size() != 0) failures++;
    if (n_zero == 0) begin failures++; $display("no zero-trip loop"); end
    foreach (exp_s[i]) begin checks++; if (u_s.got[i] !== exp_s[i]) failures++; end
    for (int i = 0; i < 6; i++) begin
      checks++; if (u_s.got[i] !== (i != 5)) begin failures++; $display("S2[%0d] wrong", i); end
    end
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
