// Testbench for sel_ctrl (SEL). Per iteration a guard g is drawn and the
// taken branch makes k accesses (0 to 3): S must be k 1s then a 0, C must
// be g repeated k times, and nothing may be taken from the other branch.
// The first three iterations are the document's STEP 3 case: guards
// b0 = 0,1,1, branch A the base sequence 1,0 and branch B the SEQ output
// 1,1,0, which must give S1 = 1,0,1,1,0,1,1,0 and C1 = 0,1,1,1,1.
module tb_sel_ctrl;
  localparam int ITER = 250;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic gv, gr, gd, av, ar, ad, bv, br, bd, cv, cr, cd, sv, sr, sd;
  tb_src #(.W(1), .IDLE_PCT(30)) u_g (.clk, .rst, .valid(gv), .ready(gr), .data(gd));
  tb_src #(.W(1), .IDLE_PCT(30)) u_a (.clk, .rst, .valid(av), .ready(ar), .data(ad));
  tb_src #(.W(1), .IDLE_PCT(30)) u_b (.clk, .rst, .valid(bv), .ready(br), .data(bd));
  sel_ctrl dut (.clk, .rst, .g_valid(gv), .g_ready(gr), .g_data(gd),
    .sa_valid(av), .sa_ready(ar), .sa_data(ad), .sb_valid(bv), .sb_ready(br), .sb_data(bd),
    .c_valid(cv), .c_ready(cr), .c_data(cd), .s_valid(sv), .s_ready(sr), .s_data(sd));
  tb_snk #(.W(1), .READY_PCT(60)) u_c (.clk, .rst, .valid(cv), .ready(cr), .data(cd));
  tb_snk #(.W(1), .READY_PCT(60)) u_s (.clk, .rst, .valid(sv), .ready(sr), .data(sd));

  logic exp_c[$], exp_s[$];
  localparam logic [7:0] DOC_S1 = 8'b1011_0110;   // 1,0,1,1,0,1,1,0 read from the MSB
  localparam logic [4:0] DOC_C1 = 5'b0_1111;      // 0,1,1,1,1

  initial begin
    for (int it = 0; it < ITER; it++) begin
      automatic logic g = (it < 3) ? (it != 0) : 1'($urandom_range(0, 1));
      automatic int k = (it < 3) ? (g ? 2 : 1) : $urandom_range(0, 3);
      u_g.q.push_back(g);
      repeat (k) begin
        if (g) u_b.q.push_back(1'b1); else u_a.q.push_back(1'b1);
        exp_s.push_back(1'b1);
        exp_c.push_back(g);
      end
      if (g) u_b.q.push_back(1'b0); else u_a.q.push_back(1'b0);
      exp_s.push_back(1'b0);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_c.got.size() == exp_c.size() && u_s.got.size() == exp_s.size());
    repeat (20) @(posedge clk);
    checks += 2;
    if (u_c.got.size() != exp_c.size()) failures++;
    if (u_s.got.size() != exp_s.size()) failures++;
    foreach (exp_c[i]) begin checks++; if (u_c.got[i] !== exp_c[i]) failures++; end
    foreach (exp_s[i]) begin checks++; if (u_s.got[i] !== exp_s[i]) failures++; end
    for (int i = 0; i < 8; i++) begin
      checks++; if (u_s.got[i] !== DOC_S1[7-i]) begin failures++; $display("S1[%0d] wrong", i); end
    end
    for (int i = 0; i < 5; i++) begin
      checks++; if (u_c.got[i] !== DOC_C1[4-i]) begin failures++; $display("C1[%0d] wrong", i); end
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
