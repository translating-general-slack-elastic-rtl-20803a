// Testbench for seq_ctrl (SEQ). Random access sequences are generated per
// iteration: fragment A makes a accesses and fragment B b accesses (0 to 3
// each, a run of 1s closed by a 0). For each iteration SEQ must send
// C = 0 (a times) then 1 (b times) and S = 1 (a + b times) then 0. The
// first iteration is the document's A2; A3 case (a = b = 1), which must give
// C0 = 0,1 and S0 = 1,1,0. Inputs come with random gaps, outputs are taken
// with random backpressure.
module tb_seq_ctrl;
  localparam int ITER = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic av, ar, ad, bv, br, bd, cv, cr, cd, sv, sr, sd;
  tb_src #(.W(1), .IDLE_PCT(30)) u_a (.clk, .rst, .valid(av), .ready(ar), .data(ad));
  tb_src #(.W(1), .IDLE_PCT(30)) u_b (.clk, .rst, .valid(bv), .ready(br), .data(bd));
  seq_ctrl dut (.clk, .rst, .sa_valid(av), .sa_ready(ar), .sa_data(ad),
    .sb_valid(bv), .sb_ready(br), .sb_data(bd), .c_valid(cv), .c_ready(cr), .c_data(cd),
    .s_valid(sv), .s_ready(sr), .s_data(sd));
  tb_snk #(.W(1), .READY_PCT(60)) u_c (.clk, .rst, .valid(cv), .ready(cr), .data(cd));
  tb_snk #(.W(1), .READY_PCT(60)) u_s (.clk, .rst, .valid(sv), .ready(sr), .data(sd));

  logic exp_c[$], exp_s[$];
  initial begin
    for (int it = 0; it < ITER; it++) begin
      automatic int a = (it == 0) ? 1 : $urandom_range(0, 3);
      automatic int b = (it == 0) ? 1 : $urandom_range(0, 3);
      repeat (a) begin u_a.q.push_back(1'b1); exp_c.push_back(1'b0); exp_s.push_back(1'b1); end
      u_a.q.push_back(1'b0);
      repeat (b) begin u_b.q.push_back(1'b1); exp_c.push_back(1'b1); exp_s.push_back(1'b1); end
      u_b.q.push_back(1'b0);
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
    $display("first iteration: C = %b,%b  S = %b,%b,%b", u_c.got[0], u_c.got[1],
             u_s.got[0], u_s.got[1], u_s.got[2]);
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
