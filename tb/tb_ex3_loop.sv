// Testbench for ex3_loop, the loop branch of EXAMPLE_3. Random c0 values
// and loop guard streams (0 to 4 trips, then 0) go in with random gaps. A
// stand-in for the shared unit answers each operand pair {a, b} with
// a*b + 7 after a random delay. Checked: every guard is passed on to GL
// unchanged and in order, every operand pair is {c0, c0}, and c1 is the
// last unit result, or c0 when the loop makes no trip.
module tb_ex3_loop;
  localparam int W = 32, ITER = 150;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic lv, lr, g2v, g2r, g2d, glv, glr, gld, iv, ir, ov, orr, cv, cr;
  logic [W-1:0] ld, od, cd; logic [2*W-1:0] id;
  tb_src #(.W(W), .IDLE_PCT(40)) u_l (.clk, .rst, .valid(lv), .ready(lr), .data(ld));
  tb_src #(.W(1), .IDLE_PCT(30)) u_g (.clk, .rst, .valid(g2v), .ready(g2r), .data(g2d));
  ex3_loop #(.W(W)) dut (.clk, .rst, .l_valid(lv), .l_ready(lr), .l_data(ld),
    .g2_valid(g2v), .g2_ready(g2r), .g2_data(g2d),
    .gl_valid(glv), .gl_ready(glr), .gl_data(gld),
    .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od),
    .c1_valid(cv), .c1_ready(cr), .c1_data(cd));
  tb_snk #(.W(1), .READY_PCT(60)) u_gl (.clk, .rst, .valid(glv), .ready(glr), .data(gld));
  tb_snk #(.W(2*W), .READY_PCT(60)) u_in (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  tb_src #(.W(W), .IDLE_PCT(40)) u_out (.clk, .rst, .valid(ov), .ready(orr), .data(od));
  tb_snk #(.W(W), .READY_PCT(60)) u_c1 (.clk, .rst, .valid(cv), .ready(cr), .data(cd));

  logic [W-1:0] exp_c1[$], exp_in[$];
  logic         exp_g[$];

  // Unit stand-in: answer every operand pair taken.
  always @(posedge clk)
    if (!rst && iv && ir) u_out.q.push_back(W'(id[2*W-1:W] * id[W-1:0] + 7));

  initial begin
    logic [W-1:0] c0, c1;
    int n;
    for (int it = 0; it < ITER; it++) begin
      c0 = W'($urandom_range(0, 100000));
      n = $urandom_range(0, 4);
      u_l.q.push_back(c0);
      c1 = c0;
      for (int t = 0; t < n; t++) begin
        u_g.q.push_back(1'b1); exp_g.push_back(1'b1);
        exp_in.push_back(c0);
        c1 = W'(c0 * c0 + 7);
      end
      u_g.q.push_back(1'b0); exp_g.push_back(1'b0);
      exp_c1.push_back(c1);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_c1.got.size() == ITER);
    repeat (20) @(posedge clk);
    checks += 3;
    if (u_gl.got.size() != exp_g.size()) begin failures++; $display("guard count"); end
    if (u_in.got.size() != exp_in.size()) begin failures++; $display("call count"); end
    if (u_l.q.size() != 0 || u_g.q.size() != 0) begin failures++; $display("inputs left"); end
    foreach (exp_g[i]) if (i < u_gl.got.size()) begin
      checks++;
      if (u_gl.got[i] !== exp_g[i]) begin failures++; $display("guard %0d wrong", i); end
    end
    foreach (exp_in[i]) if (i < u_in.got.size()) begin
      checks++;
      if (u_in.got[i] !== {exp_in[i], exp_in[i]}) begin failures++; $display("call %0d wrong", i); end
    end
    foreach (exp_c1[i]) begin
      checks++;
      if (u_c1.got[i] !== exp_c1[i]) begin
        failures++; $display("c1 %0d: got %0d expected %0d", i, u_c1.got[i], exp_c1[i]);
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
