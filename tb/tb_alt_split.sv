// The alternating split *[L?x; A!x; L?x; B!x] built with channel replicas.
// The two receives on L become L0?x and L1?x; a SPLIT delivers the tokens of
// L to L0 and L1 under the CTRL stream 0,1,0,1,... from acc_base with
// INIT_BIT = 0 (s := 0; *[C!s; s := 1-s]). With the process reduced to its
// channel actions, L0 feeds A and L1 feeds B directly.
//
// Random tokens are offered on L with random gaps, and A and B accept with
// independent random backpressure. A must receive tokens 0, 2, 4, ... of L
// and B tokens 1, 3, 5, ..., each in order.
module tb_alt_split;
  localparam int W = 16, T = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic lv, lr, cv, cr, cd;
  logic [W-1:0] ld;
  logic [1:0] ov, orr; logic [1:0][W-1:0] od;

  tb_src #(.W(W), .IDLE_PCT(30)) u_l (.clk, .rst, .valid(lv), .ready(lr), .data(ld));
  acc_base #(.INIT_BIT(1'b0)) u_ctrl (.clk, .rst, .s_valid(cv), .s_ready(cr), .s_data(cd));
  df_split #(.W(W), .N(2)) u_split (.clk, .rst, .in_valid(lv), .in_ready(lr), .in_data(ld),
    .c_valid(cv), .c_ready(cr), .c_data(cd), .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(50)) u_a (.clk, .rst, .valid(ov[0]), .ready(orr[0]), .data(od[0]));
  tb_snk #(.W(W), .READY_PCT(80)) u_b (.clk, .rst, .valid(ov[1]), .ready(orr[1]), .data(od[1]));

  logic [W-1:0] exp_a[$], exp_b[$];

  initial begin
    for (int t = 0; t < T; t++) begin
      automatic logic [W-1:0] x = W'($urandom);
      u_l.q.push_back(x);
      if (t % 2 == 0) exp_a.push_back(x); else exp_b.push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_a.got.size() == T / 2 && u_b.got.size() == T / 2);
    repeat (10) @(posedge clk);
    checks += 2;
    if (u_a.got.size() != T / 2) begin failures++; $display("A got %0d tokens", u_a.got.size()); end
    if (u_b.got.size() != T / 2) begin failures++; $display("B got %0d tokens", u_b.got.size()); end
    foreach (exp_a[i]) begin
      checks++;
      if (u_a.got[i] !== exp_a[i]) begin failures++; $display("A token %0d wrong", i); end
    end
    foreach (exp_b[i]) begin
      checks++;
      if (u_b.got[i] !== exp_b[i]) begin failures++; $display("B token %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
