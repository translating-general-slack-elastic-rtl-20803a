// Testbench for df_slack: a three-stage chain must deliver a random stream
// complete and in order under random gaps and backpressure, hold six tokens
// when its output is blocked, and take three cycles from input to output.
module tb_df_slack;
  localparam int W = 16, T = 200, D = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir, ov, orr; logic [W-1:0] id, od;
  logic blk = 1'b0, sr;
  tb_src #(.W(W), .IDLE_PCT(30)) u_s (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_slack #(.W(W), .DEPTH(D)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(60)) u_snk (.clk, .rst, .valid(ov && !blk), .ready(sr), .data(od));
  assign orr = sr && !blk;

  logic [W-1:0] exp_q[$];
  longint t_in;
  initial begin
    for (int t = 0; t < T; t++) begin
      automatic logic [W-1:0] x = W'($urandom);
      u_s.q.push_back(x);
      exp_q.push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    // Block the output: exactly 2*D tokens enter.
    blk <= 1'b1;
    repeat (60) @(posedge clk);
    checks++;
    if (u_s.sent != 2 * D) begin failures++; $display("capacity %0d expected %0d", u_s.sent, 2 * D); end
    blk <= 1'b0;
    wait (u_snk.got.size() == T);
    for (int i = 0; i < T; i++) begin
      checks++;
      if (u_snk.got[i] !== exp_q[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Latency: an empty chain shows a token D cycles after it was taken.
  logic lv = 0, lr; logic [W-1:0] ld = '0; logic lov; logic [W-1:0] lod;
  df_slack #(.W(W), .DEPTH(D)) dut_l (.clk, .rst, .in_valid(lv), .in_ready(lr), .in_data(ld),
    .out_valid(lov), .out_ready(1'b1), .out_data(lod));
  initial begin
    wait (!rst);
    @(posedge clk); #1;
    lv = 1; ld = 16'h1234;
    @(posedge clk); #1;
    lv = 0;
    for (int k = 1; k <= D + 1; k++) begin
      checks++;
      if ((k == D) != (lov && lod == 16'h1234)) begin
        failures++; $display("latency: %0d cycles after entry out_valid=%b", k, lov);
      end
      if (k < D + 1) begin @(posedge clk); #1; end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
