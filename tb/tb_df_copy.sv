// Testbench for df_copy (COPY) with three outputs: every output must receive
// the whole input stream in order, each under its own random backpressure.
module tb_df_copy;
  localparam int W = 16, N = 3, T = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir; logic [W-1:0] id;
  logic [N-1:0] ov, orr; logic [N-1:0][W-1:0] od;

  tb_src #(.W(W), .IDLE_PCT(30)) u_s (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_copy #(.W(W), .N(N)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));
  for (genvar i = 0; i < N; i++) begin : g_out
    tb_snk #(.W(W), .READY_PCT(40 + 20 * i)) u_k (.clk, .rst, .valid(ov[i]), .ready(orr[i]), .data(od[i]));
  end

  logic [W-1:0] exp_q[$];
  initial begin
    for (int t = 0; t < T; t++) begin
      automatic logic [W-1:0] x = W'($urandom);
      u_s.q.push_back(x);
      exp_q.push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (g_out[0].u_k.got.size() == T && g_out[1].u_k.got.size() == T
          && g_out[2].u_k.got.size() == T);
    for (int i = 0; i < T; i++) begin
      checks += 3;
      if (g_out[0].u_k.got[i] !== exp_q[i]) failures++;
      if (g_out[1].u_k.got[i] !== exp_q[i]) failures++;
      if (g_out[2].u_k.got[i] !== exp_q[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
