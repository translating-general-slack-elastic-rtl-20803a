// Testbench for df_split (SPLIT) with three outputs: a random control stream
// sends each input token to one output. Each output must receive exactly the
// tokens meant for it, in order, under random gaps and backpressure that
// differs between outputs.
module tb_df_split;
  localparam int W = 16, N = 3, T = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cv, cr; logic [1:0] cd;
  logic iv, ir; logic [W-1:0] id;
  logic [N-1:0] ov, orr; logic [N-1:0][W-1:0] od;

  tb_src #(.W(2), .IDLE_PCT(20)) u_c (.clk, .rst, .valid(cv), .ready(cr), .data(cd));
  tb_src #(.W(W), .IDLE_PCT(30)) u_s (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_split #(.W(W), .N(N)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
    .c_valid(cv), .c_ready(cr), .c_data(cd), .out_valid(ov), .out_ready(orr), .out_data(od));
  for (genvar i = 0; i < N; i++) begin : g_out
    tb_snk #(.W(W), .READY_PCT(40 + 20 * i)) u_k (.clk, .rst, .valid(ov[i]), .ready(orr[i]), .data(od[i]));
  end

  logic [W-1:0] exp_q[N][$];
  int total;
  initial begin
    for (int t = 0; t < T; t++) begin
      automatic int k = $urandom_range(0, N - 1);
      automatic logic [W-1:0] x = W'($urandom);
      u_c.q.push_back(2'(k));
      u_s.q.push_back(x);
      exp_q[k].push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    do begin
      @(posedge clk);
      total = g_out[0].u_k.got.size() + g_out[1].u_k.got.size() + g_out[2].u_k.got.size();
    end while (total < T);
    for (int i = 0; i < exp_q[0].size(); i++) begin
      checks++; if (g_out[0].u_k.got[i] !== exp_q[0][i]) failures++;
    end
    for (int i = 0; i < exp_q[1].size(); i++) begin
      checks++; if (g_out[1].u_k.got[i] !== exp_q[1][i]) failures++;
    end
    for (int i = 0; i < exp_q[2].size(); i++) begin
      checks++; if (g_out[2].u_k.got[i] !== exp_q[2][i]) failures++;
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
