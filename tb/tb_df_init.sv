// Testbench for df_init (INIT): after reset the output must first carry the
// constant, then the input stream complete and in order, under random gaps
// and random backpressure.
module tb_df_init;
  localparam int W = 12, N = 200;
  localparam logic [W-1:0] K = 12'hA5C;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir, ov, orr;
  logic [W-1:0] id, od;
  tb_src #(.W(W), .IDLE_PCT(30)) u_src (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_init #(.W(W), .INIT_VALUE(K)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
                                        .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(60)) u_snk (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  logic [W-1:0] exp_q[$];
  initial begin
    exp_q.push_back(K);
    for (int i = 0; i < N; i++) begin
      automatic logic [W-1:0] x = W'($urandom);
      exp_q.push_back(x);
      u_src.q.push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_snk.got.size() == N + 1);
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (u_snk.got[i] !== exp_q[i]) begin
        failures++;
        $display("token %0d: got %h expected %h", i, u_snk.got[i], exp_q[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
