// Testbench for df_sink (SINK): it must be ready in every cycle after reset
// and its count must equal the number of tokens offered.
module tb_df_sink;
  localparam int W = 8, T = 150;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir; logic [W-1:0] id; logic [31:0] count;
  tb_src #(.W(W), .IDLE_PCT(40)) u_s (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_sink #(.W(W), .CNT_W(32)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id), .count(count));

  always @(posedge clk) if (!rst) begin
    checks++;
    if (!ir) begin failures++; $display("sink not ready"); end
  end

  initial begin
    for (int t = 0; t < T; t++) u_s.q.push_back(W'($urandom));
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_s.sent == T);
    repeat (3) @(posedge clk);
    checks++;
    if (count != 32'(T)) begin failures++; $display("count %0d expected %0d", count, T); end
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
