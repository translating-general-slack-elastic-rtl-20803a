// Testbench for df_merge (MERGE) with three inputs: a random control stream
// picks the input of every output token; each input holds its own random
// stream. The output must be, for each control token in turn, the next
// token of the input it names, whatever the timing of the inputs.
module tb_df_merge;
  localparam int W = 16, N = 3, T = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cv, cr; logic [1:0] cd;
  logic [N-1:0] iv, ir; logic [N-1:0][W-1:0] id;
  logic ov, orr; logic [W-1:0] od;

  tb_src #(.W(2), .IDLE_PCT(20)) u_c (.clk, .rst, .valid(cv), .ready(cr), .data(cd));
  for (genvar i = 0; i < N; i++) begin : g_in
    tb_src #(.W(W), .IDLE_PCT(40)) u_s (.clk, .rst, .valid(iv[i]), .ready(ir[i]), .data(id[i]));
  end
  df_merge #(.W(W), .N(N)) dut (.clk, .rst, .c_valid(cv), .c_ready(cr), .c_data(cd),
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(70)) u_snk (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  logic [W-1:0] exp_q[$];
  initial begin
    for (int t = 0; t < T; t++) begin
      automatic int k = $urandom_range(0, N - 1);
      automatic logic [W-1:0] x = W'($urandom);
      u_c.q.push_back(2'(k));
      exp_q.push_back(x);
      case (k)
        0: g_in[0].u_s.q.push_back(x);
        1: g_in[1].u_s.q.push_back(x);
        default: g_in[2].u_s.q.push_back(x);
      endcase
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_snk.got.size() == T);
    for (int i = 0; i < T; i++) begin
      checks++;
      if (u_snk.got[i] !== exp_q[i]) begin
        failures++; $display("token %0d: got %h expected %h", i, u_snk.got[i], exp_q[i]);
      end
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
