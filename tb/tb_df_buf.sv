// Testbench for df_buf (BUF): a random stream with random gaps and random
// backpressure must come out complete and in order; with the output always
// ready, a lone token must come out one cycle after it went in, and a
// steady stream must pass one token per cycle.
module tb_df_buf;
  localparam int W = 16, N = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir, ov, orr;
  logic [W-1:0] id, od;
  tb_src #(.W(W), .IDLE_PCT(30)) u_src (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  df_buf #(.W(W)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
                       .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(60)) u_snk (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  // Timing: second instance driven directly, output always ready.
  logic tv = 0, tr, tov;
  logic [W-1:0] td = '0, tod;
  df_buf #(.W(W)) dut_t (.clk, .rst, .in_valid(tv), .in_ready(tr), .in_data(td),
                         .out_valid(tov), .out_ready(1'b1), .out_data(tod));

  logic [W-1:0] exp_q[$];
  initial begin
    for (int i = 0; i < N; i++) begin
      automatic logic [W-1:0] x = W'($urandom);
      exp_q.push_back(x);
      u_src.q.push_back(x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    // A steady stream of 8 tokens enters on 8 consecutive cycles and leaves
    // one cycle later, one per cycle: right after the edge that takes token i
    // the output shows token i.
    for (int i = 0; i < 10; i++) begin
      tv <= (i < 8); td <= W'(100 + i);
      @(posedge clk); #1;
      checks++;
      if (i < 8 && !tr) begin failures++; $display("buffer not ready at %0d", i); end
      checks++;
      if (i < 8 ? !(tov && tod == W'(100 + i)) : tov) begin
        failures++; $display("timing: cycle %0d out_valid=%b data=%0d", i, tov, tod);
      end
    end
    wait (u_snk.got.size() == N);
    for (int i = 0; i < N; i++) begin
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
    $display("WATCHDOG: %0d of %0d tokens", u_snk.got.size(), N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
