// Testbench for acc_base: with INIT_BIT = 1 the stream must read
// 1,0,1,0,... and with INIT_BIT = 0 it must read 0,1,0,1,..., also under
// random backpressure. With the output always ready a token must come every
// three cycles, the round trip of the one token in its INIT-COPY-FUNC ring.
module tb_acc_base;
  localparam int T = 60;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v1, r1, d1, v0, r0, d0, vf, rf, df;
  acc_base #(.INIT_BIT(1'b1)) dut1 (.clk, .rst, .s_valid(v1), .s_ready(r1), .s_data(d1));
  acc_base #(.INIT_BIT(1'b0)) dut0 (.clk, .rst, .s_valid(v0), .s_ready(r0), .s_data(d0));
  acc_base #(.INIT_BIT(1'b1)) dutf (.clk, .rst, .s_valid(vf), .s_ready(rf), .s_data(df));
  tb_snk #(.W(1), .READY_PCT(50)) k1 (.clk, .rst, .valid(v1), .ready(r1), .data(d1));
  tb_snk #(.W(1), .READY_PCT(50)) k0 (.clk, .rst, .valid(v0), .ready(r0), .data(d0));
  tb_snk #(.W(1), .READY_PCT(100)) kf (.clk, .rst, .valid(vf), .ready(rf), .data(df));

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (k1.got.size() >= T && k0.got.size() >= T && kf.got.size() >= T);
    for (int i = 0; i < T; i++) begin
      checks += 3;
      if (k1.got[i] !== 1'(~i & 1)) begin failures++; $display("INIT_BIT=1 token %0d = %b", i, k1.got[i]); end
      if (k0.got[i] !== 1'(i & 1))  begin failures++; $display("INIT_BIT=0 token %0d = %b", i, k0.got[i]); end
      if (kf.got[i] !== 1'(~i & 1)) failures++;
    end
    for (int i = 2; i < T; i++) begin
      checks++;
      if (kf.at[i] - kf.at[i-1] != 3) begin
        failures++; $display("spacing before token %0d: %0d cycles", i, kf.at[i] - kf.at[i-1]);
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
