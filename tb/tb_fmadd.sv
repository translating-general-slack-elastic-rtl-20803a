// Testbench for fmadd, the shared unit with internal state. Random operand
// pairs go in with random gaps; every result must equal the model's running
// a*b + sum, with sum and count cleared after every third access. The
// outputs are taken with random backpressure. The unit must also deliver a
// result one cycle after each access.
module tb_fmadd;
  localparam int W = 32, T = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir, ov, orr;
  logic [2*W-1:0] id;
  logic [W-1:0] od;
  tb_src #(.W(2*W), .IDLE_PCT(30)) u_s (.clk, .rst, .valid(iv), .ready(ir), .data(id));
  fmadd #(.W(W)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(60)) u_k (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  // Latency: a token accepted in one cycle is on the output in the next.
  logic acc_d = 1'b0;
  int lat_checks = 0;
  always_ff @(posedge clk) begin
    acc_d <= !rst && iv && ir;
    if (acc_d) begin
      lat_checks <= lat_checks + 1;
      if (!ov) begin failures++; $display("no result one cycle after an access"); end
    end
  end

  logic [W-1:0] exp_q[$];
  initial begin
    logic [W-1:0] sum, a, b;
    int count;
    sum = '0; count = 0;
    for (int t = 0; t < T; t++) begin
      a = W'($urandom); b = W'($urandom);
      if (t % 7 == 0) begin a = W'(t); b = W'(3); end
      u_s.q.push_back({a, b});
      sum = a * b + sum;
      exp_q.push_back(sum);
      if (count == 2) begin sum = '0; count = 0; end
      else count++;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_k.got.size() == T);
    foreach (exp_q[i]) begin
      checks++;
      if (u_k.got[i] !== exp_q[i]) begin
        failures++; $display("result %0d: got %0d expected %0d", i, u_k.got[i], exp_q[i]);
      end
    end
    checks += lat_checks;
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
