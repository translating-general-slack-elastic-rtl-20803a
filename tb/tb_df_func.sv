// Testbench for df_func (FUNC): a three-input FN_ADD instance must output
// the wrapping sum of one token from each input, and a one-input FN_NOT
// instance the bitwise inverse, for random streams with independent gaps.
module tb_df_func;
  import df_pkg::*;
  localparam int W = 16, T = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] iv, ir; logic [2:0][W-1:0] id;
  logic ov, orr; logic [W-1:0] od;
  logic nv, nr, nov, nor_r; logic [W-1:0] nd, nod;

  for (genvar i = 0; i < 3; i++) begin : g_in
    tb_src #(.W(W), .IDLE_PCT(20 + 15 * i)) u_s (.clk, .rst, .valid(iv[i]), .ready(ir[i]), .data(id[i]));
  end
  df_func #(.W(W), .NIN(3), .OP(FN_ADD)) dut_add (.clk, .rst, .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(70)) u_snk (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  tb_src #(.W(W), .IDLE_PCT(30)) u_ns (.clk, .rst, .valid(nv), .ready(nr), .data(nd));
  df_func #(.W(W), .NIN(1), .OP(FN_NOT)) dut_not (.clk, .rst, .in_valid(nv), .in_ready(nr),
    .in_data(nd), .out_valid(nov), .out_ready(nor_r), .out_data(nod));
  tb_snk #(.W(W), .READY_PCT(70)) u_nsnk (.clk, .rst, .valid(nov), .ready(nor_r), .data(nod));

  logic [W-1:0] exp_add[$], exp_not[$];
  initial begin
    for (int t = 0; t < T; t++) begin
      automatic logic [W-1:0] x = W'($urandom), y = W'($urandom), z = W'($urandom);
      g_in[0].u_s.q.push_back(x);
      g_in[1].u_s.q.push_back(y);
      g_in[2].u_s.q.push_back(z);
      exp_add.push_back(x + y + z);
      u_ns.q.push_back(x);
      exp_not.push_back(~x);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_snk.got.size() == T && u_nsnk.got.size() == T);
    for (int i = 0; i < T; i++) begin
      checks += 2;
      if (u_snk.got[i] !== exp_add[i]) begin
        failures++; $display("sum %0d: got %h expected %h", i, u_snk.got[i], exp_add[i]);
      end
      if (u_nsnk.got[i] !== exp_not[i]) begin
        failures++; $display("not %0d: got %h expected %h", i, u_nsnk.got[i], exp_not[i]);
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
