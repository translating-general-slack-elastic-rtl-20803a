// Throughput of a pipelined MERGE tree. A four-way MERGE is built as a tree
// of two-way MERGEs (two leaves under one root), the way wide MERGEs are
// built when the fan-in of one element is kept small, and is compared with a
// single four-way df_merge and with a single two-way df_merge. Every element
// buffers its output, so the tree is pipelined: once full it must deliver one
// token per cycle, the same as one two-way MERGE, only with one more cycle of
// latency.
//
// A random sequence of input numbers k (0..3) is turned into the control
// streams: the root sees bit 1 of each k, leaf j sees bit 0 of each k whose
// bit 1 is j. Inputs and control are offered every cycle and the output is
// always ready. Checked: the tree and the single MERGE both deliver the
// tokens in the order the control names, the gap between consecutive
// outputs is one cycle throughout, and the two-way MERGE does the same.
module tb_merge_tree;
  localparam int W = 16, T = 400;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Tree: inputs, control streams, leaf outputs, root output.
  logic [3:0] iv, ir; logic [3:0][W-1:0] id;
  logic [1:0] lcv, lcr, lcd, lov, lor; logic [1:0][W-1:0] lod;
  logic rcv, rcr, rcd, ov, orr; logic [W-1:0] od;
  for (genvar i = 0; i < 4; i++) begin : g_in
    tb_src #(.W(W), .IDLE_PCT(0)) u_s (.clk, .rst, .valid(iv[i]), .ready(ir[i]), .data(id[i]));
  end
  for (genvar j = 0; j < 2; j++) begin : g_leaf
    tb_src #(.W(1), .IDLE_PCT(0)) u_c (.clk, .rst, .valid(lcv[j]), .ready(lcr[j]), .data(lcd[j]));
    df_merge #(.W(W), .N(2)) u_m (.clk, .rst,
      .c_valid(lcv[j]), .c_ready(lcr[j]), .c_data(lcd[j]),
      .in_valid(iv[2*j +: 2]), .in_ready(ir[2*j +: 2]), .in_data(id[2*j +: 2]),
      .out_valid(lov[j]), .out_ready(lor[j]), .out_data(lod[j]));
  end
  tb_src #(.W(1), .IDLE_PCT(0)) u_rc (.clk, .rst, .valid(rcv), .ready(rcr), .data(rcd));
  df_merge #(.W(W), .N(2)) u_root (.clk, .rst, .c_valid(rcv), .c_ready(rcr), .c_data(rcd),
    .in_valid(lov), .in_ready(lor), .in_data(lod), .out_valid(ov), .out_ready(orr), .out_data(od));
  tb_snk #(.W(W), .READY_PCT(100)) u_o (.clk, .rst, .valid(ov), .ready(orr), .data(od));

  // Single four-way MERGE fed the same tokens.
  logic [3:0] fv, fr; logic [3:0][W-1:0] fd;
  logic fcv, fcr, fov, forr; logic [1:0] fcd; logic [W-1:0] fod;
  for (genvar i = 0; i < 4; i++) begin : g_fin
    tb_src #(.W(W), .IDLE_PCT(0)) u_s (.clk, .rst, .valid(fv[i]), .ready(fr[i]), .data(fd[i]));
  end
  tb_src #(.W(2), .IDLE_PCT(0)) u_fc (.clk, .rst, .valid(fcv), .ready(fcr), .data(fcd));
  df_merge #(.W(W), .N(4)) u_flat (.clk, .rst, .c_valid(fcv), .c_ready(fcr), .c_data(fcd),
    .in_valid(fv), .in_ready(fr), .in_data(fd), .out_valid(fov), .out_ready(forr), .out_data(fod));
  tb_snk #(.W(W), .READY_PCT(100)) u_fo (.clk, .rst, .valid(fov), .ready(forr), .data(fod));

  // Single two-way MERGE, for the reference rate.
  logic [1:0] tv, tr; logic [1:0][W-1:0] td;
  logic tcv, tcr, tcd, tov, torr; logic [W-1:0] tod;
  for (genvar i = 0; i < 2; i++) begin : g_tin
    tb_src #(.W(W), .IDLE_PCT(0)) u_s (.clk, .rst, .valid(tv[i]), .ready(tr[i]), .data(td[i]));
  end
  tb_src #(.W(1), .IDLE_PCT(0)) u_tc (.clk, .rst, .valid(tcv), .ready(tcr), .data(tcd));
  df_merge #(.W(W), .N(2)) u_two (.clk, .rst, .c_valid(tcv), .c_ready(tcr), .c_data(tcd),
    .in_valid(tv), .in_ready(tr), .in_data(td), .out_valid(tov), .out_ready(torr), .out_data(tod));
  tb_snk #(.W(W), .READY_PCT(100)) u_to (.clk, .rst, .valid(tov), .ready(torr), .data(tod));

  logic [W-1:0] exp_q[$], exp_t[$];

  task automatic check_rate(input string what, input longint at[$]);
    int bad = 0;
    for (int i = 1; i < at.size(); i++) if (at[i] - at[i-1] != 1) bad++;
    checks++;
    $display("%-16s first output at cycle %0d, %0d outputs in %0d cycles", what, at[0],
             at.size(), at[at.size()-1] - at[0] + 1);
    if (bad != 0) begin failures++; $display("%s: %0d gaps longer than one cycle", what, bad); end
  endtask

  initial begin
    for (int t = 0; t < T; t++) begin
      automatic int k = $urandom_range(0, 3);
      automatic logic [W-1:0] x = W'($urandom);
      automatic int m = $urandom_range(0, 1);
      automatic logic [W-1:0] y = W'($urandom);
      u_rc.q.push_back(k[1]);
      case (k[1])
        1'b0: g_leaf[0].u_c.q.push_back(k[0]);
        1'b1: g_leaf[1].u_c.q.push_back(k[0]);
      endcase
      u_fc.q.push_back(2'(k));
      case (k)
        0: begin g_in[0].u_s.q.push_back(x); g_fin[0].u_s.q.push_back(x); end
        1: begin g_in[1].u_s.q.push_back(x); g_fin[1].u_s.q.push_back(x); end
        2: begin g_in[2].u_s.q.push_back(x); g_fin[2].u_s.q.push_back(x); end
        default: begin g_in[3].u_s.q.push_back(x); g_fin[3].u_s.q.push_back(x); end
      endcase
      exp_q.push_back(x);
      u_tc.q.push_back(1'(m));
      if (m == 0) g_tin[0].u_s.q.push_back(y); else g_tin[1].u_s.q.push_back(y);
      exp_t.push_back(y);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (u_o.got.size() == T && u_fo.got.size() == T && u_to.got.size() == T);
    repeat (5) @(posedge clk);
    foreach (exp_q[i]) begin
      checks += 3;
      if (u_o.got[i] !== exp_q[i]) begin failures++; $display("tree token %0d wrong", i); end
      if (u_fo.got[i] !== exp_q[i]) begin failures++; $display("flat token %0d wrong", i); end
      if (u_to.got[i] !== exp_t[i]) begin failures++; $display("two-way token %0d wrong", i); end
    end
    check_rate("tree of MERGE2", u_o.at);
    check_rate("one MERGE4", u_fo.at);
    check_rate("one MERGE2", u_to.at);
    // The tree adds one pipeline stage of latency.
    checks++;
    if (u_o.at[0] != u_to.at[0] + 1) begin
      failures++; $display("tree latency %0d, two-way %0d", u_o.at[0], u_to.at[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
