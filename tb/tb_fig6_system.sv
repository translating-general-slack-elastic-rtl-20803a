// Self-checking testbench for fig6_system: the Section IV example program
// with channel A served by the slack-elastic control circuit.
//
// The testbench draws a random program run (a0 between 6 and 12, so the
// inner loop runs 0 to 4 times; b0 zero or not with equal chance), builds the
// token streams for channels A and B in the order the original program reads
// them, and computes the expected RES values with its own model of the
// program. It then offers the streams with random gaps and takes RES with
// random backpressure, and compares every RES token. It counts how often the
// run exercised a loop that does not run, a loop that runs several times,
// each branch of the selection, a stall on A and backpressure on RES, and
// counts a failure for any that never happened. The CTRL_SLACK parameter
// adds slack to the CTRL channels; the results must not depend on it.
module tb_fig6_system #(
  parameter int unsigned CTRL_SLACK = 1,
  parameter int unsigned N_OUTER    = 60
);
  localparam int unsigned W = 32;
  localparam int MAXT = 2000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic a_valid, a_ready, b_valid, b_ready, res_valid, res_ready;
  logic [W-1:0] a_data, b_data, res_data;
  logic [31:0] sink_count;

  fig6_system #(.W(W), .CTRL_SLACK(CTRL_SLACK)) dut (.*);

  logic [W-1:0] a_str [MAXT];
  logic [W-1:0] b_str [MAXT];
  logic [W-1:0] exp_res [N_OUTER];
  int na = 0, nb = 0;
  int checks = 0, failures = 0;
  int n_zero_trip = 0, n_multi_trip = 0, n_br0 = 0, n_br1 = 0, n_a_stall = 0, n_res_bp = 0;

  // Reference model of the original program.
  initial begin
    logic [W-1:0] res, a0, b0, x;
    res = '0;
    for (int o = 0; o < N_OUTER; o++) begin
      a0 = W'(6 + $urandom_range(0, 6));
      a_str[na++] = a0;
      if (a0 >= 10) n_zero_trip++;
      if (a0 <= 8) n_multi_trip++;
      while (a0 < 10) begin
        b0 = ($urandom_range(0, 1) == 0) ? '0 : W'($urandom_range(1, 1000));
        b_str[nb++] = b0;
        if (b0 == '0) begin
          n_br0++;
          x = W'($urandom); a_str[na++] = x; res = res + x;
        end else begin
          n_br1++;
          x = W'($urandom); a_str[na++] = x; res = res + x;
          x = W'($urandom); a_str[na++] = x; res = res + x;
        end
        a0 = a0 + 1;
      end
      exp_res[o] = res;
    end
  end

  // Environment: channel A and channel B with random gaps.
  int ai = 0, bi = 0;
  always_ff @(posedge clk) begin
    if (rst) begin
      a_valid <= 1'b0; b_valid <= 1'b0; ai <= 0; bi <= 0;
      a_data <= '0; b_data <= '0;
    end else begin
      if (a_valid && !a_ready) n_a_stall <= n_a_stall + 1;
      if (!a_valid || a_ready) begin
        if (a_valid) ai <= ai + 1;
        if ((a_valid ? ai + 1 : ai) < na && $urandom_range(0, 3) != 0) begin
          a_valid <= 1'b1; a_data <= a_str[a_valid ? ai + 1 : ai];
        end else a_valid <= 1'b0;
      end
      if (!b_valid || b_ready) begin
        if (b_valid) bi <= bi + 1;
        if ((b_valid ? bi + 1 : bi) < nb && $urandom_range(0, 3) != 0) begin
          b_valid <= 1'b1; b_data <= b_str[b_valid ? bi + 1 : bi];
        end else b_valid <= 1'b0;
      end
    end
  end

  int ri = 0;
  always_ff @(posedge clk) begin
    if (rst) res_ready <= 1'b0;
    else begin
      res_ready <= ($urandom_range(0, 2) != 0);
      if (res_valid && !res_ready) n_res_bp <= n_res_bp + 1;
      if (res_valid && res_ready) begin
        checks <= checks + 1;
        if (ri >= N_OUTER || res_data !== exp_res[ri]) begin
          failures <= failures + 1;
          $display("MISMATCH RES[%0d]: got %0d expected %0d", ri, res_data, exp_res[ri]);
        end
        ri <= ri + 1;
      end
    end
  end

  task automatic seen(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("NOT EXERCISED: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (ri == N_OUTER);
    repeat (50) @(posedge clk);
    // All of A and B consumed, and the SINK saw one token per access of A plus one per outer
    // iteration, plus the 1 announcing the next iteration's A0 access, which
    // the control circuit sends before that A token exists.
    checks += 3;
    if (ai != na) begin failures++; $display("A tokens taken %0d of %0d", ai, na); end
    if (bi != nb) begin failures++; $display("B tokens taken %0d of %0d", bi, nb); end
    if (sink_count != 32'(na + N_OUTER + 1)) begin
      failures++; $display("SINK count %0d expected %0d", sink_count, na + N_OUTER + 1);
    end
    seen("loop run zero times", n_zero_trip);
    seen("loop run several times", n_multi_trip);
    seen("branch b0 = 0 (A1)", n_br0);
    seen("branch b0 != 0 (A2;A3)", n_br1);
    seen("stall on channel A", n_a_stall);
    seen("backpressure on RES", n_res_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("WATCHDOG: %0d of %0d results", ri, N_OUTER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
