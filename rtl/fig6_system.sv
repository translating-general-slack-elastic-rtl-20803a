// The Section IV example program with its repeated channel A served by the
// slack-elastic control circuit of fig6_ctrl.
//
// example_prog is the program with A replaced by the replicas A0..A3; it
// sends the b0 guard to the control circuit and its loop guard on G0/G1,
// which guard_merge joins into LOOP_C's guard. fig6_ctrl reads the
// environment's channel A and hands each token to the replica that the
// original program would have read it with, so the system as a whole
// behaves like the original program reading A four times per iteration.
//
// Interface: a_* channel A, b_* channel B, res_* channel RES (all W bits),
// sink_count tokens absorbed by the control circuit's SINK (one per access
// of A plus one per outer iteration). Reset is synchronous and active high.
module fig6_system #(
  parameter int unsigned W          = 32,
  parameter int unsigned CTRL_SLACK = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [W-1:0] a_data,
  input  logic         b_valid,
  output logic         b_ready,
  input  logic [W-1:0] b_data,
  output logic         res_valid,
  input  logic         res_ready,
  output logic [W-1:0] res_data,
  output logic [31:0]  sink_count
);

  logic [3:0]         ar_v, ar_r;
  logic [3:0][W-1:0]  ar_d;
  logic g0_v, g0_r, g0_d, g1_v, g1_r, g1_d;
  logic gs_v, gs_r, gs_d, gl_v, gl_r, gl_d;

  example_prog #(.W(W)) u_prog (
    .clk, .rst,
    .ar_valid(ar_v), .ar_ready(ar_r), .ar_data(ar_d),
    .b_valid, .b_ready, .b_data,
    .g0_valid(g0_v), .g0_ready(g0_r), .g0_data(g0_d),
    .g1_valid(g1_v), .g1_ready(g1_r), .g1_data(g1_d),
    .gs_valid(gs_v), .gs_ready(gs_r), .gs_data(gs_d),
    .res_valid, .res_ready, .res_data
  );

  guard_merge u_gmerge (
    .clk, .rst,
    .g0_valid(g0_v), .g0_ready(g0_r), .g0_data(g0_d),
    .g1_valid(g1_v), .g1_ready(g1_r), .g1_data(g1_d),
    .g_valid(gl_v), .g_ready(gl_r), .g_data(gl_d)
  );

  fig6_ctrl #(.W(W), .CTRL_SLACK(CTRL_SLACK)) u_ctrl (
    .clk, .rst,
    .a_valid, .a_ready, .a_data,
    .gsel_valid(gs_v), .gsel_ready(gs_r), .gsel_data(gs_d),
    .gloop_valid(gl_v), .gloop_ready(gl_r), .gloop_data(gl_d),
    .ar_valid(ar_v), .ar_ready(ar_r), .ar_data(ar_d),
    .sink_count
  );

endmodule
