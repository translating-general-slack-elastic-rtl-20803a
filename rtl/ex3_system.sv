// EXAMPLE_3: one FMADD shared by a guarded call site and a call site inside
// a loop that is itself inside a selection,
//
//   *[ [g0 -> c0 := FMADD(a0, b0) [] else -> c0 := a0];
//      [g1 -> *[g2 -> c1 := FMADD(c0, c0); ...] [] else -> c1 := FUNC(c0)];
//      RES!c1 ]
//
// Here both the program and the control are dataflow circuits, so that work
// from different iterations can overlap:
//
//   - Call site 0: a SPLIT on g0 sends (a0, b0) either to the unit's input
//     replica IN_0 or, when g0 is 0, a0 on as c0; a MERGE on g0 takes c0
//     from the unit's output replica OUT_0 or from that bypass.
//   - Call site 1: a SPLIT on g1 sends c0 either to the loop process
//     (ex3_loop, which makes the IN_1/OUT_1 calls) or to FUNC; a MERGE on g1
//     collects c1 in program order.
//   - Control: base sequences B0, B1; IF1(g0, B0); LOOP_C(loop guard, B1);
//     IF1(g1, LOOP_C); SEQ of the two IF1 outputs. Its CTRL stream is copied
//     to the MERGE in front of the unit and the SPLIT behind it; its access
//     sequence ends in a SINK.
//
// Nothing here limits the number of tokens in flight, so while the loop of
// one iteration is still calling the unit, a later iteration with g0 = g1 =
// 0 can already pass through FUNC; the MERGE on g1 restores program order.
//
// FUNC, the loop body's "...", and where the guards come from are left open
// by the example. Here FUNC is the bitwise inverse, the loop guards g2
// arrive on their own channel, and g0, g1 and (a0, b0) arrive on separate
// channels. When g0 is 0 only a0 is used: b0 is dropped at the SPLIT, so
// the low half of its bypass output is left unconnected. c1 := c0 for a loop
// with no trips. Numbers are W-bit unsigned and wrap.
//
// Interface: g0_*, g1_* guards per iteration; ab_* operands {a0, b0} (b0 in
// the low bits); g2_* loop guards (one before the first trip and one after
// each trip, only in iterations with g1 = 1); res_* the result c1;
// sink_count tokens absorbed by the SINK. Reset is synchronous, active high.
module ex3_system
  import df_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           g0_valid,
  output logic           g0_ready,
  input  logic           g0_data,
  input  logic           g1_valid,
  output logic           g1_ready,
  input  logic           g1_data,
  input  logic           ab_valid,
  output logic           ab_ready,
  input  logic [2*W-1:0] ab_data,
  input  logic           g2_valid,
  output logic           g2_ready,
  input  logic           g2_data,
  output logic           res_valid,
  input  logic           res_ready,
  output logic [W-1:0]   res_data,
  output logic [31:0]    sink_count
);

  // Guards, each copied to the control circuit, its SPLIT and its MERGE.
  logic [2:0] k0_v, k0_r, k0_d, k1_v, k1_r, k1_d;
  df_copy #(.W(1), .N(3)) u_copy_g0 (
    .clk, .rst, .in_valid(g0_valid), .in_ready(g0_ready), .in_data(g0_data),
    .out_valid(k0_v), .out_ready(k0_r), .out_data(k0_d)
  );
  df_copy #(.W(1), .N(3)) u_copy_g1 (
    .clk, .rst, .in_valid(g1_valid), .in_ready(g1_ready), .in_data(g1_data),
    .out_valid(k1_v), .out_ready(k1_r), .out_data(k1_d)
  );

  // Shared unit with its replicas: index 0 call site 0, index 1 the loop.
  logic [1:0]          pin_v, pin_r, pout_v, pout_r;
  logic [1:0][2*W-1:0] pin_d;
  logic [1:0][W-1:0]   pout_d;

  // Call site 0.
  logic [1:0]          s0_v, s0_r;
  logic [1:0][2*W-1:0] s0_d;
  df_split #(.W(2*W), .N(2)) u_split_g0 (
    .clk, .rst,
    .in_valid(ab_valid), .in_ready(ab_ready), .in_data(ab_data),
    .c_valid(k0_v[1]), .c_ready(k0_r[1]), .c_data(k0_d[1]),
    .out_valid(s0_v), .out_ready(s0_r), .out_data(s0_d)
  );
  assign pin_v[0] = s0_v[1];
  assign s0_r[1]  = pin_r[0];
  assign pin_d[0] = s0_d[1];

  logic [1:0]          m0_v, m0_r;
  logic [1:0][W-1:0]   m0_d;
  assign m0_v  = {pout_v[0], s0_v[0]};
  assign m0_d  = {pout_d[0], s0_d[0][2*W-1:W]};
  assign s0_r[0]   = m0_r[0];
  assign pout_r[0] = m0_r[1];

  logic         c0_v, c0_r;
  logic [W-1:0] c0_d;
  df_merge #(.W(W), .N(2)) u_merge_g0 (
    .clk, .rst,
    .c_valid(k0_v[2]), .c_ready(k0_r[2]), .c_data(k0_d[2]),
    .in_valid(m0_v), .in_ready(m0_r), .in_data(m0_d),
    .out_valid(c0_v), .out_ready(c0_r), .out_data(c0_d)
  );

  // Call site 1: the loop branch or FUNC.
  logic [1:0]        s1_v, s1_r;
  logic [1:0][W-1:0] s1_d;
  df_split #(.W(W), .N(2)) u_split_g1 (
    .clk, .rst,
    .in_valid(c0_v), .in_ready(c0_r), .in_data(c0_d),
    .c_valid(k1_v[1]), .c_ready(k1_r[1]), .c_data(k1_d[1]),
    .out_valid(s1_v), .out_ready(s1_r), .out_data(s1_d)
  );

  logic [1:0]        m1_v, m1_r;
  logic [1:0][W-1:0] m1_d;
  df_func #(.W(W), .NIN(1), .OP(FN_NOT)) u_func (
    .clk, .rst,
    .in_valid(s1_v[0]), .in_ready(s1_r[0]), .in_data(s1_d[0]),
    .out_valid(m1_v[0]), .out_ready(m1_r[0]), .out_data(m1_d[0])
  );

  logic gl_v, gl_r, gl_d;
  ex3_loop #(.W(W)) u_loop (
    .clk, .rst,
    .l_valid(s1_v[1]), .l_ready(s1_r[1]), .l_data(s1_d[1]),
    .g2_valid, .g2_ready, .g2_data,
    .gl_valid(gl_v), .gl_ready(gl_r), .gl_data(gl_d),
    .in_valid(pin_v[1]), .in_ready(pin_r[1]), .in_data(pin_d[1]),
    .out_valid(pout_v[1]), .out_ready(pout_r[1]), .out_data(pout_d[1]),
    .c1_valid(m1_v[1]), .c1_ready(m1_r[1]), .c1_data(m1_d[1])
  );

  df_merge #(.W(W), .N(2)) u_merge_g1 (
    .clk, .rst,
    .c_valid(k1_v[2]), .c_ready(k1_r[2]), .c_data(k1_d[2]),
    .in_valid(m1_v), .in_ready(m1_r), .in_data(m1_d),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data)
  );

  // Control circuit.
  logic [1:0] b_v, b_r, b_d;
  for (genvar i = 0; i < 2; i++) begin : g_base
    acc_base #(.INIT_BIT(1'b1)) u_base (
      .clk, .rst, .s_valid(b_v[i]), .s_ready(b_r[i]), .s_data(b_d[i])
    );
  end

  logic f0_v, f0_r, f0_d, l_v, l_r, l_d, f1_v, f1_r, f1_d;
  if_ctrl #(.USED_BRANCH(1'b1)) u_if0 (
    .clk, .rst,
    .g_valid(k0_v[0]), .g_ready(k0_r[0]), .g_data(k0_d[0]),
    .sa_valid(b_v[0]), .sa_ready(b_r[0]), .sa_data(b_d[0]),
    .s_valid(f0_v), .s_ready(f0_r), .s_data(f0_d)
  );

  loop_ctrl u_loopc (
    .clk, .rst,
    .g_valid(gl_v), .g_ready(gl_r), .g_data(gl_d),
    .sa_valid(b_v[1]), .sa_ready(b_r[1]), .sa_data(b_d[1]),
    .s_valid(l_v), .s_ready(l_r), .s_data(l_d)
  );

  if_ctrl #(.USED_BRANCH(1'b1)) u_if1 (
    .clk, .rst,
    .g_valid(k1_v[0]), .g_ready(k1_r[0]), .g_data(k1_d[0]),
    .sa_valid(l_v), .sa_ready(l_r), .sa_data(l_d),
    .s_valid(f1_v), .s_ready(f1_r), .s_data(f1_d)
  );

  logic c_v, c_r, c_d, s_v, s_r, s_d;
  seq_ctrl u_seq (
    .clk, .rst,
    .sa_valid(f0_v), .sa_ready(f0_r), .sa_data(f0_d),
    .sb_valid(f1_v), .sb_ready(f1_r), .sb_data(f1_d),
    .c_valid(c_v), .c_ready(c_r), .c_data(c_d),
    .s_valid(s_v), .s_ready(s_r), .s_data(s_d)
  );

  df_sink #(.W(1), .CNT_W(32)) u_sink (
    .clk, .rst, .in_valid(s_v), .in_ready(s_r), .in_data(s_d), .count(sink_count)
  );

  logic [1:0] cc_v, cc_r, cc_d;
  df_copy #(.W(1), .N(2)) u_copy_c (
    .clk, .rst,
    .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
    .out_valid(cc_v), .out_ready(cc_r), .out_data(cc_d)
  );

  logic           u_in_v, u_in_r, u_out_v, u_out_r;
  logic [2*W-1:0] u_in_d;
  logic [W-1:0]   u_out_d;

  df_merge #(.W(2*W), .N(2)) u_merge_unit (
    .clk, .rst,
    .c_valid(cc_v[0]), .c_ready(cc_r[0]), .c_data(cc_d[0]),
    .in_valid(pin_v), .in_ready(pin_r), .in_data(pin_d),
    .out_valid(u_in_v), .out_ready(u_in_r), .out_data(u_in_d)
  );

  fmadd #(.W(W)) u_fmadd (
    .clk, .rst,
    .in_valid(u_in_v), .in_ready(u_in_r), .in_data(u_in_d),
    .out_valid(u_out_v), .out_ready(u_out_r), .out_data(u_out_d)
  );

  df_split #(.W(W), .N(2)) u_split_unit (
    .clk, .rst,
    .in_valid(u_out_v), .in_ready(u_out_r), .in_data(u_out_d),
    .c_valid(cc_v[1]), .c_ready(cc_r[1]), .c_data(cc_d[1]),
    .out_valid(pout_v), .out_ready(pout_r), .out_data(pout_d)
  );

endmodule
