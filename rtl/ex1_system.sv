// EXAMPLE_1: one FMADD shared by three call sites in sequence,
//
//   *[ c0 := FMADD(a0, b0); c1 := FMADD(a1, b1); c2 := FMADD(a2, b2);
//      res := c0 + c1 + c2 ]
//
// Each call site i sends (a_i, b_i) on its own replica IN_i of the unit's
// input channel and receives c_i on its own replica OUT_i of the output
// channel. The three uses are composed in sequence, so the control circuit
// is SEQ(SEQ(B0, B1), B2) over base access sequences: the inner SEQ gives
// C01 (call site 0 or 1), the outer one C012 (sites 0/1 or site 2), and its
// final access sequence is absorbed by a SINK. The same CTRL tokens steer a
// MERGE tree (IN_0, IN_1, IN_2 -> IN) and a SPLIT tree (OUT -> OUT_0, OUT_1,
// OUT_2), so each call site's operands reach the unit and its result comes
// back in program order; a three-input FUNC adds the three results.
//
// Both channels have the same control structure, so one control circuit is
// built and each CTRL stream is copied to the two trees; this sharing, the
// slack parameter and the clocked handshake are choices of this design.
//
// Interface: in_*[i] the (a_i, b_i) pair of call site i ({a, b}, a upper),
// res_* the result, all numbers W-bit unsigned; sink_count counts the
// tokens of the final access sequence (four per iteration). Reset is
// synchronous and active high.
module ex1_system
  import df_pkg::*;
#(
  parameter int unsigned W          = 32,
  parameter int unsigned CTRL_SLACK = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2:0]           in_valid,
  output logic [2:0]           in_ready,
  input  logic [2:0][2*W-1:0]  in_data,
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic [W-1:0]         res_data,
  output logic [31:0]          sink_count
);

  // Control: base sequences, SEQ(B0, B1), SEQ(S01, B2), SINK.
  logic [2:0] b_v, b_r, b_d;
  for (genvar i = 0; i < 3; i++) begin : g_base
    acc_base #(.INIT_BIT(1'b1)) u_base (
      .clk, .rst, .s_valid(b_v[i]), .s_ready(b_r[i]), .s_data(b_d[i])
    );
  end

  logic s01_v, s01_r, s01_d, s_v, s_r, s_d;
  logic [1:0] c_v, c_r, c_d;        // 0: C01, 1: C012
  logic [1:0] cs_v, cs_r, cs_d;     // after slack

  seq_ctrl u_seq01 (
    .clk, .rst,
    .sa_valid(b_v[0]), .sa_ready(b_r[0]), .sa_data(b_d[0]),
    .sb_valid(b_v[1]), .sb_ready(b_r[1]), .sb_data(b_d[1]),
    .c_valid(c_v[0]), .c_ready(c_r[0]), .c_data(c_d[0]),
    .s_valid(s01_v), .s_ready(s01_r), .s_data(s01_d)
  );

  seq_ctrl u_seq012 (
    .clk, .rst,
    .sa_valid(s01_v), .sa_ready(s01_r), .sa_data(s01_d),
    .sb_valid(b_v[2]), .sb_ready(b_r[2]), .sb_data(b_d[2]),
    .c_valid(c_v[1]), .c_ready(c_r[1]), .c_data(c_d[1]),
    .s_valid(s_v), .s_ready(s_r), .s_data(s_d)
  );

  df_sink #(.W(1), .CNT_W(32)) u_sink (
    .clk, .rst, .in_valid(s_v), .in_ready(s_r), .in_data(s_d), .count(sink_count)
  );

  // Each CTRL stream: slack, then a copy for the MERGE tree (0) and the
  // SPLIT tree (1).
  logic [1:0][1:0] cc_v, cc_r, cc_d;
  for (genvar i = 0; i < 2; i++) begin : g_ctrl
    df_slack #(.W(1), .DEPTH(CTRL_SLACK)) u_slack (
      .clk, .rst,
      .in_valid(c_v[i]), .in_ready(c_r[i]), .in_data(c_d[i]),
      .out_valid(cs_v[i]), .out_ready(cs_r[i]), .out_data(cs_d[i])
    );
    df_copy #(.W(1), .N(2)) u_copy (
      .clk, .rst,
      .in_valid(cs_v[i]), .in_ready(cs_r[i]), .in_data(cs_d[i]),
      .out_valid(cc_v[i]), .out_ready(cc_r[i]), .out_data(cc_d[i])
    );
  end

  // MERGE tree into the shared unit.
  logic          m01_v, m01_r, u_in_v, u_in_r;
  logic [2*W-1:0] m01_d, u_in_d;

  df_merge #(.W(2*W), .N(2)) u_merge01 (
    .clk, .rst,
    .c_valid(cc_v[0][0]), .c_ready(cc_r[0][0]), .c_data(cc_d[0][0]),
    .in_valid(in_valid[1:0]), .in_ready(in_ready[1:0]), .in_data(in_data[1:0]),
    .out_valid(m01_v), .out_ready(m01_r), .out_data(m01_d)
  );

  df_merge #(.W(2*W), .N(2)) u_merge012 (
    .clk, .rst,
    .c_valid(cc_v[1][0]), .c_ready(cc_r[1][0]), .c_data(cc_d[1][0]),
    .in_valid({in_valid[2], m01_v}), .in_ready({in_ready[2], m01_r}),
    .in_data({in_data[2], m01_d}),
    .out_valid(u_in_v), .out_ready(u_in_r), .out_data(u_in_d)
  );

  logic         u_out_v, u_out_r;
  logic [W-1:0] u_out_d;

  fmadd #(.W(W)) u_fmadd (
    .clk, .rst,
    .in_valid(u_in_v), .in_ready(u_in_r), .in_data(u_in_d),
    .out_valid(u_out_v), .out_ready(u_out_r), .out_data(u_out_d)
  );

  // SPLIT tree back to the call sites.
  logic [1:0]        o012_v, o012_r, o01_v, o01_r;
  logic [1:0][W-1:0] o012_d, o01_d;

  df_split #(.W(W), .N(2)) u_split012 (
    .clk, .rst,
    .in_valid(u_out_v), .in_ready(u_out_r), .in_data(u_out_d),
    .c_valid(cc_v[1][1]), .c_ready(cc_r[1][1]), .c_data(cc_d[1][1]),
    .out_valid(o012_v), .out_ready(o012_r), .out_data(o012_d)
  );

  df_split #(.W(W), .N(2)) u_split01 (
    .clk, .rst,
    .in_valid(o012_v[0]), .in_ready(o012_r[0]), .in_data(o012_d[0]),
    .c_valid(cc_v[0][1]), .c_ready(cc_r[0][1]), .c_data(cc_d[0][1]),
    .out_valid(o01_v), .out_ready(o01_r), .out_data(o01_d)
  );

  // res := c0 + c1 + c2.
  df_func #(.W(W), .NIN(3), .OP(FN_ADD)) u_sum (
    .clk, .rst,
    .in_valid({o012_v[1], o01_v}), .in_ready({o012_r[1], o01_r}),
    .in_data({o012_d[1], o01_d}),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data)
  );

endmodule
