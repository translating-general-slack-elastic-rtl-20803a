// EXAMPLE_2: one FMADD shared by two call sites that each run only if their
// guard holds,
//
//   *[ [g0 -> c0 := FMADD(a0, b0) [] else -> c0 := a0];
//      [g1 -> c1 := c0 [] else -> c1 := 2*c0];
//      [g2 -> c2 := FMADD(c1, c1) [] else -> c2 := c1] ]
//
// Each call site sits in a selection whose other branch does not use the
// unit, so its access sequence comes from IF1 (guard 0: no access, a single
// 0; guard 1: the base sequence 1,0). SEQ joins the two into the CTRL stream
// for a MERGE (IN_0, IN_1 -> unit input) and, through a COPY, a SPLIT (unit
// output -> OUT_0, OUT_1); its final access sequence goes to a SINK. The
// selection on g1 has no access and takes no part in the control: access to
// the unit depends on g0 and g2 only.
//
// The operand and guard token format, the reuse of one CTRL stream for both
// channels and the clocked handshake are choices of this design.
//
// Interface: x_* the input token {g2, g1, g0, a0, b0} (b0 in the low bits),
// res_* the result c2, sink_count tokens absorbed by the SINK. Reset is
// synchronous and active high.
module ex2_system #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           x_valid,
  output logic           x_ready,
  input  logic [2*W+2:0] x_data,
  output logic           res_valid,
  input  logic           res_ready,
  output logic [W-1:0]   res_data,
  output logic [31:0]    sink_count
);

  logic g0_v, g0_r, g0_d, g2_v, g2_r, g2_d;
  logic [1:0]          pin_v, pin_r, pout_v, pout_r;
  logic [1:0][2*W-1:0] pin_d;
  logic [1:0][W-1:0]   pout_d;

  ex2_program #(.W(W)) u_prog (
    .clk, .rst,
    .x_valid, .x_ready, .x_data,
    .g0_valid(g0_v), .g0_ready(g0_r), .g0_data(g0_d),
    .g2_valid(g2_v), .g2_ready(g2_r), .g2_data(g2_d),
    .in_valid(pin_v), .in_ready(pin_r), .in_data(pin_d),
    .out_valid(pout_v), .out_ready(pout_r), .out_data(pout_d),
    .res_valid, .res_ready, .res_data
  );

  // Control: base sequences, IF1 per call site, SEQ, SINK.
  logic [1:0] b_v, b_r, b_d, f_v, f_r, f_d;
  for (genvar i = 0; i < 2; i++) begin : g_base
    acc_base #(.INIT_BIT(1'b1)) u_base (
      .clk, .rst, .s_valid(b_v[i]), .s_ready(b_r[i]), .s_data(b_d[i])
    );
  end

  if_ctrl #(.USED_BRANCH(1'b1)) u_if0 (
    .clk, .rst,
    .g_valid(g0_v), .g_ready(g0_r), .g_data(g0_d),
    .sa_valid(b_v[0]), .sa_ready(b_r[0]), .sa_data(b_d[0]),
    .s_valid(f_v[0]), .s_ready(f_r[0]), .s_data(f_d[0])
  );

  if_ctrl #(.USED_BRANCH(1'b1)) u_if2 (
    .clk, .rst,
    .g_valid(g2_v), .g_ready(g2_r), .g_data(g2_d),
    .sa_valid(b_v[1]), .sa_ready(b_r[1]), .sa_data(b_d[1]),
    .s_valid(f_v[1]), .s_ready(f_r[1]), .s_data(f_d[1])
  );

  logic c_v, c_r, c_d, s_v, s_r, s_d;
  seq_ctrl u_seq (
    .clk, .rst,
    .sa_valid(f_v[0]), .sa_ready(f_r[0]), .sa_data(f_d[0]),
    .sb_valid(f_v[1]), .sb_ready(f_r[1]), .sb_data(f_d[1]),
    .c_valid(c_v), .c_ready(c_r), .c_data(c_d),
    .s_valid(s_v), .s_ready(s_r), .s_data(s_d)
  );

  df_sink #(.W(1), .CNT_W(32)) u_sink (
    .clk, .rst, .in_valid(s_v), .in_ready(s_r), .in_data(s_d), .count(sink_count)
  );

  logic [1:0] cc_v, cc_r, cc_d;
  df_copy #(.W(1), .N(2)) u_copy (
    .clk, .rst,
    .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
    .out_valid(cc_v), .out_ready(cc_r), .out_data(cc_d)
  );

  logic           u_in_v, u_in_r, u_out_v, u_out_r;
  logic [2*W-1:0] u_in_d;
  logic [W-1:0]   u_out_d;

  df_merge #(.W(2*W), .N(2)) u_merge (
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

  df_split #(.W(W), .N(2)) u_split (
    .clk, .rst,
    .in_valid(u_out_v), .in_ready(u_out_r), .in_data(u_out_d),
    .c_valid(cc_v[1]), .c_ready(cc_r[1]), .c_data(cc_d[1]),
    .out_valid(pout_v), .out_ready(pout_r), .out_data(pout_d)
  );

endmodule
