// Control circuit for the repeated input channel A of the example program
//
//   res := 0;
//   *[ A0?a0;
//      *[ a0 < 10 -> B?b0;
//         [ b0 = 0 -> A1?a1; res := res + a1
//         [] else  -> A2?a2; A3?a3; res := res + a2 + a3 ];
//         a0 := a0 + 1 ];
//      RES!res ]
//
// in which the four uses of A have been renamed to the replicas A0..A3. The
// circuit follows the program's structure bottom-up:
//   step 1  one base access sequence (1,0,1,0,...) per replica, B0..B3;
//   step 2  SEQ(B2, B3) for A2; A3 gives CTRL C0 and access sequence S0;
//           SPLIT(C0) divides replica A23 into A2 (0) and A3 (1);
//   step 3  SEL(b0 guard, B1, S0) gives C1 and S1;
//           SPLIT(C1) divides A123 into A1 (0) and A23 (1);
//   step 4  LOOP_C(loop guard, S1) gives S2; A'123 is A123 itself;
//   step 5  SEQ(B0, S2) gives C2 and S3; SPLIT(C2) divides the environment's
//           channel A into A0 (0) and A'123 (1); S3 goes to a SINK.
// Every CTRL channel passes CTRL_SLACK extra BUF stages (0 allowed), which
// changes timing only. The structure is the document's; the synchronous
// handshake, the buffering and the slack parameter are this design's.
//
// Interface: a_* the environment's channel A; gsel_* the b0 guard (0 selects
// the A1 branch) and gloop_* the loop guard (1 runs the body), both sent by
// the program; ar_*[i] the replicas A0..A3 delivered to the program;
// sink_count counts the tokens the SINK absorbed (one per access of A plus
// one per outer iteration).
// Reset is synchronous and active high.
module fig6_ctrl #(
  parameter int unsigned W          = 32,
  parameter int unsigned CTRL_SLACK = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                a_valid,
  output logic                a_ready,
  input  logic [W-1:0]        a_data,
  input  logic                gsel_valid,
  output logic                gsel_ready,
  input  logic                gsel_data,
  input  logic                gloop_valid,
  output logic                gloop_ready,
  input  logic                gloop_data,
  output logic [3:0]          ar_valid,
  input  logic [3:0]          ar_ready,
  output logic [3:0][W-1:0]   ar_data,
  output logic [31:0]         sink_count
);

  // Step 1: base access sequences B0..B3.
  logic [3:0] b_v, b_r, b_d;
  for (genvar i = 0; i < 4; i++) begin : g_base
    acc_base #(.INIT_BIT(1'b1)) u_base (
      .clk, .rst, .s_valid(b_v[i]), .s_ready(b_r[i]), .s_data(b_d[i])
    );
  end

  // Access sequences S0..S3 and CTRL channels C0..C2 (before and after slack).
  logic [3:0] s_v, s_r, s_d;
  logic [2:0] c_v, c_r, c_d;        // at the control block
  logic [2:0] cs_v, cs_r, cs_d;     // at the SPLIT

  for (genvar i = 0; i < 3; i++) begin : g_slack
    df_slack #(.W(1), .DEPTH(CTRL_SLACK)) u_slack (
      .clk, .rst,
      .in_valid(c_v[i]), .in_ready(c_r[i]), .in_data(c_d[i]),
      .out_valid(cs_v[i]), .out_ready(cs_r[i]), .out_data(cs_d[i])
    );
  end

  // Step 2: A2; A3.
  seq_ctrl u_seq0 (
    .clk, .rst,
    .sa_valid(b_v[2]), .sa_ready(b_r[2]), .sa_data(b_d[2]),
    .sb_valid(b_v[3]), .sb_ready(b_r[3]), .sb_data(b_d[3]),
    .c_valid(c_v[0]), .c_ready(c_r[0]), .c_data(c_d[0]),
    .s_valid(s_v[0]), .s_ready(s_r[0]), .s_data(s_d[0])
  );

  // Step 3: [b0 = 0 -> A1 [] else -> A2; A3].
  sel_ctrl u_sel1 (
    .clk, .rst,
    .g_valid(gsel_valid), .g_ready(gsel_ready), .g_data(gsel_data),
    .sa_valid(b_v[1]), .sa_ready(b_r[1]), .sa_data(b_d[1]),
    .sb_valid(s_v[0]), .sb_ready(s_r[0]), .sb_data(s_d[0]),
    .c_valid(c_v[1]), .c_ready(c_r[1]), .c_data(c_d[1]),
    .s_valid(s_v[1]), .s_ready(s_r[1]), .s_data(s_d[1])
  );

  // Step 4: *[a0 < 10 -> ...].
  loop_ctrl u_loop2 (
    .clk, .rst,
    .g_valid(gloop_valid), .g_ready(gloop_ready), .g_data(gloop_data),
    .sa_valid(s_v[1]), .sa_ready(s_r[1]), .sa_data(s_d[1]),
    .s_valid(s_v[2]), .s_ready(s_r[2]), .s_data(s_d[2])
  );

  // Step 5: A0?a0; loop.
  seq_ctrl u_seq3 (
    .clk, .rst,
    .sa_valid(b_v[0]), .sa_ready(b_r[0]), .sa_data(b_d[0]),
    .sb_valid(s_v[2]), .sb_ready(s_r[2]), .sb_data(s_d[2]),
    .c_valid(c_v[2]), .c_ready(c_r[2]), .c_data(c_d[2]),
    .s_valid(s_v[3]), .s_ready(s_r[3]), .s_data(s_d[3])
  );

  // The access sequence of A itself is not needed.
  df_sink #(.W(1), .CNT_W(32)) u_sink (
    .clk, .rst,
    .in_valid(s_v[3]), .in_ready(s_r[3]), .in_data(s_d[3]), .count(sink_count)
  );

  // Datapath: SPLIT tree from A to the replicas.
  logic [1:0]        t2_v, t2_r;      // SPLIT(C2) outputs: A0, A'123
  logic [1:0][W-1:0] t2_d;
  logic [1:0]        t1_v, t1_r;      // SPLIT(C1) outputs: A1, A23
  logic [1:0][W-1:0] t1_d;
  logic [1:0]        t0_v, t0_r;      // SPLIT(C0) outputs: A2, A3
  logic [1:0][W-1:0] t0_d;

  df_split #(.W(W), .N(2)) u_split2 (
    .clk, .rst,
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .c_valid(cs_v[2]), .c_ready(cs_r[2]), .c_data(cs_d[2]),
    .out_valid(t2_v), .out_ready(t2_r), .out_data(t2_d)
  );

  df_split #(.W(W), .N(2)) u_split1 (
    .clk, .rst,
    .in_valid(t2_v[1]), .in_ready(t2_r[1]), .in_data(t2_d[1]),
    .c_valid(cs_v[1]), .c_ready(cs_r[1]), .c_data(cs_d[1]),
    .out_valid(t1_v), .out_ready(t1_r), .out_data(t1_d)
  );

  df_split #(.W(W), .N(2)) u_split0 (
    .clk, .rst,
    .in_valid(t1_v[1]), .in_ready(t1_r[1]), .in_data(t1_d[1]),
    .c_valid(cs_v[0]), .c_ready(cs_r[0]), .c_data(cs_d[0]),
    .out_valid(t0_v), .out_ready(t0_r), .out_data(t0_d)
  );

  assign ar_valid = {t0_v[1], t0_v[0], t1_v[0], t2_v[0]};
  assign ar_data  = {t0_d[1], t0_d[0], t1_d[0], t2_d[0]};
  assign t2_r[0]  = ar_ready[0];
  assign t1_r[0]  = ar_ready[1];
  assign t0_r[0]  = ar_ready[2];
  assign t0_r[1]  = ar_ready[3];

endmodule
