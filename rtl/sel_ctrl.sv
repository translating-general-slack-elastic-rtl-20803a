// SEL: control for a two-way selection [guard = 0 -> A [] else -> B] in which
// both branches use the shared channel.
//
//   seq := 0; *[ [!seq -> G?g [] else -> skip];
//                [g = 0 -> SA?seq [] else -> SB?seq];
//                [seq -> C!g [] else -> skip]; S!seq ]
//
// For the taken branch it forwards that branch's access sequence to S, and
// for every access (every 1) it sends the guard value on C, which steers the
// MERGE or SPLIT joining the two replicas (0 for A, 1 for B).
//
// The guard token is latched as soon as one is needed, so the guard channel
// never waits on the access sequences. Each step takes one token from SA or
// SB and writes S, and C for an access; outputs appear one cycle later.
// Interface: g_* guard, sa_*, sb_* access sequences of the two branches,
// c_* CTRL output, s_* access sequence output (all one bit). Reset is
// synchronous, active high, and clears seq as the process does.
module sel_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic g_valid,
  output logic g_ready,
  input  logic g_data,
  input  logic sa_valid,
  output logic sa_ready,
  input  logic sa_data,
  input  logic sb_valid,
  output logic sb_ready,
  input  logic sb_data,
  output logic c_valid,
  input  logic c_ready,
  output logic c_data,
  output logic s_valid,
  input  logic s_ready,
  output logic s_data
);

  logic seq, g, have_g;
  logic need_g, g_ok, g_eff, in_v, seq_next, c_room, s_room, fire;

  assign need_g   = !seq;
  assign g_ready  = need_g && !have_g;
  assign g_ok     = !need_g || have_g || g_valid;
  assign g_eff    = (need_g && !have_g) ? g_data : g;
  assign in_v     = g_eff ? sb_valid : sa_valid;
  assign seq_next = g_eff ? sb_data  : sa_data;
  assign fire     = g_ok && in_v && s_room && (!seq_next || c_room);
  assign sa_ready = fire && !g_eff;
  assign sb_ready = fire &&  g_eff;

  always_ff @(posedge clk) begin
    if (rst) begin
      seq    <= 1'b0;
      g      <= 1'b0;
      have_g <= 1'b0;
    end else begin
      if (fire) begin
        seq    <= seq_next;
        g      <= g_eff;
        have_g <= 1'b0;
      end else if (g_valid && g_ready) begin
        g      <= g_data;
        have_g <= 1'b1;
      end
    end
  end

  df_buf #(.W(1)) u_c (
    .clk, .rst,
    .in_valid(fire && seq_next), .in_ready(c_room), .in_data(g_eff),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

  df_buf #(.W(1)) u_s (
    .clk, .rst,
    .in_valid(fire), .in_ready(s_room), .in_data(seq_next),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

endmodule
