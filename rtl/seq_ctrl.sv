// SEQ: control for the sequential composition A; B of two program fragments
// that both use the shared channel.
//
//   s := 0; *[ [!s -> SA?seq [] s -> SB?seq];
//              [seq -> C!s [] !seq -> s := !s];
//              [s & !seq -> skip [] else -> S!seq] ]
//
// SA and SB carry the access sequences of the two fragments' replicas (a 1
// per access, a 0 at the end of an iteration). For every access the block
// sends on C which replica it belongs to (0 for A, 1 for B); this steers the
// MERGE or SPLIT that joins the two replicas. On S it sends the access
// sequence of the joined replica: the 1s of A, then the 1s of B, then one 0.
//
// Each step takes one token from SA or SB and may write C and S; it happens
// in a cycle where the token is there and the outputs it writes have buffer
// room, and the outputs appear one cycle later. Interface: sa_*, sb_* input
// channels, c_* CTRL output, s_* access-sequence output (all one bit).
// Reset is synchronous, active high, and sets s to 0 as the process does.
module seq_ctrl (
  input  logic clk,
  input  logic rst,
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

  logic s;                       // 0: serving fragment A, 1: fragment B
  logic in_v, seq, s_next;
  logic need_c, need_s, c_room, s_room, fire;

  assign in_v   = s ? sb_valid : sa_valid;
  assign seq    = s ? sb_data  : sa_data;
  assign s_next = seq ? s : !s;
  assign need_c = seq;
  assign need_s = !(s_next && !seq);
  assign fire   = in_v && (!need_c || c_room) && (!need_s || s_room);

  assign sa_ready = fire && !s;
  assign sb_ready = fire &&  s;

  always_ff @(posedge clk) begin
    if (rst)       s <= 1'b0;
    else if (fire) s <= s_next;
  end

  df_buf #(.W(1)) u_c (
    .clk, .rst,
    .in_valid(fire && need_c), .in_ready(c_room), .in_data(s),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

  df_buf #(.W(1)) u_s (
    .clk, .rst,
    .in_valid(fire && need_s), .in_ready(s_room), .in_data(seq),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

endmodule
