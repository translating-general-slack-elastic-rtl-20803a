// LOOP_C: access sequence of a loop *[guard -> A] whose body uses the
// shared channel.
//
//   seq := 0, g := 0;
//   *[ [!seq -> G?g [] else -> skip];
//      [seq | g -> SA?seq [] else -> skip];
//      [(g & seq) | (!g & !seq) -> S!seq [] else -> skip] ]
//
// While the loop runs (guard 1) the body's 1s are forwarded and the 0 that
// ends each body iteration is dropped; when the guard is 0 the block sends
// one 0, ending the loop's access sequence. The body replica connects
// straight through, so there is no CTRL output.
//
// The guard token is latched as soon as one is needed, so the guard channel
// never waits on the body's access sequence. A step happens in a cycle where
// the tokens it reads are there and, if it writes S, S has buffer room; S
// appears one cycle later. Interface: g_* loop guard, sa_* access sequence of
// the body, s_* access sequence of the loop (all one bit). Reset is
// synchronous, active high, and clears seq and g as the process does.
module loop_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic g_valid,
  output logic g_ready,
  input  logic g_data,
  input  logic sa_valid,
  output logic sa_ready,
  input  logic sa_data,
  output logic s_valid,
  input  logic s_ready,
  output logic s_data
);

  logic seq, g, have_g;
  logic need_g, g_ok, g_eff, use_sa, seq_next, send, s_room, fire;

  assign need_g   = !seq;
  assign g_ready  = need_g && !have_g;
  assign g_ok     = !need_g || have_g || g_valid;
  assign g_eff    = (need_g && !have_g) ? g_data : g;
  assign use_sa   = seq || g_eff;
  assign seq_next = use_sa ? sa_data : seq;
  assign send     = (g_eff && seq_next) || (!g_eff && !seq_next);
  assign fire     = g_ok && (!use_sa || sa_valid) && (!send || s_room);
  assign sa_ready = fire && use_sa;

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

  df_buf #(.W(1)) u_s (
    .clk, .rst,
    .in_valid(fire && send), .in_ready(s_room), .in_data(seq_next),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

endmodule
