// IF0 / IF1: access sequence of a two-way selection
// [guard = 0 -> A [] else -> B] in which only one branch uses the channel.
//
//   IF0: seq := 0; *[ [!seq -> G?g [] else -> skip];
//                     [g = 0 -> SA?seq [] else -> seq := 0]; S!seq ]
//   IF1: the same with the branches exchanged: g = 0 gives seq := 0 and any
//        other guard value receives SB?seq.
//
// USED_BRANCH selects which (0: IF0, the channel is used in the g = 0
// branch; 1: IF1). When the branch that uses the channel is taken, the
// block forwards that branch's access sequence up to and including its 0;
// otherwise it sends a single 0. The replica itself needs no CTRL.
//
// A guard token is taken as soon as one is needed and kept in a register, so
// the guard channel never waits on the access sequence. Each step then sends
// one S token, one cycle after the step. Interface: g_* guard input,
// sa_* access-sequence input of the branch that uses the channel, s_*
// access-sequence output (all one bit). Reset is synchronous, active high,
// and clears seq as the process does.
module if_ctrl #(
  parameter bit USED_BRANCH = 1'b0
) (
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

  logic seq;          // last access-sequence value sent
  logic g;            // guard of the current iteration
  logic have_g;       // a guard for the next iteration is already latched
  logic need_g, g_ok, g_eff, use_sa, s_room, fire, seq_next;

  assign need_g  = !seq;
  assign g_ready = need_g && !have_g;
  assign g_ok    = !need_g || have_g || g_valid;
  assign g_eff   = (need_g && !have_g) ? g_data : g;
  assign use_sa  = (g_eff == USED_BRANCH);
  assign fire    = g_ok && (!use_sa || sa_valid) && s_room;
  assign sa_ready = fire && use_sa;
  assign seq_next = use_sa ? sa_data : 1'b0;

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
    .in_valid(fire), .in_ready(s_room), .in_data(seq_next),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

endmodule
