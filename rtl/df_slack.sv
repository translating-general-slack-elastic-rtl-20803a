// A chain of DEPTH BUF elements on one channel (DEPTH = 0 is a plain wire).
//
// Used to add slack to a channel of a slack-elastic circuit: the tokens and
// their order are unchanged, only their timing moves. Each stage is a df_buf
// holding two tokens and adding one cycle of latency.
//
// Interface: in_* input channel, out_* output channel. Reset is synchronous,
// active high, and empties every stage.
module df_slack #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [DEPTH:0]        v, r;
  logic [DEPTH:0][W-1:0] d;

  assign v[0]      = in_valid;
  assign d[0]      = in_data;
  assign in_ready  = r[0];
  assign out_valid = v[DEPTH];
  assign out_data  = d[DEPTH];
  assign r[DEPTH]  = out_ready;

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    df_buf #(.W(W)) u_buf (
      .clk, .rst,
      .in_valid(v[i]), .in_ready(r[i]), .in_data(d[i]),
      .out_valid(v[i+1]), .out_ready(r[i+1]), .out_data(d[i+1])
    );
  end

endmodule
