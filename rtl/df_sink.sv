// SINK: *[in?x].
//
// Absorbs every token it is offered, in the cycle it is offered. It also
// counts the tokens it has absorbed (wrapping at 2**CNT_W); the count is an
// addition of this design so that a system can report how often a stream
// that is otherwise thrown away has produced a token.
//
// Interface: in_* input channel, count number of tokens absorbed since reset.
// Reset is synchronous and active high.
module df_sink #(
  parameter int unsigned W     = 32,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W-1:0]     in_data,
  output logic [CNT_W-1:0] count
);

  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst)           count <= '0;
    else if (in_valid) count <= count + 1'b1;
  end

  // The value is discarded by definition.
  logic unused;
  assign unused = ^in_data;

endmodule
