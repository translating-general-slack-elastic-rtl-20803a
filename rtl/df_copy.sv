// COPY: *[in?x; out1!x, out2!x ...].
//
// Sends every input token to all N outputs. The token is taken only when
// every output buffer has room, so the outputs see the same sequence; after
// that each output drains at its own pace.
//
// Interface: in_* input channel, out_*[i] output channels. Reset is
// synchronous and active high.
module df_copy #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [W-1:0]         in_data,
  output logic [N-1:0]         out_valid,
  input  logic [N-1:0]         out_ready,
  output logic [N-1:0][W-1:0]  out_data
);

  logic [N-1:0] ob_ready;
  logic         fire;

  assign fire     = in_valid && (&ob_ready);
  assign in_ready = fire;

  for (genvar i = 0; i < N; i++) begin : g_out
    df_buf #(.W(W)) u_ob (
      .clk, .rst,
      .in_valid(fire), .in_ready(ob_ready[i]), .in_data(in_data),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(out_data[i])
    );
  end

endmodule
