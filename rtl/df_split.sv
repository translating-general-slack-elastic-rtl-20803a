// SPLIT: *[in?x, c?b; [b=0 -> out1!x [] b=1 -> out2!x ...]].
//
// A deterministic N-way split: each control token names the output the next
// data token goes to. Data and control are consumed together in a cycle
// where the chosen output's buffer has room; the token appears on that output
// one cycle later. Each output has its own df_buf, so a stalled output does
// not hold tokens already sent to another.
//
// Interface: in_* data input, c_* control channel (index of the output),
// out_*[i] data outputs. Reset is synchronous and active high.
module df_split #(
  parameter int unsigned W  = 32,
  parameter int unsigned N  = 2,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [W-1:0]         in_data,
  input  logic                 c_valid,
  output logic                 c_ready,
  input  logic [CW-1:0]        c_data,
  output logic [N-1:0]         out_valid,
  input  logic [N-1:0]         out_ready,
  output logic [N-1:0][W-1:0]  out_data
);

  logic [N-1:0] ob_ready, push;
  logic         fire;

  assign fire     = in_valid && c_valid && (int'(c_data) < N) && ob_ready[c_data];
  assign in_ready = fire;
  assign c_ready  = fire;

  always_comb begin
    push = '0;
    if (fire) push[c_data] = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    df_buf #(.W(W)) u_ob (
      .clk, .rst,
      .in_valid(push[i]), .in_ready(ob_ready[i]), .in_data(in_data),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(out_data[i])
    );
  end

endmodule
