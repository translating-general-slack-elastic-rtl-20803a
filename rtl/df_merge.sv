// MERGE: *[c?b; [b=0 -> in1?x [] b=1 -> in2?x ...]; out!x].
//
// A deterministic N-way merge: each control token names the input the next
// data token is taken from. The control token and the chosen data token are
// consumed in the same cycle, once the output buffer has room; the result
// leaves through a df_buf one cycle later. Inputs not named by the control
// token are left waiting, which is what keeps a MERGE deterministic and slack
// elastic (unlike a MIXER, which takes whichever input arrives first).
//
// Interface: c_* control channel (index of the input), in_*[i] data inputs,
// out_* data output. Reset is synchronous and active high.
module df_merge #(
  parameter int unsigned W  = 32,
  parameter int unsigned N  = 2,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 c_valid,
  output logic                 c_ready,
  input  logic [CW-1:0]        c_data,
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  input  logic [N-1:0][W-1:0]  in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [W-1:0]         out_data
);

  logic ob_ready, fire;

  assign fire    = c_valid && (int'(c_data) < N) && in_valid[c_data] && ob_ready;
  assign c_ready = fire;

  always_comb begin
    in_ready = '0;
    if (fire) in_ready[c_data] = 1'b1;
  end

  df_buf #(.W(W)) u_ob (
    .clk, .rst,
    .in_valid(fire), .in_ready(ob_ready), .in_data(in_data[c_data]),
    .out_valid, .out_ready, .out_data
  );

endmodule
