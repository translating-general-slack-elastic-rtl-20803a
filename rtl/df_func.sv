// FUNC: *[in1?x, in2?y ...; out!f(x, y ...)].
//
// Waits for one token on every one of its NIN inputs, consumes them together
// and sends f of their values one cycle later. The document leaves f open;
// here OP selects it: FN_ADD is the wrapping sum of all inputs, FN_NOT the
// bitwise inverse of input 0 (other inputs, if any, are still consumed).
//
// Interface: in_*[i] inputs, out_* output. Reset is synchronous, active high.
module df_func
  import df_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned NIN = 2,
  parameter func_op_e    OP  = FN_ADD
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NIN-1:0]         in_valid,
  output logic [NIN-1:0]         in_ready,
  input  logic [NIN-1:0][W-1:0]  in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data
);

  logic         ob_ready, fire;
  logic [W-1:0] f;

  assign fire     = (&in_valid) && ob_ready;
  assign in_ready = {NIN{fire}};

  always_comb begin
    f = '0;
    unique case (OP)
      FN_ADD: for (int i = 0; i < NIN; i++) f = f + in_data[i];
      FN_NOT: f = ~in_data[0];
      default: f = '0;
    endcase
  end

  df_buf #(.W(W)) u_ob (
    .clk, .rst,
    .in_valid(fire), .in_ready(ob_ready), .in_data(f),
    .out_valid, .out_ready, .out_data
  );

endmodule
