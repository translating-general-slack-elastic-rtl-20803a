// Base access sequence generator: s := INIT_BIT; *[S!s; s := 1 - s].
//
// A channel replica used once per iteration of its statement has the access
// sequence 1,0,1,0,...: a 1 for the access and a 0 for the end of the
// iteration. This block produces that stream (INIT_BIT = 1); with INIT_BIT = 0
// it produces 0,1,0,1,..., the CTRL stream of a two-way alternating split.
//
// It is built from dataflow elements only, as a ring holding one token:
// INIT(INIT_BIT) -> COPY -> FUNC(not) -> back to INIT. One COPY output is the
// stream S. The token passes three elements per round, so S carries a new
// token at most every three cycles. The ring structure is this design's
// choice; the document only says that the generator is built from
// deterministic dataflow elements.
//
// Interface: s_* one-bit output channel. Reset is synchronous, active high.
module acc_base
  import df_pkg::*;
#(
  parameter logic INIT_BIT = 1'b1
) (
  input  logic clk,
  input  logic rst,
  output logic s_valid,
  input  logic s_ready,
  output logic s_data
);

  logic init_v, init_r, init_d;     // INIT -> COPY
  logic [1:0] cp_v, cp_r, cp_d;     // COPY outputs: 0 is S, 1 goes to FUNC
  logic fb_v, fb_r, fb_d;           // FUNC -> INIT

  df_init #(.W(1), .INIT_VALUE(INIT_BIT)) u_init (
    .clk, .rst,
    .in_valid(fb_v), .in_ready(fb_r), .in_data(fb_d),
    .out_valid(init_v), .out_ready(init_r), .out_data(init_d)
  );

  df_copy #(.W(1), .N(2)) u_copy (
    .clk, .rst,
    .in_valid(init_v), .in_ready(init_r), .in_data(init_d),
    .out_valid(cp_v), .out_ready(cp_r), .out_data(cp_d)
  );

  df_func #(.W(1), .NIN(1), .OP(FN_NOT)) u_not (
    .clk, .rst,
    .in_valid(cp_v[1]), .in_ready(cp_r[1]), .in_data(cp_d[1]),
    .out_valid(fb_v), .out_ready(fb_r), .out_data(fb_d)
  );

  assign s_valid = cp_v[0];
  assign s_data  = cp_d[0];
  assign cp_r[0] = s_ready;

endmodule
