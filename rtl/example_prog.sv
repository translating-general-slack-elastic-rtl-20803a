// Program side of the Section IV example after its channel A is split into
// replicas A0..A3 and the guard sends of the method are added:
//
//   res := 0;
//   *[ A0?a0; G0!(a0 < 10);
//      *[ a0 < 10 -> B?b0; GS!(b0 != 0);
//         [ b0 = 0 -> A1?a1; res := res + a1
//         [] else  -> A2?a2; A3?a3; res := res + a2 + a3 ];
//         a0 := a0 + 1; G1!(a0 < 10) ];
//      RES!res ]
//
// G0 and G1 carry the loop guard (merged for LOOP_C by guard_merge) and GS
// the selection guard for SEL. The document obtains this side by a standard
// translation into dataflow that it does not spell out; here it is a state
// machine that performs one receive, send or assignment per cycle, with
// each send going through a df_buf. Values are W-bit unsigned and wrap.
// res is cleared only by reset, as in the listing.
//
// Interface: ar_*[i] replica A_i, b_* channel B, g0_*, g1_*, gs_* guard
// outputs (one bit), res_* channel RES. Reset is synchronous, active high.
module example_prog #(
  parameter int unsigned W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [3:0]         ar_valid,
  output logic [3:0]         ar_ready,
  input  logic [3:0][W-1:0]  ar_data,
  input  logic               b_valid,
  output logic               b_ready,
  input  logic [W-1:0]       b_data,
  output logic               g0_valid,
  input  logic               g0_ready,
  output logic               g0_data,
  output logic               g1_valid,
  input  logic               g1_ready,
  output logic               g1_data,
  output logic               gs_valid,
  input  logic               gs_ready,
  output logic               gs_data,
  output logic               res_valid,
  input  logic               res_ready,
  output logic [W-1:0]       res_data
);

  typedef enum logic [3:0] {
    ST_A0, ST_G0, ST_B, ST_GS, ST_A1, ST_A2, ST_A3, ST_INC, ST_G1, ST_RES
  } state_e;

  localparam logic [W-1:0] LIMIT = W'(10);

  state_e       st;
  logic [W-1:0] a0, b0, a2, res;

  logic g0_room, g1_room, gs_room, res_room;
  logic g0_push, g1_push, gs_push, res_push;

  assign ar_ready[0] = (st == ST_A0);
  assign ar_ready[1] = (st == ST_A1);
  assign ar_ready[2] = (st == ST_A2);
  assign ar_ready[3] = (st == ST_A3);
  assign b_ready     = (st == ST_B);
  assign g0_push     = (st == ST_G0)  && g0_room;
  assign g1_push     = (st == ST_G1)  && g1_room;
  assign gs_push     = (st == ST_GS)  && gs_room;
  assign res_push    = (st == ST_RES) && res_room;

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= ST_A0;
      a0  <= '0;
      b0  <= '0;
      a2  <= '0;
      res <= '0;
    end else begin
      unique case (st)
        ST_A0:  if (ar_valid[0]) begin a0 <= ar_data[0]; st <= ST_G0; end
        ST_G0:  if (g0_push) st <= (a0 < LIMIT) ? ST_B : ST_RES;
        ST_B:   if (b_valid) begin b0 <= b_data; st <= ST_GS; end
        ST_GS:  if (gs_push) st <= (b0 == '0) ? ST_A1 : ST_A2;
        ST_A1:  if (ar_valid[1]) begin res <= res + ar_data[1]; st <= ST_INC; end
        ST_A2:  if (ar_valid[2]) begin a2 <= ar_data[2]; st <= ST_A3; end
        ST_A3:  if (ar_valid[3]) begin res <= res + a2 + ar_data[3]; st <= ST_INC; end
        ST_INC: begin a0 <= a0 + 1'b1; st <= ST_G1; end
        ST_G1:  if (g1_push) st <= (a0 < LIMIT) ? ST_B : ST_RES;
        ST_RES: if (res_push) st <= ST_A0;
        default: st <= ST_A0;
      endcase
    end
  end

  df_buf #(.W(1)) u_g0 (
    .clk, .rst, .in_valid(g0_push), .in_ready(g0_room), .in_data(a0 < LIMIT),
    .out_valid(g0_valid), .out_ready(g0_ready), .out_data(g0_data)
  );
  df_buf #(.W(1)) u_g1 (
    .clk, .rst, .in_valid(g1_push), .in_ready(g1_room), .in_data(a0 < LIMIT),
    .out_valid(g1_valid), .out_ready(g1_ready), .out_data(g1_data)
  );
  df_buf #(.W(1)) u_gs (
    .clk, .rst, .in_valid(gs_push), .in_ready(gs_room), .in_data(b0 != '0),
    .out_valid(gs_valid), .out_ready(gs_ready), .out_data(gs_data)
  );
  df_buf #(.W(W)) u_res (
    .clk, .rst, .in_valid(res_push), .in_ready(res_room), .in_data(res),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data)
  );

endmodule
