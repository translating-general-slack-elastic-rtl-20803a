// Program side of EXAMPLE_2 with its two uses of the shared FMADD renamed
// to replicas (IN_0/OUT_0 at the first call site, IN_1/OUT_1 at the second)
// and the guard sends of the method added:
//
//   *[ X?(a0, b0, g0, g1, g2);
//      G0!g0; [g0 -> IN_0!(a0, b0); OUT_0?c0 [] else -> c0 := a0];
//      [g1 -> c1 := c0 [] else -> c1 := 2*c0];
//      G2!g2; [g2 -> IN_1!(c1, c1); OUT_1?c2 [] else -> c2 := c1];
//      RES!c2 ]
//
// The operands and guards, which the example leaves to the surrounding
// program ("..."), arrive together as one token on X; the result leaves on
// RES. The middle selection uses no shared channel, so its guard g1 is not
// sent to the control circuit. The document obtains this side by a standard
// dataflow translation it does not spell out; here it is a state machine
// doing one receive, send or assignment per cycle, each send through a
// df_buf. Numbers are W-bit unsigned and wrap.
//
// Interface: x_* the input token {g2, g1, g0, a0, b0} (b0 in the low bits),
// g0_*, g2_* one-bit guards, in_*[i] operand pair {a, b} for call site i,
// out_*[i] result of call site i, res_* the result. Reset is synchronous
// and active high.
module ex2_program #(
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [2*W+2:0]       x_data,
  output logic                 g0_valid,
  input  logic                 g0_ready,
  output logic                 g0_data,
  output logic                 g2_valid,
  input  logic                 g2_ready,
  output logic                 g2_data,
  output logic [1:0]           in_valid,
  input  logic [1:0]           in_ready,
  output logic [1:0][2*W-1:0]  in_data,
  input  logic [1:0]           out_valid,
  output logic [1:0]           out_ready,
  input  logic [1:0][W-1:0]    out_data,
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic [W-1:0]         res_data
);

  typedef enum logic [3:0] {
    ST_X, ST_G0, ST_IN0, ST_OUT0, ST_C1, ST_G2, ST_IN1, ST_OUT1, ST_RES
  } state_e;

  state_e       st;
  logic [W-1:0] a0, b0, c0, c1, c2;
  logic         g0, g1, g2;

  logic g0_room, g2_room, res_room;
  logic [1:0] in_room;

  assign x_ready      = (st == ST_X);
  assign out_ready[0] = (st == ST_OUT0);
  assign out_ready[1] = (st == ST_OUT1);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= ST_X;
      {a0, b0, c0, c1, c2} <= '0;
      {g0, g1, g2} <= '0;
    end else begin
      unique case (st)
        ST_X: if (x_valid) begin
          {g2, g1, g0, a0, b0} <= x_data;
          st <= ST_G0;
        end
        ST_G0:   if (g0_room) begin
                   if (g0) st <= ST_IN0;
                   else begin c0 <= a0; st <= ST_C1; end
                 end
        ST_IN0:  if (in_room[0]) st <= ST_OUT0;
        ST_OUT0: if (out_valid[0]) begin c0 <= out_data[0]; st <= ST_C1; end
        ST_C1:   begin c1 <= g1 ? c0 : W'(c0 << 1); st <= ST_G2; end
        ST_G2:   if (g2_room) begin
                   if (g2) st <= ST_IN1;
                   else begin c2 <= c1; st <= ST_RES; end
                 end
        ST_IN1:  if (in_room[1]) st <= ST_OUT1;
        ST_OUT1: if (out_valid[1]) begin c2 <= out_data[1]; st <= ST_RES; end
        ST_RES:  if (res_room) st <= ST_X;
        default: st <= ST_X;
      endcase
    end
  end

  df_buf #(.W(1)) u_g0 (
    .clk, .rst, .in_valid(st == ST_G0 && g0_room), .in_ready(g0_room), .in_data(g0),
    .out_valid(g0_valid), .out_ready(g0_ready), .out_data(g0_data)
  );
  df_buf #(.W(1)) u_g2 (
    .clk, .rst, .in_valid(st == ST_G2 && g2_room), .in_ready(g2_room), .in_data(g2),
    .out_valid(g2_valid), .out_ready(g2_ready), .out_data(g2_data)
  );
  df_buf #(.W(2*W)) u_in0 (
    .clk, .rst, .in_valid(st == ST_IN0 && in_room[0]), .in_ready(in_room[0]),
    .in_data({a0, b0}),
    .out_valid(in_valid[0]), .out_ready(in_ready[0]), .out_data(in_data[0])
  );
  df_buf #(.W(2*W)) u_in1 (
    .clk, .rst, .in_valid(st == ST_IN1 && in_room[1]), .in_ready(in_room[1]),
    .in_data({c1, c1}),
    .out_valid(in_valid[1]), .out_ready(in_ready[1]), .out_data(in_data[1])
  );
  df_buf #(.W(W)) u_res (
    .clk, .rst, .in_valid(st == ST_RES && res_room), .in_ready(res_room), .in_data(c2),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data)
  );

endmodule
