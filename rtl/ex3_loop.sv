// Loop branch of EXAMPLE_3, the part of the program that runs when g1 holds:
//
//   *[ L?c0; c1 := c0; G2?g; GL!g;
//      *[ g -> IN_1!(c0, c0); OUT_1?c1; G2?g; GL!g ];
//      C1!c1 ]
//
// The loop calls the shared FMADD with (c0, c0) once per trip, keeping the
// last result as c1. The loop guard g comes in on G2 from the surrounding
// program (the document's "..." in the loop body) and is passed on to the
// LOOP_C control process on GL, once before the first trip and once after
// every trip. Because one sequential process sends both, no guard merge is
// needed. c1 := c0 before the loop, so a loop with no trips returns c0;
// the document does not say what c1 is then. This is a state machine doing
// one receive, send or assignment per cycle, each send through a df_buf.
//
// Interface: l_* c0 from the g1 SPLIT, g2_* loop guards in, gl_* loop
// guards to LOOP_C, in_* operand pair {c0, c0} to the unit, out_* unit
// result, c1_* result to the g1 MERGE. Reset is synchronous and active
// high.
module ex3_loop #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           l_valid,
  output logic           l_ready,
  input  logic [W-1:0]   l_data,
  input  logic           g2_valid,
  output logic           g2_ready,
  input  logic           g2_data,
  output logic           gl_valid,
  input  logic           gl_ready,
  output logic           gl_data,
  output logic           in_valid,
  input  logic           in_ready,
  output logic [2*W-1:0] in_data,
  input  logic           out_valid,
  output logic           out_ready,
  input  logic [W-1:0]   out_data,
  output logic           c1_valid,
  input  logic           c1_ready,
  output logic [W-1:0]   c1_data
);

  typedef enum logic [2:0] {ST_L, ST_G, ST_IN, ST_OUT, ST_C1} state_e;

  state_e       st;
  logic [W-1:0] c0, c1;
  logic         gl_room, in_room, c1_room;

  assign l_ready   = (st == ST_L);
  // Take a guard only when it can be passed on in the same cycle.
  assign g2_ready  = (st == ST_G) && gl_room;
  assign out_ready = (st == ST_OUT);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= ST_L;
      c0 <= '0;
      c1 <= '0;
    end else begin
      unique case (st)
        ST_L:   if (l_valid) begin c0 <= l_data; c1 <= l_data; st <= ST_G; end
        ST_G:   if (g2_valid && gl_room) st <= g2_data ? ST_IN : ST_C1;
        ST_IN:  if (in_room) st <= ST_OUT;
        ST_OUT: if (out_valid) begin c1 <= out_data; st <= ST_G; end
        ST_C1:  if (c1_room) st <= ST_L;
        default: st <= ST_L;
      endcase
    end
  end

  df_buf #(.W(1)) u_gl (
    .clk, .rst, .in_valid(st == ST_G && g2_valid && gl_room), .in_ready(gl_room),
    .in_data(g2_data),
    .out_valid(gl_valid), .out_ready(gl_ready), .out_data(gl_data)
  );
  df_buf #(.W(2*W)) u_in (
    .clk, .rst, .in_valid(st == ST_IN && in_room), .in_ready(in_room), .in_data({c0, c0}),
    .out_valid(in_valid), .out_ready(in_ready), .out_data(in_data)
  );
  df_buf #(.W(W)) u_c1 (
    .clk, .rst, .in_valid(st == ST_C1 && c1_room), .in_ready(c1_room), .in_data(c1),
    .out_valid(c1_valid), .out_ready(c1_ready), .out_data(c1_data)
  );

endmodule
