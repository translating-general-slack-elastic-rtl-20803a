// Guard merge for loops: s := 0; *[ [!s -> G0?s [] s -> G1?s]; G!s ].
//
// A loop *[guard -> A] must report its guard to LOOP_C once before the loop
// and once after every body iteration. The program sends the first on G0 and
// the others on G1; this block merges them into the single guard channel G
// in program order: after a 0 (loop exit) the next guard comes from G0, after
// a 1 from G1. It is a MERGE whose control token is its own last output.
//
// A step takes one guard token and sends it on G one cycle later.
// Interface: g0_*, g1_* one-bit inputs, g_* one-bit output. Reset is
// synchronous, active high, and clears s as the process does.
module guard_merge (
  input  logic clk,
  input  logic rst,
  input  logic g0_valid,
  output logic g0_ready,
  input  logic g0_data,
  input  logic g1_valid,
  output logic g1_ready,
  input  logic g1_data,
  output logic g_valid,
  input  logic g_ready,
  output logic g_data
);

  logic s, in_v, in_d, room, fire;

  assign in_v     = s ? g1_valid : g0_valid;
  assign in_d     = s ? g1_data  : g0_data;
  assign fire     = in_v && room;
  assign g0_ready = fire && !s;
  assign g1_ready = fire &&  s;

  always_ff @(posedge clk) begin
    if (rst)       s <= 1'b0;
    else if (fire) s <= in_d;
  end

  df_buf #(.W(1)) u_g (
    .clk, .rst,
    .in_valid(fire), .in_ready(room), .in_data(in_d),
    .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data)
  );

endmodule
