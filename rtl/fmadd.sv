// FMADD: a shared unit with internal state (Section V-B).
//
//   count := 0; sum := 0;
//   *[ I0?a, I1?b; sum := a*b + sum; O!sum;
//      [count = 2 -> sum := 0, count := 0 [] else -> count := count + 1] ]
//
// Each access multiplies its two operands, adds the product to the running
// sum and sends the new sum; after every third access sum and count return
// to zero. Because the result depends on how many accesses came before, the
// unit gives the intended results only if its callers reach it in program
// order, which is the point of the example.
//
// a and b arrive together as one token on in_* ({a, b}, a in the upper half);
// the result leaves on out_* one cycle after the access. Numbers are W-bit
// unsigned and the product and sum wrap, a choice of this design. Reset is
// synchronous, active high, and clears sum and count.
module fmadd #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [2*W-1:0] in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [W-1:0]   out_data
);

  logic [W-1:0] sum, a, b, sum_next;
  logic [1:0]   count;
  logic         room, fire;

  assign a        = in_data[2*W-1:W];
  assign b        = in_data[W-1:0];
  assign sum_next = W'(a * b) + sum;
  assign fire     = in_valid && room;
  assign in_ready = fire;

  always_ff @(posedge clk) begin
    if (rst) begin
      sum   <= '0;
      count <= '0;
    end else if (fire) begin
      if (count == 2'd2) begin
        sum   <= '0;
        count <= '0;
      end else begin
        sum   <= sum_next;
        count <= count + 2'd1;
      end
    end
  end

  df_buf #(.W(W)) u_o (
    .clk, .rst,
    .in_valid(fire), .in_ready(room), .in_data(sum_next),
    .out_valid, .out_ready, .out_data
  );

endmodule
