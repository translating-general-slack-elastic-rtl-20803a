// Testbench token sink: takes tokens from a valid/ready channel with ready
// high in about READY_PCT percent of cycles and keeps them, in order, in
// `got`, with the cycle each arrived in `at`.
module tb_snk #(
  parameter int unsigned W         = 32,
  parameter int unsigned READY_PCT = 70
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid,
  output logic         ready,
  input  logic [W-1:0] data
);
  logic [W-1:0] got[$];
  longint       at[$];
  longint       cycle = 0;
  int           stalls = 0;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) ready <= 1'b0;
    else begin
      if (valid && ready) begin
        got.push_back(data);
        at.push_back(cycle);
      end
      if (valid && !ready) stalls <= stalls + 1;
      ready <= ($urandom_range(0, 99) < READY_PCT);
    end
  end
endmodule
