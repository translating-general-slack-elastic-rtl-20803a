// Testbench token source: offers the tokens queued in `q`, in order, on a
// valid/ready channel, idling at random in about IDLE_PCT percent of cycles.
// A token once offered stays on the channel until it is taken. `sent`
// counts the tokens taken.
module tb_src #(
  parameter int unsigned W        = 32,
  parameter int unsigned IDLE_PCT = 30
) (
  input  logic         clk,
  input  logic         rst,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] data
);
  logic [W-1:0] q[$];
  int sent = 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      data  <= '0;
    end else begin
      if (valid && ready) sent <= sent + 1;
      if (!valid || ready) begin
        if (q.size() > 0 && $urandom_range(0, 99) >= IDLE_PCT) begin
          valid <= 1'b1;
          data  <= q.pop_front();
        end else valid <= 1'b0;
      end
    end
  end

  // The offered token must not change until it is taken.
  logic         was_stalled = 1'b0;
  logic [W-1:0] held;
  always_ff @(posedge clk) begin
    was_stalled <= !rst && valid && !ready;
    held        <= data;
    if (!rst && was_stalled) assert (valid && data == held);
  end
endmodule
