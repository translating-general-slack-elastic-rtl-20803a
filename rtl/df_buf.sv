// BUF: *[in?x; out!x], a dataflow buffer that holds up to two tokens.
//
// The document's BUF is a one-place buffer. This one holds two tokens so that
// it can pass a token every cycle while its `in_ready` comes from its own
// state only; every element of the library drives its outputs through one of
// these, which keeps every ready signal out of combinational paths between
// elements. Extra capacity is harmless here because the circuits built from
// these elements are slack elastic. Tokens leave in the order they arrived,
// one cycle after they entered at the earliest.
//
// Interface: in_* is the input channel, out_* the output channel.
// Reset (synchronous, active high) empties the buffer.
module df_buf #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [W-1:0] slot0, slot1;   // slot0 is the head
  logic [1:0]   count;

  logic push, pop;
  assign in_ready  = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_data  = slot0;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= 2'd0;
      slot0 <= '0;
      slot1 <= '0;
    end else begin
      unique case ({push, pop})
        2'b10: begin
          if (count == 2'd0) slot0 <= in_data;
          else               slot1 <= in_data;
          count <= count + 2'd1;
        end
        2'b01: begin
          slot0 <= slot1;
          count <= count - 2'd1;
        end
        2'b11: begin
          if (count == 2'd1) slot0 <= in_data;
          else begin
            slot0 <= slot1;
            slot1 <= in_data;
          end
        end
        default: ;
      endcase
    end
  end

  // A token may not be dropped: pushes happen only while there is room.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(push && count == 2'd2));
  end

endmodule
