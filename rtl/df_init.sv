// INIT: out!const; *[in?x; out!x].
//
// A two-token buffer like df_buf that, after reset, already holds one token of
// value INIT_VALUE; from then on it forwards its input in order. It is the
// element that puts the initial token into a ring of dataflow elements.
//
// Interface: in_* input channel, out_* output channel. Reset is synchronous
// and active high. The constant is a parameter; the document leaves it open.
module df_init #(
  parameter int unsigned    W          = 32,
  parameter logic [W-1:0]   INIT_VALUE = '0
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

  logic [W-1:0] slot0, slot1;
  logic [1:0]   count;

  logic push, pop;
  assign in_ready  = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_data  = slot0;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= 2'd1;            // the initial token
      slot0 <= INIT_VALUE;
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

endmodule
