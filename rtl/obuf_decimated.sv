// obuf_decimated: parallel-to-serial output buffer of the front-end 1-D DCT.
//
// The even and odd parts each hold one output pair for 4T. A 4-to-1 multiplexer steered by the
// lowest 2 bits of the RAM counter sends them one per cycle: even_re, even_im, odd_re, odd_im,
// which over a whole data period is Y(0), Y(4), Y(1), Y(7), Y(2), Y(6), Y(3), Y(5). The
// transposition memory accepts this decimated order, so no reordering is needed. Combinational.
// Both the order and the counter-driven multiplexer follow the original design.
module obuf_decimated #(
  parameter int W = 12
) (
  input  logic [1:0]          sel,
  input  logic signed [W-1:0] even_re,
  input  logic signed [W-1:0] even_im,
  input  logic signed [W-1:0] odd_re,
  input  logic signed [W-1:0] odd_im,
  output logic signed [W-1:0] dout
);
  always_comb begin
    unique case (sel)
      2'd0: dout = even_re;
      2'd1: dout = even_im;
      2'd2: dout = odd_re;
      default: dout = odd_im;
    endcase
  end
endmodule
