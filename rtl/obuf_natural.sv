// obuf_natural: output buffer of the back-end 1-D DCT, decimated order to natural order.
//
// Input words arrive one per cycle in decimated order; pos (0..7) is the slot in the order
// Y(0), Y(4), Y(1), Y(7), Y(2), Y(6), Y(3), Y(5). A demultiplexer enables exactly one capture
// register per cycle, the one of coefficient k = dec_order(pos). When the last word (pos 7)
// arrives, all eight are copied in parallel into an output bank, and a multiplexer then sends
// them in natural order k = 0..7 during the next 8 cycles (k = pos), through an output register.
// The second bank is this design's choice: without it Y(4) would be overwritten by the next
// block before its turn. Timing: word k of a block appears on dout 2 + k cycles after the
// cycle in which its pos-7 word was on din; dout_k gives k of dout.
module obuf_natural #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          pos,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic [2:0]          dout_k
);
  logic signed [W-1:0] cap  [8];
  logic signed [W-1:0] bank [8];
  logic [2:0]          k_in;

  assign k_in = dct_pkg::dec_order(pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        cap[i]  <= '0;
        bank[i] <= '0;
      end
      dout   <= '0;
      dout_k <= '0;
    end else begin
      cap[k_in] <= din;
      if (pos == 3'd7) begin
        for (int i = 0; i < 8; i++) bank[i] <= (i == int'(k_in)) ? din : cap[i];
      end
      dout   <= bank[pos];
      dout_k <= pos;
    end
  end
endmodule
