// sp_buffer: serial-to-parallel input buffer of a 1-D DCT.
//
// Words arrive one per cycle in natural order x(0)..x(7); phase gives the slot T0..T7 of the
// current word. Seven words are shifted into a shift register; in T7 the seven stored words
// and the eighth, arriving one, are loaded together into a holding register, which then keeps
// the whole block for the next 8T while the following block is shifted in. x[n] is x(n) of the
// last complete block, valid from the cycle after T7 for eight cycles. The shift-then-load
// structure follows the original input buffer; loading in T7 is this design's timing choice.
module sp_buffer #(
  parameter int W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          phase,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] x [8]
);
  logic signed [W-1:0] sr [7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 7; i++) sr[i] <= '0;
      for (int i = 0; i < 8; i++) x[i]  <= '0;
    end else begin
      for (int i = 0; i < 6; i++) sr[i] <= sr[i+1];
      sr[6] <= din;
      if (phase == 3'd7) begin
        for (int i = 0; i < 7; i++) x[i] <= sr[i];
        x[7] <= din;
      end
    end
  end
endmodule
