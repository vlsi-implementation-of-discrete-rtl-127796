// transpose_mem: transposition memory between the row (front-end) and column (back-end) DCTs.
//
// A 128-word RAM in two halves of 64 words, one 8x8 block each, used alternately: while the
// front-end writes the rows of block B into one half, the back-end reads block B-1 column by
// column from the other. Everything is addressed by the 7-bit RAM counter cnt, which advances
// every cycle: cnt[6] is the half, cnt[5:3] the row, cnt[2:0] the slot of the word in the
// front-end's decimated output order. Address layout: {half, row, column}.
//   write: mem[{cnt[6],  cnt[5:3], dec_order(cnt[2:0])}] <= din         (row-wise)
//   read : dout <= mem[{~r[6], r[2:0], r[5:3]}], r = cnt + 1          (column-wise)
// The read is synchronous, so it runs one count ahead: dout in the cycle with count c is the
// word of column c[5:3], row c[2:0] of the other half. A read and a write of the same half
// never hit the same address. CNT_INIT aligns the counter with the front-end output: the word
// of slot 0 of row 0 must be on din when cnt = 0. The 7-bit counter whose low bits steer the
// front-end multiplexer follows the original design; the two-half organisation, the address
// layout and the synchronous read are this design's choices.
module transpose_mem #(
  parameter int         W        = 12,
  parameter logic [6:0] CNT_INIT = 7'd0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic [6:0]          cnt
);
  logic signed [W-1:0] mem [128];
  logic [6:0] wa, ra, rn;

  assign rn = cnt + 7'd1;
  assign wa = {cnt[6], cnt[5:3], dct_pkg::dec_order(cnt[2:0])};
  assign ra = {~rn[6], rn[2:0], rn[5:3]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= CNT_INIT;
    else        cnt <= rn;

  always_ff @(posedge clk) begin
    mem[wa] <= din;
    dout    <= mem[ra];
  end
endmodule
