// dct2d_top: 8x8 two-dimensional DCT, a row DCT, a transposition memory and a column DCT.
//
// Pixels enter one per clock cycle (CK_1), 8 bits, two's complement (level-shifted), the 64 of
// a block row by row, each row in natural order, blocks back to back with no gaps, starting
// with the first cycle after reset. Coefficients leave one per cycle, 12 bits, two's complement:
//   F(v,u) = 1/4 c(u) c(v) sum_y sum_x p(y,x) cos((2x+1)u pi/16) cos((2y+1)v pi/16),
// the orthonormal 2-D DCT (c(0) = 1/sqrt(2), else 1), u the horizontal and v the vertical
// frequency. Per block they come out u by u (u = 0..7), and for each u v = 0..7 in natural
// order. dout_valid marks every valid output word, dout_sob the first word F(0,0) of a block.
// Latency: F(0,0) of a block leaves 129 cycles after its first pixel entered; throughput is one
// pixel and one coefficient per cycle.
//
// Structure: clock_gen counts the phase T0..T7; the front-end dct1d (8-bit in, 12-bit out with
// 2 fraction bits, output Y/2 in decimated order) transforms rows; transpose_mem stores each
// block row-wise and reads the previous block column-wise; the back-end dct1d (12-bit in, 12-bit
// integer out, output Y/2 in natural order) transforms columns. The back-end runs on the
// complement phase of CK_8, 4T after the front-end, since the front-end output starts mid-period.
// The intermediate word length (12 bits, 2 fraction bits) and the scaling are this design's
// choices; the published architecture fixes only the 8-bit input, the 12-bit output, the two
// 1-D DCTs around a transposition memory and the natural output order.
module dct2d_top #(
  parameter int IN_W     = 8,
  parameter int OUT_W    = 12,
  parameter int MID_W    = 12,
  parameter int MID_FRAC = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic                    dout_sob,
  output logic                    ck4,
  output logic                    ck8
);
  localparam int LATENCY = 129;

  logic [2:0] t;

  // The dct1d units derive their enables from the phase; the complement clocks and enables of
  // clock_gen are not needed at this level.
  clock_gen u_clk (
    .clk, .rst_n, .t, .ck4, .ck4_n(), .ck8, .ck8_n(), .en4(), .en8()
  );

  // Front-end (row) DCT
  logic signed [MID_W-1:0] fe_dout;
  logic [2:0]              fe_k;

  dct1d #(.IN_W(IN_W), .IN_FRAC(0), .OUT_W(MID_W), .OUT_FRAC(MID_FRAC), .NATURAL(1'b0)) u_fe (
    .clk, .rst_n, .phase(t), .din, .dout(fe_dout), .dout_k(fe_k)
  );

  // Transposition memory; its counter is aligned with the front-end output: slot 0 of row 0
  // of the first block leaves the front-end 28 cycles after reset.
  logic signed [MID_W-1:0] tm_dout;
  logic [6:0]              tm_cnt;

  transpose_mem #(.W(MID_W), .CNT_INIT(7'(128 - 28))) u_tm (
    .clk, .rst_n, .din(fe_dout), .dout(tm_dout), .cnt(tm_cnt)
  );

  // Back-end (column) DCT on the complemented CK_8 phase
  logic [2:0] be_phase;
  logic [2:0] be_k;
  assign be_phase = {~t[2], t[1:0]};

  dct1d #(.IN_W(MID_W), .IN_FRAC(MID_FRAC), .OUT_W(OUT_W), .OUT_FRAC(0), .NATURAL(1'b1)) u_be (
    .clk, .rst_n, .phase(be_phase), .din(tm_dout), .dout, .dout_k(be_k)
  );

  // Output framing: valid once the first block has passed the whole pipeline.
  logic [7:0] start_cnt;
  logic [5:0] out_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_cnt  <= '0;
      dout_valid <= 1'b0;
      out_idx    <= '0;
    end else begin
      if (!dout_valid) begin
        start_cnt  <= start_cnt + 8'd1;
        dout_valid <= (start_cnt == 8'(LATENCY - 1));
      end else begin
        out_idx <= out_idx + 6'd1;
      end
    end
  end

  assign dout_sob = dout_valid && (out_idx == '0);

  // The RAM counter runs on the back-end phase, and its slot matches the front-end output.
  a_cnt_phase : assert property (@(posedge clk) disable iff (!rst_n)
                                 tm_cnt[2:0] == be_phase && fe_k == dct_pkg::dec_order(tm_cnt[2:0]));
  // The back-end output index must follow the natural order when data is valid.
  a_natural_order : assert property (@(posedge clk) disable iff (!rst_n)
                                     dout_valid |-> be_k == out_idx[2:0]);
endmodule
