// dct1d: 8-point 1-D DCT based on the shared-multiplier algorithm (front-end or back-end).
//
// Computes Y(k)/2 for Y(k) = c(k) * sum_n x(n) cos((2n+1) k pi / 16), c(0) = 1/sqrt(2), else 1.
// Words enter one per cycle in natural order; phase (0..7) is the slot of the current input
// word, so a block starts when phase = 0. The functional blocks are:
//   sp_buffer    serial-to-parallel input buffer (holds a block for 8T)
//   butterfly    u(n) = x(n)+x(7-n), v(n) = x(n)-x(7-n)            (8T, registered on T7)
//   even_part    Y(0),Y(4) then Y(2),Y(6)  with 3 shared multipliers (4T per stage)
//   odd_part     Y(1),Y(7) then Y(3),Y(5)  with 6 shared multipliers (4T per stage)
//   output buffer: NATURAL = 0 -> obuf_decimated, order Y0,Y4,Y1,Y7,Y2,Y6,Y3,Y5 (front-end)
//                  NATURAL = 1 -> obuf_natural,   order Y0..Y7                (back-end)
// The half-period control bit is phase[2] when the operands are taken (0 in the first 4T).
// Fixed point: din has IN_FRAC fraction bits, dout has OUT_FRAC; dout is rounded and saturated.
// The block structure and the output orders follow the original architecture; the scaling by
// 1/2, the word lengths and the exact pipeline register placement are this design's choices.
// Timing: the block whose word 0 enters in cycle c leaves in cycles c+28 .. c+35
// (NATURAL = 0, decimated order) or c+37 .. c+44 (NATURAL = 1, natural order); one block per
// 8 cycles, continuously. dout_k is the index k of the word on dout.
module dct1d #(
  parameter int IN_W     = 8,
  parameter int IN_FRAC  = 0,
  parameter int OUT_W    = 12,
  parameter int OUT_FRAC = 2,
  parameter bit NATURAL  = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              phase,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic [2:0]              dout_k
);
  logic en4, en8, half;
  assign en4  = &phase[1:0];
  assign en8  = &phase;
  assign half = phase[2];

  logic signed [IN_W-1:0]  x [8];
  logic signed [IN_W:0]    u [4];
  logic signed [IN_W:0]    v [4];
  logic signed [OUT_W-1:0] ev_re, ev_im, od_re, od_im;
  logic signed [OUT_W-1:0] ser;
  logic [2:0]              pos;

  sp_buffer #(.W(IN_W)) u_ibuf (.clk, .rst_n, .phase, .din, .x);

  butterfly #(.W(IN_W)) u_bfly (.clk, .rst_n, .en8, .x, .u, .v);

  even_part #(.IN_W(IN_W+1), .IN_FRAC(IN_FRAC), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_even (
    .clk, .rst_n, .en4, .half, .u, .y_re(ev_re), .y_im(ev_im)
  );
  odd_part #(.IN_W(IN_W+1), .IN_FRAC(IN_FRAC), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_odd (
    .clk, .rst_n, .en4, .half, .v, .y_re(od_re), .y_im(od_im)
  );

  // The even/odd output registers change on en4; the pair taken with half = 0 is on them while
  // phase = 4..7, so the slot of the serial word in the decimated order is phase + 4 (mod 8).
  assign pos = {~phase[2], phase[1:0]};

  obuf_decimated #(.W(OUT_W)) u_obuf_dec (
    .sel(phase[1:0]), .even_re(ev_re), .even_im(ev_im), .odd_re(od_re), .odd_im(od_im),
    .dout(ser)
  );

  if (NATURAL) begin : g_nat
    obuf_natural #(.W(OUT_W)) u_obuf_nat (.clk, .rst_n, .pos, .din(ser), .dout, .dout_k);
  end else begin : g_dec
    assign dout   = ser;
    assign dout_k = dct_pkg::dec_order(pos);
  end
endmodule
