// even_part: even-indexed outputs of the 8-point shared-multiplier DCT (one complex rotation).
//
// From u(n) = x(n) + x(7-n) the even outputs come in two complex pairs:
//   first 4T  (half = 0): Y(0) + jY(4) = exp(j*pi/4) * [(u0+u3) - j(u1+u2)]
//   second 4T (half = 1): Y(2) + jY(6) = exp(j*pi/8) * [(u0-u3) + j(u2-u1)]
// Two controlled adders/subtractors form the operands (the control bit picks + or -), and one
// cmul_shared unit, whose three multipliers each hold the constant of both angles, does the
// rotation. The results are scaled to Y(k)/2, rounded to OUT_FRAC fraction bits, saturated to
// OUT_W bits and registered on en4.
// Timing: operands registered on the en4 of the same half, products 4T later, outputs 4T after
// that; y_re/y_im hold one pair for 4T, 8T after the operands were taken.
module even_part #(
  parameter int IN_W     = 9,
  parameter int IN_FRAC  = 0,
  parameter int OUT_W    = 12,
  parameter int OUT_FRAC = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en4,
  input  logic                    half,
  input  logic signed [IN_W-1:0]  u [4],
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int DW = IN_W + 2;
  localparam int RW = DW + dct_pkg::C_W + 2;
  localparam int SH = IN_FRAC + dct_pkg::C_FRAC + 1 - OUT_FRAC;

  logic signed [IN_W:0]      a_s, b_s;
  logic signed [DW-1:0]      a, b;
  logic signed [RW-1:0]      re, im;
  logic signed [OUT_W-1:0]   re_r, im_r;

  // a = u0 + u3 / u0 - u3 ; b = -(u1 + u2) / -(u1 - u2)
  rc_addsub #(.W(IN_W)) u_a (.a(u[0]), .b(u[3]), .sub(half), .s(a_s));
  rc_addsub #(.W(IN_W)) u_b (.a(u[1]), .b(u[2]), .sub(half), .s(b_s));
  assign a = DW'(a_s);
  assign b = -DW'(b_s);

  cmul_shared #(.DW(DW), .ROT(dct_pkg::ROT_EVEN)) u_rot (
    .clk, .rst_n, .en4, .half, .a, .b, .re, .im
  );

  scale_round #(.IW(RW), .SH(SH), .OW(OUT_W)) u_sr_re (.x(re), .y(re_r));
  scale_round #(.IW(RW), .SH(SH), .OW(OUT_W)) u_sr_im (.x(im), .y(im_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en4) begin
      y_re <= re_r;
      y_im <= im_r;
    end
  end
endmodule
