// odd_part: odd-indexed outputs of the 8-point shared-multiplier DCT (two complex rotations).
//
// From v(n) = x(n) - x(7-n) the odd outputs come in two complex pairs, each the sum of two
// rotations:
//   first 4T  (half = 0): Y(1) + jY(7) = exp(j*pi/16)  (v0 - jv3) + exp(j*5pi/16)  (v2 - jv1)
//   second 4T (half = 1): Y(3) + jY(5) = exp(j*3pi/16) (v0 + jv3) + exp(j*15pi/16) (v2 + jv1)
// Rotation A handles (v0, v3) and rotation B (v2, v1); the control bit flips the sign of the
// imaginary operand and switches every multiplier to its second constant. Six multipliers in
// all. The two rotations are added, scaled to Y(k)/2, rounded to OUT_FRAC fraction bits,
// saturated to OUT_W bits and registered on en4. Timing is the same as even_part.
module odd_part #(
  parameter int IN_W     = 9,
  parameter int IN_FRAC  = 0,
  parameter int OUT_W    = 12,
  parameter int OUT_FRAC = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en4,
  input  logic                    half,
  input  logic signed [IN_W-1:0]  v [4],
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int DW = IN_W + 1;
  localparam int RW = DW + dct_pkg::C_W + 2;
  localparam int SH = IN_FRAC + dct_pkg::C_FRAC + 1 - OUT_FRAC;

  logic signed [DW-1:0]    a_a, b_a, a_b, b_b;
  logic signed [RW-1:0]    re_a, im_a, re_b, im_b;
  logic signed [RW:0]      re, im;
  logic signed [OUT_W-1:0] re_r, im_r;

  assign a_a = DW'(v[0]);
  assign b_a = half ? DW'(v[3]) : -DW'(v[3]);
  assign a_b = DW'(v[2]);
  assign b_b = half ? DW'(v[1]) : -DW'(v[1]);

  cmul_shared #(.DW(DW), .ROT(dct_pkg::ROT_ODD_A)) u_rot_a (
    .clk, .rst_n, .en4, .half, .a(a_a), .b(b_a), .re(re_a), .im(im_a)
  );
  cmul_shared #(.DW(DW), .ROT(dct_pkg::ROT_ODD_B)) u_rot_b (
    .clk, .rst_n, .en4, .half, .a(a_b), .b(b_b), .re(re_b), .im(im_b)
  );

  rc_addsub #(.W(RW)) u_sum_re (.a(re_a), .b(re_b), .sub(1'b0), .s(re));
  rc_addsub #(.W(RW)) u_sum_im (.a(im_a), .b(im_b), .sub(1'b0), .s(im));

  scale_round #(.IW(RW+1), .SH(SH), .OW(OUT_W)) u_sr_re (.x(re), .y(re_r));
  scale_round #(.IW(RW+1), .SH(SH), .OW(OUT_W)) u_sr_im (.x(im), .y(im_r));

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
