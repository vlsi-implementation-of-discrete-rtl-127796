// cmul_shared: complex rotation (a + jb) * exp(j*theta) with three shared multipliers.
//
// The 4-multiplication complex product is reduced to three real multiplications:
//   s  = a + b
//   re = K1*s - K2*b      (K1 = cos(theta), K2 = cos(theta)+sin(theta))
//   im = K1*s - K3*a      (K3 = cos(theta)-sin(theta))
// Each of the three multipliers holds two constants (ROT.kN.c0 / .c1), selected by the
// half-period control bit, so one unit computes two different rotations per data period.
// Pipeline (registers enabled by en4, i.e. every 4T):
//   stage 1: a, b, s = a+b and the control bit are registered (the pre-adder has 4T);
//   stage 2: the three products are registered (each multiplier has 4T);
//   re/im are combinational from stage 2 (the post-adders); the caller registers them.
// Result scale: re, im carry C_FRAC more fraction bits than a and b.
module cmul_shared #(
  parameter int                   DW  = 10,
  parameter dct_pkg::rot_consts_t ROT = dct_pkg::ROT_EVEN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en4,
  input  logic                     half,
  input  logic signed [DW-1:0]     a,
  input  logic signed [DW-1:0]     b,
  output logic signed [DW+dct_pkg::C_W+1:0] re,
  output logic signed [DW+dct_pkg::C_W+1:0] im
);
  localparam int CW = dct_pkg::C_W;
  localparam int PW = DW + 1 + CW;   // product width (s is DW+1 bits)

  logic signed [DW:0]   s_c;
  logic signed [DW:0]   a_q, b_q, s_q;
  logic                 half_q;
  logic signed [PW-1:0] m1, m2, m3;
  logic signed [PW-1:0] m1_q, m2_q, m3_q;

  rc_addsub #(.W(DW)) u_pre (.a(a), .b(b), .sub(1'b0), .s(s_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; s_q <= '0; half_q <= 1'b0;
      m1_q <= '0; m2_q <= '0; m3_q <= '0;
    end else if (en4) begin
      a_q    <= (DW+1)'(a);
      b_q    <= (DW+1)'(b);
      s_q    <= s_c;
      half_q <= half;
      m1_q   <= m1;
      m2_q   <= m2;
      m3_q   <= m3;
    end
  end

  shared_mult #(.AW(DW+1), .CW(CW), .C0(ROT.k1.c0), .C1(ROT.k1.c1))
    u_k1 (.a(s_q), .sel(half_q), .p(m1));
  shared_mult #(.AW(DW+1), .CW(CW), .C0(ROT.k2.c0), .C1(ROT.k2.c1))
    u_k2 (.a(b_q), .sel(half_q), .p(m2));
  shared_mult #(.AW(DW+1), .CW(CW), .C0(ROT.k3.c0), .C1(ROT.k3.c1))
    u_k3 (.a(a_q), .sel(half_q), .p(m3));

  rc_addsub #(.W(PW)) u_re (.a(m1_q), .b(m2_q), .sub(1'b1), .s(re));
  rc_addsub #(.W(PW)) u_im (.a(m1_q), .b(m3_q), .sub(1'b1), .s(im));
endmodule
