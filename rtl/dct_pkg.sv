// dct_pkg: constants and helper functions shared by the 8-point shared-multiplier DCT.
//
// The 1-D DCT splits its 8 outputs into four complex pairs Y(k)+jY(8-k) and forms each pair
// as one or two complex rotations (a+jb)*exp(j*theta). A rotation is done with three real
// multiplications by the constants
//   K1 = cos(theta), K2 = cos(theta)+sin(theta), K3 = cos(theta)-sin(theta)
//   re = K1*(a+b) - K2*b ,  im = K1*(a+b) - K3*a
// Each multiplier is shared by two angles: theta0 in the first 4T of a data period and
// theta1 in the second 4T. The angles follow from the shared-multiplier derivation:
//   even part      : theta = pi/4  (Y0,Y4)   / pi/8   (Y2,Y6)
//   odd part, A    : theta = pi/16 (Y1,Y7)   / 3pi/16 (Y3,Y5)
//   odd part, B    : theta = 5pi/16          / 15pi/16
// Constants are two's complement with C_FRAC fraction bits: round(2^12 * K).
// The constant word length (14 bits, 12 fraction bits) is a choice of this design.
package dct_pkg;

  localparam int C_W    = 14;
  localparam int C_FRAC = 12;

  typedef logic signed [C_W-1:0] coef_t;

  // One shared multiplier: constant for control 0 and for control 1.
  typedef struct packed {
    coef_t c0;
    coef_t c1;
  } cpair_t;

  // The three shared multipliers of one complex rotation.
  typedef struct packed {
    cpair_t k1;  // cos(theta)            multiplies a+b
    cpair_t k2;  // cos(theta)+sin(theta) multiplies b
    cpair_t k3;  // cos(theta)-sin(theta) multiplies a
  } rot_consts_t;

  localparam rot_consts_t ROT_EVEN = '{
    k1: '{c0: 14'sd2896, c1: 14'sd3784},
    k2: '{c0: 14'sd5793, c1: 14'sd5352},
    k3: '{c0: 14'sd0,    c1: 14'sd2217}
  };
  localparam rot_consts_t ROT_ODD_A = '{
    k1: '{c0: 14'sd4017, c1: 14'sd3406},
    k2: '{c0: 14'sd4816, c1: 14'sd5681},
    k3: '{c0: 14'sd3218, c1: 14'sd1130}
  };
  localparam rot_consts_t ROT_ODD_B = '{
    k1: '{c0: 14'sd2276,  c1: -14'sd4017},
    k2: '{c0: 14'sd5681,  c1: -14'sd3218},
    k3: '{c0: -14'sd1130, c1: -14'sd4816}
  };

  // Coefficient index k sent in slot p (0..7) of the decimated output order
  // Y(0), Y(4), Y(1), Y(7), Y(2), Y(6), Y(3), Y(5).
  function automatic logic [2:0] dec_order(input logic [2:0] p);
    case (p)
      3'd0: return 3'd0;
      3'd1: return 3'd4;
      3'd2: return 3'd1;
      3'd3: return 3'd7;
      3'd4: return 3'd2;
      3'd5: return 3'd6;
      3'd6: return 3'd3;
      default: return 3'd5;
    endcase
  endfunction

endpackage
