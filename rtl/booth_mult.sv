// booth_mult: two's complement multiplier using the modified (radix-4) Booth algorithm.
//
// p = a * b for signed a (AW bits, the data) and b (BW bits, the recoded operand; in the DCT it
// is a constant). b is scanned in overlapping 3-bit groups {b[2i+1], b[2i], b[2i-1]}, each
// recoded to a digit in {-2,-1,0,+1,+2}; the partial product digit*a is weighted by 4^i and
// the ceil(BW/2) partial products are summed. Halving the number of partial products is what
// keeps the shared multipliers small. Purely combinational; in the DCT it has 4T to settle.
// The modified Booth algorithm follows the original chip; summing the partial products with
// plain adders (no particular array or tree) is this design's choice.
module booth_mult #(
  parameter int AW = 11,
  parameter int BW = 14
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int ND = (BW + 1) / 2;   // number of Booth digits
  localparam int BX = 2 * ND + 1;     // b sign-extended, with the implicit b[-1] = 0

  logic [BX-1:0] bx;
  logic signed [AW+BW-1:0] acc;
  logic signed [AW+BW-1:0] pp;
  logic signed [AW+BW-1:0] a_ext;

  always_comb begin
    bx    = {{(BX-BW-1){b[BW-1]}}, b, 1'b0};
    a_ext = (AW+BW)'(a);
    acc   = '0;
    for (int i = 0; i < ND; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp = a_ext;
        3'b011:         pp = a_ext <<< 1;
        3'b100:         pp = -(a_ext <<< 1);
        3'b101, 3'b110: pp = -a_ext;
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    p = acc;
  end
endmodule
