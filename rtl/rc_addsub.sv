// rc_addsub: ripple-carry adder/subtractor with an operation control bit.
//
// s = a + b when sub = 0, s = a - b when sub = 1, for two's complement operands of W bits. The
// result is W+1 bits wide, so it never overflows. Subtraction inverts b and sets the carry in,
// and the carry ripples through one full adder per bit: the slow but small adder type chosen
// for the DCT, whose adders have 4T or 8T to settle. Purely combinational.
module rc_addsub #(
  parameter int W = 9
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  output logic signed [W:0]   s
);
  logic [W:0]   ax, bx;
  logic [W+1:0] c;

  assign ax   = {a[W-1], a};
  assign bx   = {b[W-1], b} ^ {(W+1){sub}};
  assign c[0] = sub;

  for (genvar i = 0; i <= W; i++) begin : g_fa
    assign s[i]   = ax[i] ^ bx[i] ^ c[i];
    assign c[i+1] = (ax[i] & bx[i]) | (c[i] & (ax[i] ^ bx[i]));
  end
endmodule
