// scale_round: drop SH fraction bits with round-half-up, then saturate to OW bits.
//
// y = sat_OW( floor((x + 2^(SH-1)) / 2^SH) ). Used at the end of the even and odd parts to
// bring the full-precision rotation results to the output word of a 1-D DCT. Combinational.
// Rounding and saturation are choices of this design.
module scale_round #(
  parameter int IW = 28,
  parameter int SH = 13,
  parameter int OW = 12
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] y
);
  localparam logic signed [IW:0] HALF = (IW+1)'(1) <<< (SH - 1);
  localparam logic signed [IW:0] MAXV = (IW+1)'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [IW:0] MINV = -((IW+1)'(1) <<< (OW - 1));

  logic signed [IW:0] r;

  always_comb begin
    r = ((IW+1)'(x) + HALF) >>> SH;
    if (r > MAXV)      y = MAXV[OW-1:0];
    else if (r < MINV) y = MINV[OW-1:0];
    else               y = r[OW-1:0];
  end
endmodule
