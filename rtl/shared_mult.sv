// shared_mult: one multiplier shared by two constants.
//
// The key resource saving of the shared-multiplier DCT: a single modified-Booth multiplier
// serves two fixed coefficients, C0 during the first 4T of a data period (sel = 0) and C1
// during the second 4T (sel = 1). The control bit only chooses which constant enters the
// Booth recoder. p = a * (sel ? C1 : C0), full precision, combinational.
module shared_mult #(
  parameter int          AW = 11,
  parameter int          CW = dct_pkg::C_W,
  parameter logic signed [CW-1:0] C0 = 14'sd2896,
  parameter logic signed [CW-1:0] C1 = 14'sd3784
) (
  input  logic signed [AW-1:0]    a,
  input  logic                    sel,
  output logic signed [AW+CW-1:0] p
);
  logic signed [CW-1:0] c;
  assign c = sel ? C1 : C0;

  booth_mult #(.AW(AW), .BW(CW)) u_mult (.a(a), .b(c), .p(p));
endmodule
