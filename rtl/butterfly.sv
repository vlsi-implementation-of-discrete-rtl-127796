// butterfly: first stage of the 8-point DCT.
//
// u(n) = x(n) + x(7-n) and v(n) = x(n) - x(7-n), n = 0..3, formed by eight ripple-carry
// adders/subtractors on the block held by the input buffer. The adders have a whole data
// period (8T) to settle; the results are registered when en8 is high (T7), so u and v are
// valid for the 8T after the block's holding-register period. Outputs are one bit wider than x.
// The ripple-carry adders and the 8T budget follow the original design; the register placement
// is this design's choice.
module butterfly #(
  parameter int W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en8,
  input  logic signed [W-1:0] x [8],
  output logic signed [W:0]   u [4],
  output logic signed [W:0]   v [4]
);
  logic signed [W:0] su [4];
  logic signed [W:0] sv [4];

  for (genvar n = 0; n < 4; n++) begin : g_bf
    rc_addsub #(.W(W)) u_add (.a(x[n]), .b(x[7-n]), .sub(1'b0), .s(su[n]));
    rc_addsub #(.W(W)) u_sub (.a(x[n]), .b(x[7-n]), .sub(1'b1), .s(sv[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < 4; n++) begin
        u[n] <= '0;
        v[n] <= '0;
      end
    end else if (en8) begin
      for (int n = 0; n < 4; n++) begin
        u[n] <= su[n];
        v[n] <= sv[n];
      end
    end
  end
endmodule
