// tb_butterfly: applies random and extreme blocks and checks u(n) = x(n)+x(7-n) and
// v(n) = x(n)-x(7-n) after the en8 edge, and that u/v hold when en8 is low.
module tb_butterfly;
  logic clk = 1'b0, rst_n, en8;
  logic signed [7:0] x [8];
  logic signed [8:0] u [4];
  logic signed [8:0] v [4];
  int checks = 0, failures = 0;

  butterfly #(.W(8)) dut (.clk, .rst_n, .en8, .x, .u, .v);
  always #5 clk = ~clk;

  initial begin
    int xe [8];
    rst_n = 1'b0; en8 = 1'b0;
    for (int n = 0; n < 8; n++) x[n] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 8; n++) begin
        xe[n] = (i == 0) ? ((n < 4) ? 127 : -128) : (i == 1) ? -128 : int'($urandom_range(255)) - 128;
        x[n] = 8'(xe[n]);
      end
      en8 = 1'b1;
      @(negedge clk);
      en8 = 1'b0;
      for (int n = 0; n < 8; n++) x[n] = 8'($urandom);   // must not reach u/v without en8
      @(negedge clk);
      for (int n = 0; n < 4; n++) begin
        checks += 2;
        if (int'(u[n]) != xe[n] + xe[7-n]) begin failures++; $display("u[%0d]=%0d", n, u[n]); end
        if (int'(v[n]) != xe[n] - xe[7-n]) begin failures++; $display("v[%0d]=%0d", n, v[n]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
