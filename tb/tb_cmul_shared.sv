// tb_cmul_shared: checks the three-multiplier complex rotation of the even part. Operands are
// taken on en4 (every 4 cycles) with the control bit alternating; 8 cycles later re/im must
// equal K1(a+b) - K2 b and K1(a+b) - K3 a exactly, with K1 = cos, K2 = cos+sin, K3 = cos-sin of
// pi/4 (control 0) or pi/8 (control 1) rounded to 12 fraction bits here, and must be within
// rounding of the exact rotation (a+jb)exp(j theta).
module tb_cmul_shared;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n, en4, half;
  logic signed [10:0] a, b;
  logic signed [26:0] re, im;
  int checks = 0, failures = 0;

  cmul_shared #(.DW(11), .ROT(dct_pkg::ROT_EVEN)) dut (.clk, .rst_n, .en4, .half, .a, .b, .re, .im);
  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int kq(real v);
    return int'($floor(4096.0 * v + 0.5));
  endfunction

  int qa [200], qb [200], qh [200];

  initial begin
    rst_n = 1'b0; en4 = 1'b0; half = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 200 * 4 + 12; c++) begin
      int op;
      op = c / 4;
      en4 = (c % 4 == 3);
      if (c % 4 == 0 && op < 200) begin
        qa[op] = int'($urandom_range(2047)) - 1024;
        qb[op] = int'($urandom_range(2047)) - 1024;
        qh[op] = op % 2;
        a = 11'(qa[op]); b = 11'(qb[op]); half = qh[op][0];
      end
      // result of operand set op-2 is on re/im during the 4 cycles after its second en4
      if (c % 4 == 1 && op >= 2 && op - 2 < 200) begin
        int  k, xa, xb, k1, k2, k3, er, ei;
        real th, rr, ri;
        k  = op - 2;
        xa = qa[k]; xb = qb[k];
        th = qh[k] ? PI / 8 : PI / 4;
        k1 = kq($cos(th)); k2 = kq($cos(th) + $sin(th)); k3 = kq($cos(th) - $sin(th));
        er = k1 * (xa + xb) - k2 * xb;
        ei = k1 * (xa + xb) - k3 * xa;
        rr = xa * $cos(th) - xb * $sin(th);
        ri = xa * $sin(th) + xb * $cos(th);
        checks += 2;
        if (int'(re) != er || int'(im) != ei) begin
          failures++;
          if (failures < 10) $display("set %0d: re=%0d im=%0d expected %0d %0d", k, re, im, er, ei);
        end
        if (fabs($itor(re) / 4096.0 - rr) > 1.0 || fabs($itor(im) / 4096.0 - ri) > 1.0) begin
          failures++;
          if (failures < 10) $display("set %0d: rotation off: %f %f vs %f %f", k, $itor(re)/4096.0, $itor(im)/4096.0, rr, ri);
        end
      end
      @(negedge clk);
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
