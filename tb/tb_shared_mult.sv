// tb_shared_mult: checks that the shared multiplier multiplies by its first constant when
// sel = 0 and by its second when sel = 1, for the constant pair cos(pi/4) / cos(pi/8) in
// 12-bit fraction format (worked out here with $cos) and for a pair with negative constants.
module tb_shared_mult;
  localparam real PI = 3.14159265358979323846;
  localparam logic signed [13:0] KA0 = 14'sd2896, KA1 = 14'sd3784;
  localparam logic signed [13:0] KB0 = -14'sd1130, KB1 = -14'sd4816;
  logic signed [10:0] a;
  logic sel;
  logic signed [24:0] pa, pb;
  int checks = 0, failures = 0;

  shared_mult #(.AW(11), .CW(14), .C0(KA0), .C1(KA1)) dut_a (.a, .sel, .p(pa));
  shared_mult #(.AW(11), .CW(14), .C0(KB0), .C1(KB1)) dut_b (.a, .sel, .p(pb));

  initial begin
    int ka0, ka1, kb0, kb1;
    ka0 = int'($floor(4096.0 * $cos(PI / 4) + 0.5));
    ka1 = int'($floor(4096.0 * $cos(PI / 8) + 0.5));
    kb0 = int'($floor(4096.0 * ($cos(5 * PI / 16) - $sin(5 * PI / 16)) + 0.5));
    kb1 = int'($floor(4096.0 * ($cos(15 * PI / 16) - $sin(15 * PI / 16)) + 0.5));
    for (int i = 0; i < 2000; i++) begin
      int x;
      x = int'($urandom_range(2047)) - 1024;
      a = 11'(x);
      sel = i[0];
      #1;
      checks += 2;
      if (int'(pa) != x * (sel ? ka1 : ka0)) begin
        failures++;
        if (failures < 10) $display("A: sel=%0d a=%0d p=%0d", sel, x, pa);
      end
      if (int'(pb) != x * (sel ? kb1 : kb0)) begin
        failures++;
        if (failures < 10) $display("B: sel=%0d a=%0d p=%0d", sel, x, pb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
