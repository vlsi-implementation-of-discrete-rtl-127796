// tb_booth_mult: compares the radix-4 Booth multiplier with integer multiplication:
// exhaustively for a 5x6-bit instance (odd and even widths) and with corner and random
// operands for the 11x14-bit instance used in the DCT.
module tb_booth_mult;
  logic signed [10:0] a;
  logic signed [13:0] b;
  logic signed [24:0] p;
  logic signed [4:0]  as;
  logic signed [4:0]  bs;
  logic signed [9:0]  ps;
  int checks = 0, failures = 0;

  booth_mult #(.AW(11), .BW(14)) dut  (.a, .b, .p);
  booth_mult #(.AW(5),  .BW(5))  dut5 (.a(as), .b(bs), .p(ps));

  initial begin
    for (int x = -16; x < 16; x++)
      for (int y = -16; y < 16; y++) begin
        as = 5'(x); bs = 5'(y);
        #1;
        checks++;
        if (int'(ps) != x * y) begin
          failures++;
          if (failures < 10) $display("5x5: %0d * %0d = %0d", x, y, ps);
        end
      end
    for (int i = 0; i < 5000; i++) begin
      int x, y;
      x = int'($urandom_range(2047)) - 1024;
      y = int'($urandom_range(16383)) - 8192;
      if (i == 0) begin x = -1024; y = -8192; end
      if (i == 1) begin x = 1023;  y = 8191;  end
      if (i == 2) begin x = -1024; y = 8191;  end
      a = 11'(x); b = 14'(y);
      #1;
      checks++;
      if (int'(p) != x * y) begin
        failures++;
        if (failures < 10) $display("11x14: %0d * %0d = %0d", x, y, p);
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
