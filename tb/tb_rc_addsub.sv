// tb_rc_addsub: compares the ripple-carry adder/subtractor with integer a+b and a-b, for all
// corner values and random operands, at W = 9 and W = 4 (exhaustive for W = 4).
module tb_rc_addsub;
  logic signed [8:0] a9, b9;
  logic signed [9:0] s9;
  logic signed [3:0] a4, b4;
  logic signed [4:0] s4;
  logic sub9, sub4;
  int checks = 0, failures = 0;

  rc_addsub #(.W(9)) dut9 (.a(a9), .b(b9), .sub(sub9), .s(s9));
  rc_addsub #(.W(4)) dut4 (.a(a4), .b(b4), .sub(sub4), .s(s4));

  initial begin
    for (int x = -8; x < 8; x++)
      for (int y = -8; y < 8; y++)
        for (int m = 0; m < 2; m++) begin
          a4 = 4'(x); b4 = 4'(y); sub4 = m[0];
          #1;
          checks++;
          if (int'(s4) != (m ? x - y : x + y)) begin
            failures++;
            $display("W=4 %0d %s %0d = %0d", x, m ? "-" : "+", y, s4);
          end
        end
    for (int i = 0; i < 2000; i++) begin
      int x, y, m;
      x = (i < 4) ? ((i % 2) ? 255 : -256) : int'($urandom_range(511)) - 256;
      y = (i < 4) ? ((i / 2) ? 255 : -256) : int'($urandom_range(511)) - 256;
      m = i % 2;
      a9 = 9'(x); b9 = 9'(y); sub9 = m[0];
      #1;
      checks++;
      if (int'(s9) != (m ? x - y : x + y)) begin
        failures++;
        $display("W=9 %0d %s %0d = %0d", x, m ? "-" : "+", y, s9);
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
