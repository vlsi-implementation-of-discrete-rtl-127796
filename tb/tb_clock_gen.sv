// tb_clock_gen: checks the phase counter, CK_4/CK_8 and their complements, and the en4/en8
// pulses against a cycle count kept by the testbench, for 40 cycles after reset.
module tb_clock_gen;
  logic clk = 1'b0, rst_n;
  logic [2:0] t;
  logic ck4, ck4_n, ck8, ck8_n, en4, en8;
  int checks = 0, failures = 0;

  clock_gen dut (.clk, .rst_n, .t, .ck4, .ck4_n, .ck8, .ck8_n, .en4, .en8);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s wrong", c, what);
    end
  endtask

  initial begin
    int n4 = 0, n8 = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(t == 0, "reset value", -1);
    rst_n = 1'b1;
    for (int c = 0; c < 40; c++) begin
      int ph;
      ph = c % 8;
      check(t == 3'(ph), "t", c);
      check(ck4 == ((ph % 4) >= 2) && ck4_n == !ck4, "ck4", c);
      check(ck8 == (ph >= 4) && ck8_n == !ck8, "ck8", c);
      check(en4 == (ph % 4 == 3), "en4", c);
      check(en8 == (ph == 7), "en8", c);
      n4 += int'(en4);
      n8 += int'(en8);
      @(negedge clk);
    end
    check(n4 == 10 && n8 == 5, "pulse counts", 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
