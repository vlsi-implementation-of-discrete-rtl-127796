// tb_obuf_natural: feeds blocks of random words in decimated order Y0,Y4,Y1,Y7,Y2,Y6,Y3,Y5
// (slot pos = 0..7, one per cycle, back to back) and checks that each block comes out in
// natural order Y0..Y7 with the right index, word k of a block 2+k cycles after its slot-7 word.
module tb_obuf_natural;
  localparam int NB = 30;
  localparam int ORD [8] = '{0, 4, 1, 7, 2, 6, 3, 5};
  logic clk = 1'b0, rst_n;
  logic [2:0] pos, dout_k;
  logic signed [11:0] din, dout;
  logic signed [11:0] val [NB][8];
  int checks = 0, failures = 0;

  obuf_natural #(.W(12)) dut (.clk, .rst_n, .pos, .din, .dout, .dout_k);
  always #5 clk = ~clk;

  initial begin
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < 8; k++) val[b][k] = 12'($urandom);
    rst_n = 1'b0; pos = '0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < (NB + 2) * 8; c++) begin
      pos = 3'(c % 8);
      din = (c < NB * 8) ? val[c / 8][ORD[c % 8]] : '0;
      if (c >= 9 && (c - 9) / 8 < NB) begin
        int b, k;
        b = (c - 9) / 8;
        k = (c - 9) % 8;
        checks++;
        if (dout !== val[b][k] || dout_k != 3'(k)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: block %0d k=%0d got %0d (k=%0d) expected %0d", c, b, k, dout, dout_k, val[b][k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 6) * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
