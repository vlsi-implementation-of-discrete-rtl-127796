// tb_transpose_mem: writes 6 blocks of random words, rows in the front-end's decimated column
// order, one word per cycle, and checks that each block is read back column by column (rows
// 0..7 within a column, columns 0..7) while the next block is written into the other half,
// and that the 7-bit RAM counter steps every cycle.
module tb_transpose_mem;
  localparam int NB = 6;
  localparam int ORD [8] = '{0, 4, 1, 7, 2, 6, 3, 5};
  logic clk = 1'b0, rst_n;
  logic signed [11:0] din, dout;
  logic [6:0] cnt;
  logic signed [11:0] val [NB][8][8];   // [block][row][column]
  int checks = 0, failures = 0;

  transpose_mem #(.W(12), .CNT_INIT(7'd0)) dut (.clk, .rst_n, .din, .dout, .cnt);
  always #5 clk = ~clk;

  initial begin
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) val[b][r][k] = 12'($urandom);
    rst_n = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < (NB + 1) * 64; c++) begin
      din = (c < NB * 64) ? val[c / 64][(c / 8) % 8][ORD[c % 8]] : '0;
      checks++;
      if (cnt != 7'(c)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: cnt=%0d", c, cnt);
      end
      if (c >= 64) begin
        int b, col, row;
        b   = c / 64 - 1;
        col = (c / 8) % 8;
        row = c % 8;
        checks++;
        if (dout !== val[b][row][col]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: block %0d row %0d col %0d got %0d expected %0d", c, b, row, col, dout, val[b][row][col]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 3) * 64) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
