// tb_sp_buffer: streams 20 blocks of random words, one per cycle, and checks after each T7
// that the holding register shows the whole block in order and keeps it for 8 cycles while
// the next block is shifted in.
module tb_sp_buffer;
  localparam int NB = 20;
  logic clk = 1'b0, rst_n;
  logic [2:0] phase;
  logic signed [7:0] din;
  logic signed [7:0] x [8];
  logic signed [7:0] blk [NB][8];
  int checks = 0, failures = 0;

  sp_buffer #(.W(8)) dut (.clk, .rst_n, .phase, .din, .x);
  always #5 clk = ~clk;

  initial begin
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 8; n++) blk[b][n] = 8'($urandom);
    rst_n = 1'b0; phase = '0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < (NB + 1) * 8; c++) begin
      phase = 3'(c % 8);
      din   = (c < NB * 8) ? blk[c / 8][c % 8] : '0;
      // while block b is being shifted in, the holding register shows block b-1
      if (c >= 8) begin
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (x[n] !== blk[c / 8 - 1][n]) begin
            failures++;
            if (failures < 10) $display("cycle %0d: x[%0d]=%0d expected %0d", c, n, x[n], blk[c/8-1][n]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 4) * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
