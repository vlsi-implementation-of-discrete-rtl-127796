// tb_even_part: drives u(n) as the butterfly would (a new set every 8 cycles, changing in T7)
// with the phase-derived en4 and control bit, and checks the outputs against the even DCT
// outputs Y(k)/2 = 1/2 c(k) sum_n u(n) cos((2n+1)k pi/16), k = 0,4 (first 4T) and 2,6 (second
// 4T), computed here in double precision. Outputs have 2 fraction bits; up to 0.5 of error is
// accepted. Also checks the timing: the Y(0)/Y(4) pair of a set is on the outputs in phases 4..7
// of the next period and the Y(2)/Y(6) pair in phases 0..3 of the period after.
module tb_even_part;
  localparam real PI = 3.14159265358979323846;
  localparam int  NS = 100;
  logic clk = 1'b0, rst_n, en4, half;
  logic [2:0] phase;
  logic signed [8:0]  u [4];
  logic signed [11:0] y_re, y_im;
  int ue [NS][4];
  int checks = 0, failures = 0;

  even_part #(.IN_W(9), .IN_FRAC(0), .OUT_W(12), .OUT_FRAC(2)) dut (
    .clk, .rst_n, .en4, .half, .u, .y_re, .y_im);
  always #5 clk = ~clk;
  assign en4  = &phase[1:0];
  assign half = phase[2];

  function automatic real yref(int s, int k);
    real acc;
    acc = 0.0;
    for (int n = 0; n < 4; n++) acc += ue[s][n] * $cos((2*n+1)*k*PI/16.0);
    return 0.5 * ((k == 0) ? 1.0 / $sqrt(2.0) : 1.0) * acc;
  endfunction

  task automatic cmp(int s, int k, logic signed [11:0] y);
    real e;
    e = $itor(y) / 4.0 - yref(s, k);
    checks++;
    if (e > 0.5 || e < -0.5) begin
      failures++;
      if (failures < 10) $display("set %0d Y(%0d): got %f expected %f", s, k, $itor(y)/4.0, yref(s, k));
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < 4; n++)
        ue[s][n] = (s == 0) ? 255 : (s == 1) ? -256 : (s == 2) ? ((n % 2) ? -256 : 255)
                 : int'($urandom_range(511)) - 256;
    rst_n = 1'b0; phase = '0;
    for (int n = 0; n < 4; n++) u[n] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < (NS + 3) * 8; c++) begin
      int p;
      p = c / 8;
      phase = 3'(c % 8);
      if (c % 8 == 0)
        for (int n = 0; n < 4; n++) u[n] = (p < NS) ? 9'(ue[p][n]) : '0;
      if (c % 8 == 5 && p >= 1 && p - 1 < NS) begin
        cmp(p - 1, 0, y_re);
        cmp(p - 1, 4, y_im);
      end
      if (c % 8 == 1 && p >= 2 && p - 2 < NS) begin
        cmp(p - 2, 2, y_re);
        cmp(p - 2, 6, y_im);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
