// tb_dct1d: streams 8-point blocks (extremes, alternating signs, random) one word per cycle
// into a front-end configuration (8-bit in, decimated order out) and a back-end configuration
// (12-bit in with 2 fraction bits, natural order out) and compares every output with
// Y(k)/2 = 1/2 c(k) sum_n x(n) cos((2n+1)k pi/16) computed here in double precision. Checks the
// output index and the timing: block j (word 0 entering in cycle 8j) leaves in cycles 8j+28 ..
// 8j+35 in decimated order, or 8j+37 .. 8j+44 in natural order; one block per 8 cycles.
module tb_dct1d;
  localparam real PI = 3.14159265358979323846;
  localparam int  NB = 60;
  localparam int  ORD [8] = '{0, 4, 1, 7, 2, 6, 3, 5};
  logic clk = 1'b0, rst_n;
  logic [2:0] phase, k_f, k_b;
  logic signed [7:0]  din_f;
  logic signed [11:0] din_b, dout_f, dout_b;
  int  xf [NB][8], xb [NB][8];
  int checks = 0, failures = 0;
  real max_f = 0.0, max_b = 0.0;

  dct1d dut_f (.clk, .rst_n, .phase, .din(din_f), .dout(dout_f), .dout_k(k_f));
  dct1d #(.IN_W(12), .IN_FRAC(2), .OUT_W(12), .OUT_FRAC(0), .NATURAL(1'b1)) dut_b (
    .clk, .rst_n, .phase, .din(din_b), .dout(dout_b), .dout_k(k_b));
  always #5 clk = ~clk;

  function automatic real yref(int x [8], int k, real scale);
    real acc;
    acc = 0.0;
    for (int n = 0; n < 8; n++) acc += x[n] * scale * $cos((2*n+1)*k*PI/16.0);
    return 0.5 * ((k == 0) ? 1.0 / $sqrt(2.0) : 1.0) * acc;
  endfunction

  initial begin
    for (int j = 0; j < NB; j++)
      for (int n = 0; n < 8; n++) begin
        xf[j][n] = (j == 0) ? -128 : (j == 1) ? 127 : (j == 2) ? ((n % 2) ? -128 : 127)
                 : int'($urandom_range(255)) - 128;
        // back-end input: 12-bit words with 2 fraction bits, kept to the range the front-end
        // produces (|Y/2| < 370)
        xb[j][n] = (j == 0) ? -1448 : (j == 1) ? 1448 : int'($urandom_range(2896)) - 1448;
      end
    rst_n = 1'b0; phase = '0; din_f = '0; din_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < (NB + 6) * 8; c++) begin
      phase = 3'(c % 8);
      din_f = (c < NB * 8) ? 8'(xf[c / 8][c % 8]) : '0;
      din_b = (c < NB * 8) ? 12'(xb[c / 8][c % 8]) : '0;
      #1;   // let the phase-driven output multiplexer settle
      if (c >= 28 && (c - 28) / 8 < NB) begin
        int j, k;
        real e;
        j = (c - 28) / 8;
        k = ORD[(c - 28) % 8];
        e = $itor(dout_f) / 4.0 - yref(xf[j], k, 1.0);
        if (e < 0) e = -e;
        if (e > max_f) max_f = e;
        checks++;
        if (e > 0.5 || k_f != 3'(k)) begin
          failures++;
          if (failures < 10) $display("front-end block %0d Y(%0d): got %f (k=%0d) expected %f", j, k, $itor(dout_f)/4.0, k_f, yref(xf[j], k, 1.0));
        end
      end
      if (c >= 37 && (c - 37) / 8 < NB) begin
        int j, k;
        real e;
        j = (c - 37) / 8;
        k = (c - 37) % 8;
        e = $itor(dout_b) - yref(xb[j], k, 0.25);
        if (e < 0) e = -e;
        if (e > max_b) max_b = e;
        checks++;
        if (e > 1.0 || k_b != 3'(k)) begin
          failures++;
          if (failures < 10) $display("back-end block %0d Y(%0d): got %0d (k=%0d) expected %f", j, k, dout_b, k_b, yref(xb[j], k, 0.25));
        end
      end
      @(negedge clk);
    end
    $display("max |error|: front-end %f, back-end %f", max_f, max_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 10) * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
