// tb_dct2d_top: end-to-end test of the 8x8 DCT at its default parameters.
//
// Streams NB blocks of pixels back to back (random blocks, constant extremes, checkerboards
// that give the largest AC coefficients, and single-pixel impulses) and compares every output
// coefficient with a double-precision orthonormal 2-D DCT computed here; an error of at most
// TOL is accepted (fixed-point rounding). Also checks the latency (first coefficient 129 cycles
// after the first pixel), that output is continuous, that dout_sob marks each block, and counts
// how often the design's mechanisms were exercised: both halves of the data period (constant
// sets 0 and 1) in both 1-D DCTs, both halves of the transposition memory, and reordering of
// decimated output into natural order.
module tb_dct2d_top;
  localparam int    NB  = 24;
  localparam real   TOL = 1.0;
  localparam real   PI  = 3.14159265358979323846;

  logic              clk = 1'b0;
  logic              rst_n;
  logic signed [7:0] din;
  logic signed [11:0] dout;
  logic              dout_valid, dout_sob, ck4, ck8;

  int checks = 0, failures = 0;

  dct2d_top dut (.clk, .rst_n, .din, .dout, .dout_valid, .dout_sob, .ck4, .ck8);

  always #5 clk = ~clk;

  int  px [NB][64];
  real ref_c [NB][64];   // index 8*u + v  (output order)
  real max_err = 0.0;

  function automatic real cc(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic make_blocks();
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) begin
        int y, x;
        y = i / 8;
        x = i % 8;
        case (b % 8)
          0: px[b][i] = -128;
          1: px[b][i] = 127;
          2: px[b][i] = ((x + y) % 2 == 0) ? 127 : -128;
          3: px[b][i] = ((x / 4 + y / 4) % 2 == 0) ? -128 : 127;
          4: px[b][i] = (i == (b * 7) % 64) ? 127 : 0;
          default: px[b][i] = int'($urandom_range(255)) - 128;
        endcase
      end
    for (int b = 0; b < NB; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real s;
          s = 0.0;
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++)
              s += px[b][8*y+x] * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
          ref_c[b][8*u+v] = 0.25 * cc(u) * cc(v) * s;
        end
  endtask

  // Mechanism counters
  int n_half0_fe = 0, n_half1_fe = 0, n_half0_be = 0, n_half1_be = 0;
  int n_bank0 = 0, n_bank1 = 0, n_reorder = 0, n_sob = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fe.en4) begin if (dut.u_fe.half) n_half1_fe++; else n_half0_fe++; end
    if (dut.u_be.en4) begin if (dut.u_be.half) n_half1_be++; else n_half0_be++; end
    if (dut.u_tm.cnt == 7'd0)  n_bank0++;
    if (dut.u_tm.cnt == 7'd64) n_bank1++;
    if (dut.u_be.g_nat.u_obuf_nat.pos == 3'd7) n_reorder++;
  end

  int cyc = 0;          // edges since the first pixel was taken
  int first_valid = -1;
  int nout = 0;

  initial begin
    make_blocks();
    rst_n = 1'b0;
    din   = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < (NB + 3) * 64; i++) begin
      din = (i < NB * 64) ? 8'(px[i / 64][i % 64]) : '0;
      @(posedge clk);
      #1;
      if (dout_valid) begin
        if (first_valid < 0) first_valid = cyc;
        if (nout < NB * 64) begin
          int  b, j;
          real e;
          b = nout / 64;
          j = nout % 64;
          e = $itor(dout) - ref_c[b][j];
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > TOL) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH block %0d u=%0d v=%0d: got %0d expected %f", b, j / 8, j % 8,
                       dout, ref_c[b][j]);
          end
          checks++;
          if (dout_sob != (j == 0)) begin
            failures++;
            $display("dout_sob wrong at block %0d index %0d", b, j);
          end
          if (dout_sob) n_sob++;
        end
        nout++;
      end else if (first_valid >= 0) begin
        failures++;
        $display("output gap at cycle %0d", cyc);
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (first_valid != 128) begin
      failures++;
      $display("latency: first coefficient after %0d edges, expected 128", first_valid);
    end
    checks++;
    if (nout < NB * 64) begin failures++; $display("only %0d outputs", nout); end
    $display("max |error| = %f, outputs = %0d", max_err, nout);
    $display("mechanisms: fe half0/half1 %0d/%0d, be half0/half1 %0d/%0d, ram halves %0d/%0d, reordered blocks %0d, sob %0d",
             n_half0_fe, n_half1_fe, n_half0_be, n_half1_be, n_bank0, n_bank1, n_reorder, n_sob);
    checks++; if (n_half0_fe == 0 || n_half1_fe == 0) begin failures++; $display("front-end half never used"); end
    checks++; if (n_half0_be == 0 || n_half1_be == 0) begin failures++; $display("back-end half never used"); end
    checks++; if (n_bank0 == 0 || n_bank1 == 0) begin failures++; $display("a RAM half never used"); end
    checks++; if (n_reorder == 0) begin failures++; $display("reordering never happened"); end
    checks++; if (n_sob != NB) begin failures++; $display("dout_sob seen %0d times", n_sob); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 10) * 64 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
