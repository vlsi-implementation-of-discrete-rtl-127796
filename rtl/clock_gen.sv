// clock_gen: the pipeline clocks of the DCT, derived from the word clock CK_1.
//
// CK_1 (clk) is the external clock; one input word arrives per CK_1 cycle T. A data period of
// one 8-point block is 8T. A 3-bit counter t numbers the cycles T0..T7 of the data period;
// CK_4 (period 4T) is t[1] and CK_8 (period 8T) is t[2], and their complements are also given,
// as in the original chip. Instead of clocking registers with CK_4/CK_8, this design keeps a
// single clock and gives the pipeline registers the enables en4 (high in the last cycle of each
// 4T, t = 3 or 7) and en8 (high in T7). A register enabled by en4 has 4T to settle its inputs.
// Reset puts the counter at T0; the first input word after reset is word 0 of a block.
module clock_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] t,
  output logic       ck4,
  output logic       ck4_n,
  output logic       ck8,
  output logic       ck8_n,
  output logic       en4,
  output logic       en8
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) t <= '0;
    else        t <= t + 3'd1;

  assign ck4   = t[1];
  assign ck4_n = ~t[1];
  assign ck8   = t[2];
  assign ck8_n = ~t[2];
  assign en4   = &t[1:0];
  assign en8   = &t;
endmodule
