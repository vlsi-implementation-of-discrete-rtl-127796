// tb_obuf_decimated: the front-end output multiplexer must send even_re, even_im, odd_re,
// odd_im for select values 0..3; checked with random words.
module tb_obuf_decimated;
  logic [1:0] sel;
  logic signed [11:0] er, ei, orr, oi, dout;
  int checks = 0, failures = 0;

  obuf_decimated #(.W(12)) dut (.sel, .even_re(er), .even_im(ei), .odd_re(orr), .odd_im(oi), .dout);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic signed [11:0] exp_v;
      er = 12'($urandom); ei = 12'($urandom); orr = 12'($urandom); oi = 12'($urandom);
      sel = 2'(i);
      #1;
      case (sel)
        2'd0: exp_v = er;
        2'd1: exp_v = ei;
        2'd2: exp_v = orr;
        default: exp_v = oi;
      endcase
      checks++;
      if (dout !== exp_v) begin
        failures++;
        $display("sel=%0d dout=%0d expected %0d", sel, dout, exp_v);
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
