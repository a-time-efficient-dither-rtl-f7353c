// Testbench for dpcsn at its default size (N=5): with S1 low the output
// must be the bit-register code untouched (path one); with S1 high it must
// be code +/- 1 modulo 32 (path two). Every code, both polarities.
module dpcsn_tb;
  import dpcsn_pkg::*;

  int checks = 0, failures = 0;
  dither_t    d;
  logic       s1;
  logic [1:5] code, dout;

  dpcsn dut (.code(code), .dither(d), .s1(s1), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int di = 0; di < 2; di++) begin
      d = dither_t'(di);
      for (int p = 0; p < 2; p++) begin
        s1 = p[0];
        for (int v = 0; v < 32; v++) begin
          code = 5'(v);
          #1;
          if (p == 0) expv = v;
          else        expv = ((di == 1 ? v + 1 : v - 1) + 32) % 32;
          checks++;
          if (int'(dout) != expv) begin
            failures++;
            $display("FAIL code=%0d dither=%0d s1=%0d got=%0d exp=%0d", v, di, p, dout, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
