// Testbench for dpcsn_core: every code and both dither polarities for the
// default K=2, M=2 core (N=5), for a K=2, M=3 core (N=7) in both the
// regular and the two-group arrangement, and for a K=3, M=2 core (N=7).
// Expected: code + 1 or code - 1, modulo 2^N.
module dpcsn_core_tb;
  import dpcsn_pkg::*;

  int checks = 0, failures = 0;
  dither_t d;

  logic [1:5] c5, n5;
  logic [1:7] c7, n7a, n7b, n7c;

  dpcsn_core                                   dut_a (.code(c5), .dither(d), .code_new(n5));
  dpcsn_core #(.K(2), .M(3))                   dut_b (.code(c7), .dither(d), .code_new(n7a));
  dpcsn_core #(.K(2), .M(3), .TWO_GROUP(1'b1)) dut_c (.code(c7), .dither(d), .code_new(n7b));
  dpcsn_core #(.K(3), .M(2))                   dut_d (.code(c7), .dither(d), .code_new(n7c));

  function automatic int dithered(input int v, input int n, input int di);
    int r = (di == 1) ? v + 1 : v - 1;
    return (r + (1 << n)) % (1 << n);
  endfunction

  task automatic check(input string what, input int got, input int expv, input int v, input int di);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s code=%0d dither=%0d got=%0d exp=%0d", what, v, di, got, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int di = 0; di < 2; di++) begin
      d = dither_t'(di);
      for (int v = 0; v < 128; v++) begin
        c5 = 5'(v);
        c7 = 7'(v);
        #1;
        if (v < 32) check("K2M2", int'(n5), dithered(v, 5, di), v, di);
        check("K2M3", int'(n7a), dithered(v, 7, di), v, di);
        check("K2M3-two-group", int'(n7b), dithered(v, 7, di), v, di);
        check("K3M2", int'(n7c), dithered(v, 7, di), v, di);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
