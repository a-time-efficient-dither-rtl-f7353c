// Testbench for dpcsn_xor_tree: every lower-bit pattern and both dither
// polarities, for a four-bit and a one-bit chain. The reference is the
// selection rule itself: +1 LSB selects when all lower bits are ones,
// -1 LSB when all are zeros.
module dpcsn_xor_tree_tb;
  import dpcsn_pkg::*;

  int checks = 0, failures = 0;

  logic [1:4] low4;
  logic [1:1] low1;
  dither_t    d;
  logic       sel4, sel1;

  dpcsn_xor_tree #(.W(4)) dut4 (.code_low(low4), .dither(d), .sel(sel4));
  dpcsn_xor_tree #(.W(1)) dut1 (.code_low(low1), .dither(d), .sel(sel1));

  function automatic logic ref_sel(input logic [31:0] v, input int w, input dither_t dd);
    logic [31:0] ones = (32'd1 << w) - 1;
    return (dd == DITHER_POS) ? (v == ones) : (v == 0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int di = 0; di < 2; di++) begin
      d = dither_t'(di);
      for (int v = 0; v < 16; v++) begin
        low4 = 4'(v);
        low1 = 1'(v);
        #1;
        checks++;
        if (sel4 !== ref_sel(32'(v), 4, d)) begin
          failures++;
          $display("FAIL W=4 low=%b dither=%0d sel=%b", low4, di, sel4);
        end
        if (v < 2) begin
          checks++;
          if (sel1 !== ref_sel(32'(v), 1, d)) begin
            failures++;
            $display("FAIL W=1 low=%b dither=%0d sel=%b", low1, di, sel1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
