// Testbench for dpcsn_sub_block: a 3-bit slice above 3 lower bits, every
// code and both dither polarities. The expected slice is cut from the full
// six-bit sum code +/- 1 (modulo 64), computed here with plain arithmetic.
module dpcsn_sub_block_tb;
  import dpcsn_pkg::*;

  localparam int BW = 3, LW = 3;

  int checks = 0, failures = 0;

  logic [1:BW] blk, blk_new;
  logic [1:LW] low;
  dither_t     d;

  dpcsn_sub_block #(.BW(BW), .LW(LW)) dut (
    .code_blk(blk), .code_low(low), .dither(d), .code_new_blk(blk_new));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full, expv;
    for (int di = 0; di < 2; di++) begin
      d = dither_t'(di);
      for (int v = 0; v < (1 << (BW+LW)); v++) begin
        {blk, low} = (BW+LW)'(v);
        #1;
        full = (di == 1) ? v + 1 : v - 1;
        full = (full + (1 << (BW+LW))) % (1 << (BW+LW));
        expv = full >> LW;
        checks++;
        if (int'(blk_new) != expv) begin
          failures++;
          $display("FAIL code=%b dither=%0d got=%b exp=%0d", {blk, low}, di, blk_new, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
