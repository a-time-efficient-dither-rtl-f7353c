// Testbench for sar_pulse_gen. A model comparator answers each strobe after
// a random 1..4 cycles; the testbench marks the fifth decision as the last
// bit. Checked per conversion: the first strobe comes one cycle after
// PHI_MSB, each further strobe one cycle after a non-final ready, exactly
// five strobes in all, busy falls after the last ready, and a PHI_MSB given
// while busy starts nothing.
module sar_pulse_gen_tb;
  localparam int NBITS = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic phi_msb = 0, comp_ready = 0, last_bit;
  logic phi_sar, busy;
  int   nstrobe;

  sar_pulse_gen dut (.clk, .rst_n, .phi_msb, .comp_ready, .last_bit, .phi_sar, .busy);

  always #5 clk = ~clk;
  assign last_bit = (nstrobe == NBITS);

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nstrobe = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int conv = 0; conv < 20; conv++) begin
      @(negedge clk);
      expect_true(!busy && !phi_sar, "idle before start");
      phi_msb = 1;
      nstrobe = 0;
      @(negedge clk);
      phi_msb = 0;
      expect_true(phi_sar && busy, "first strobe one cycle after PHI_MSB");
      while (1) begin
        int lat;
        nstrobe++;
        lat = 1 + int'($urandom_range(3));
        for (int c = 1; c < lat; c++) begin
          @(negedge clk);
          expect_true(!phi_sar, "no strobe while deciding");
          if (conv % 3 == 0) phi_msb = 1;  // ignored while busy
        end
        @(negedge clk);
        phi_msb = 0;
        expect_true(!phi_sar, "no strobe while deciding");
        comp_ready = 1;
        @(negedge clk);
        comp_ready = 0;
        if (nstrobe == NBITS) begin
          expect_true(!phi_sar && !busy, "conversion ends after last ready");
          break;
        end
        expect_true(phi_sar, "strobe one cycle after ready");
      end
      expect_true(nstrobe == NBITS, "strobe count");
      repeat (2) begin
        @(negedge clk);
        expect_true(!phi_sar && !busy, "stays idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
