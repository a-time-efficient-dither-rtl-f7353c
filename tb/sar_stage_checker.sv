// Test harness for dither_sar_logic at a chosen size (used by
// dither_sar_resolution_tb). It instantiates the stage logic with
// parameters K, M and TWO_GROUP, plays an ideal sub-DAC and comparator
// (input in sixteenths of an LSB, decision = input >= DAC code plus the
// trial weight of the bit under test, answer after 1..3 cycles), converts
// every input code with both dither polarities and checks raw code,
// dithered code (code +/- 1 modulo 2^N), path one during the search and the
// conversion time. Results come back through `checks`, `failures` and
// `done`.
module sar_stage_checker
  import dpcsn_pkg::*;
#(
  parameter int K = 2,
  parameter int M = 2,
  parameter bit TWO_GROUP = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int N = M*K + 1;
  localparam int FRAC = 16;

  logic       phi_msb = 0;
  dither_t    dither = DITHER_POS;
  logic       phi_sar, comp_out = 0, comp_ready = 0, s1, busy;
  logic [1:N] code, dout;

  dither_sar_logic #(.K(K), .M(M), .TWO_GROUP(TWO_GROUP)) dut (
    .clk, .rst_n, .phi_msb, .dither, .phi_sar, .comp_out, .comp_ready,
    .code, .dout, .s1, .busy);

  int   vin, bitno = 0, countdown = 0, cycles_expected = 0;
  logic decision;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL n=%0d K=%0d M=%0d %s: vin=%0d code=%0d dout=%0d", N, K, M, what, vin, code, dout);
    end
  endtask

  always @(negedge clk) begin
    comp_ready = 1'b0;
    if (phi_sar) begin
      int lat;
      bitno++;
      expect_true(dout == code && !s1, "path one during the search");
      decision = (vin >= (int'(dout) + (1 << (N - bitno))) * FRAC);
      lat = 1 + int'($urandom_range(2));
      cycles_expected += lat + 1;
      countdown = lat;
    end else if (countdown > 0) begin
      countdown--;
      if (countdown == 0) begin
        comp_ready = 1'b1;
        comp_out   = decision;
      end
    end
  end

  initial begin
    int cycles, expd;
    checks = 0;
    failures = 0;
    done = 1'b0;
    @(posedge rst_n);
    for (int di = 0; di < 2; di++) begin
      for (int c = 0; c < (1 << N); c++) begin
        vin = c * FRAC + int'($urandom_range(FRAC - 1));
        @(negedge clk);
        dither = dither_t'(di);
        phi_msb = 1'b1;
        bitno = 0;
        cycles_expected = 0;
        @(negedge clk);
        phi_msb = 1'b0;
        cycles = 0;
        while (!s1 && cycles < 200) begin
          @(negedge clk);
          cycles++;
        end
        expect_true(cycles == cycles_expected, "conversion time");
        expect_true(bitno == N, "one strobe per bit");
        expect_true(int'(code) == c, "raw code");
        expd = ((di == 1 ? c + 1 : c - 1) + (1 << N)) % (1 << N);
        expect_true(int'(dout) == expd, "dithered code");
      end
    end
    done = 1'b1;
  end
endmodule
