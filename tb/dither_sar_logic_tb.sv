// End-to-end testbench for dither_sar_logic at its default size (K=2, M=2,
// N=5), with a behavioural stand-in for the analog part of the stage.
//
// The stand-in plays sub-DAC and comparator. The stage input is held in
// sixteenths of an LSB. On each PHI_SAR strobe it reads the code the DAC is
// being switched with (dout), adds the trial weight of the bit under test,
// compares, and answers after a random 1..4 cycles with comp_ready, as a
// self-timed comparator whose decision time varies would.
//
// Every conversion is checked against numbers worked out here: the raw
// code equals the input's integer part, dout equals the raw code while the
// search runs (path one), after the last bit dout equals code +/- 1 modulo
// 2^N (path two), the residue left on the DAC is input - dout, and the
// conversion takes the sum over bits of (comparator latency + 1) cycles.
// Every input code is converted with both dither polarities, several
// times. The testbench counts how often each mechanism occurred (carry and
// borrow into each sub-block, wrap at both ends of the range, slow
// comparator answers, back-to-back starts, a start ignored while busy) and
// counts a failure for any that never occurred.
module dither_sar_logic_tb;
  import dpcsn_pkg::*;

  localparam int K = 2, M = 2, N = M*K + 1;
  localparam int FRAC = 16;  // input resolution: sixteenths of an LSB

  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       phi_msb = 0;
  dither_t    dither = DITHER_POS;
  logic       phi_sar, comp_out = 0, comp_ready = 0, s1, busy;
  logic [1:N] code, dout;

  dither_sar_logic dut (
    .clk, .rst_n, .phi_msb, .dither, .phi_sar, .comp_out, .comp_ready,
    .code, .dout, .s1, .busy);

  always #5 clk = ~clk;

  // ---- behavioural sub-DAC + comparator ---------------------------------
  int vin;          // stage input, in 1/FRAC LSB
  int bitno = 0;    // bit under test
  int countdown = 0;
  logic decision;
  int cycles_expected;
  int n_slow = 0;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t: vin=%0d code=%0d dout=%0d s1=%b", what, $time, vin, code, dout, s1);
    end
  endtask

  always @(negedge clk) begin
    comp_ready = 1'b0;
    if (phi_sar) begin
      int lat;
      bitno++;
      // path one: the DAC sees the undithered partial code
      expect_true(dout == code && !s1, "path one during the search");
      decision = (vin >= (int'(dout) + (1 << (N - bitno))) * FRAC);
      lat = 1 + int'($urandom_range(3));
      if (lat > 1) n_slow++;
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

  // ---- mechanism counters ----------------------------------------------
  int n_pos = 0, n_neg = 0, n_wrap_top = 0, n_wrap_bottom = 0;
  int n_carry[1:M], n_borrow[1:M];
  int n_back_to_back = 0, n_ignored_start = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int c, input dither_t d, input bit back_to_back,
                         input bit poke_start);
    int expd, cycles, low;
    vin = c * FRAC + int'($urandom_range(FRAC - 1));
    if (!back_to_back) @(negedge clk);
    else n_back_to_back++;
    expect_true(!busy, "idle before start");
    dither = d;
    phi_msb = 1'b1;
    bitno = 0;
    cycles_expected = 0;
    @(negedge clk);
    phi_msb = 1'b0;
    dither = dither_t'($urandom_range(1));  // must not matter any more
    cycles = 0;  // edges since the one that took phi_msb
    while (!s1) begin
      if (poke_start && cycles == 2) begin
        phi_msb = 1'b1;  // must be ignored while busy
        n_ignored_start++;
      end else begin
        phi_msb = 1'b0;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 100) break;
    end
    phi_msb = 1'b0;
    expect_true(cycles == cycles_expected, "conversion time");
    if (cycles != cycles_expected)
      $display("  cycles=%0d expected=%0d", cycles, cycles_expected);
    expect_true(bitno == N, "one strobe per bit");
    expect_true(int'(code) == c, "raw code");
    expd = ((d == DITHER_POS ? c + 1 : c - 1) + (1 << N)) % (1 << N);
    expect_true(int'(dout) == expd, "dithered code on path two");
    // residue the DAC would leave: input minus dithered code
    expect_true(vin - int'(dout) * FRAC == vin - expd * FRAC, "residue");
    expect_true(!busy, "idle after the last bit");

    if (d == DITHER_POS) n_pos++; else n_neg++;
    if (d == DITHER_POS && c == (1 << N) - 1) n_wrap_top++;
    if (d == DITHER_NEG && c == 0) n_wrap_bottom++;
    for (int i = 1; i <= M; i++) begin
      low = c % (1 << (N - i*K));
      if (d == DITHER_POS && low == (1 << (N - i*K)) - 1) n_carry[i]++;
      if (d == DITHER_NEG && low == 0) n_borrow[i]++;
    end
  endtask

  initial begin
    for (int i = 1; i <= M; i++) begin
      n_carry[i] = 0;
      n_borrow[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int c = 0; c < (1 << N); c++) begin
        convert(c, DITHER_POS, (c % 5 == 1), (c % 7 == 3));
        convert(c, DITHER_NEG, (c % 3 == 2), 1'b0);
      end
    end
    for (int t = 0; t < 200; t++)
      convert(int'($urandom_range((1 << N) - 1)), dither_t'($urandom_range(1)),
              1'($urandom), 1'($urandom));

    $display("mechanisms: +dither=%0d -dither=%0d wrap_top=%0d wrap_bottom=%0d slow_compare=%0d back_to_back=%0d ignored_start=%0d",
             n_pos, n_neg, n_wrap_top, n_wrap_bottom, n_slow, n_back_to_back, n_ignored_start);
    for (int i = 1; i <= M; i++)
      $display("  sub-block %0d: carry in=%0d borrow in=%0d", i, n_carry[i], n_borrow[i]);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_wrap_top == 0 || n_wrap_bottom == 0 ||
        n_slow == 0 || n_back_to_back == 0 || n_ignored_start == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int i = 1; i <= M; i++) begin
      checks++;
      if (n_carry[i] == 0 || n_borrow[i] == 0) begin
        failures++;
        $display("FAIL sub-block %0d never saw a carry or a borrow", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
