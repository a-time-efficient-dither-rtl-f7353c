// Runs the stage logic end to end at every stage resolution n = 1..6, the
// range over which the delay of the scheme is compared with a conventional
// adder chain. Each n is built as n = M*K + 1:
//   n=1: K=1 M=0 (LSB inverter only)   n=2: K=1 M=1   n=3: K=2 M=1
//   n=4: K=3 M=1 and K=1 M=3 in the two-group arrangement
//   n=5: K=2 M=2 (default)             n=6: K=5 M=1 and K=1 M=5
// Every input code is converted with both dither polarities (see
// sar_stage_checker). The testbench also prints, for reference, the delay
// after the last decision that equations T_TRA = n*T_adder and
// T_DPCSN = T_mux + T_XOR + T_inv give with 65 nm post-layout gate delays
// (TT corner: T_adder 150 ps, T_mux 24 ps, T_XOR 50 ps, T_inv 20 ps).
module dither_sar_resolution_tb;
  localparam int NCFG = 8;

  logic clk = 0, rst_n = 0;
  int   c_checks[NCFG], c_failures[NCFG];
  logic c_done[NCFG];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sar_stage_checker #(.K(1), .M(0))                   u_n1  (.clk, .rst_n, .checks(c_checks[0]), .failures(c_failures[0]), .done(c_done[0]));
  sar_stage_checker #(.K(1), .M(1))                   u_n2  (.clk, .rst_n, .checks(c_checks[1]), .failures(c_failures[1]), .done(c_done[1]));
  sar_stage_checker #(.K(2), .M(1))                   u_n3  (.clk, .rst_n, .checks(c_checks[2]), .failures(c_failures[2]), .done(c_done[2]));
  sar_stage_checker #(.K(3), .M(1))                   u_n4  (.clk, .rst_n, .checks(c_checks[3]), .failures(c_failures[3]), .done(c_done[3]));
  sar_stage_checker #(.K(1), .M(3), .TWO_GROUP(1'b1)) u_n4g (.clk, .rst_n, .checks(c_checks[4]), .failures(c_failures[4]), .done(c_done[4]));
  sar_stage_checker                                   u_n5  (.clk, .rst_n, .checks(c_checks[5]), .failures(c_failures[5]), .done(c_done[5]));
  sar_stage_checker #(.K(5), .M(1))                   u_n6  (.clk, .rst_n, .checks(c_checks[6]), .failures(c_failures[6]), .done(c_done[6]));
  sar_stage_checker #(.K(1), .M(5))                   u_n6b (.clk, .rst_n, .checks(c_checks[7]), .failures(c_failures[7]), .done(c_done[7]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) all_done &= c_done[i];
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      $display("config %0d: checks=%0d failures=%0d", i, c_checks[i], c_failures[i]);
      checks += c_checks[i];
      failures += c_failures[i];
      if (c_checks[i] == 0) failures++;
    end
    for (int n = 1; n <= 6; n++)
      $display("n=%0d  T_TRA=%0d ps  T_DPCSN=%0d ps  ratio=%0.2f", n, n * 150, 24 + 50 + 20,
               real'(n * 150) / real'(24 + 50 + 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
