// Testbench for sar_shift_reg (N=5). Strobes and ready pulses are given as
// the pulse generator would. Checked: after the k-th strobe exactly bit
// clock k fires with the ready pulse, no bit clock fires without ready,
// last_bit is high only while bit N is under decision, and the token is
// gone after the last bit.
module sar_shift_reg_tb;
  localparam int N = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic phi_sar = 0, comp_ready = 0;
  logic [1:N] bit_clk;
  logic last_bit;

  sar_shift_reg #(.N(N)) dut (.clk, .rst_n, .phi_sar, .comp_ready, .bit_clk, .last_bit);

  always #5 clk = ~clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t (bit_clk=%b last=%b)", what, $time, bit_clk, last_bit);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:N] onehot;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int conv = 0; conv < 10; conv++) begin
      for (int k = 1; k <= N; k++) begin
        @(negedge clk);
        phi_sar = 1;
        @(negedge clk);
        phi_sar = 0;
        onehot = '0;
        onehot[k] = 1'b1;
        repeat (1 + int'($urandom_range(2))) begin
          expect_true(bit_clk == '0, "no bit clock without ready");
          expect_true(last_bit == (k == N), "last_bit");
          @(negedge clk);
        end
        comp_ready = 1;
        #1;
        expect_true(bit_clk == onehot, "bit clock k with ready");
        @(negedge clk);
        comp_ready = 0;
      end
      comp_ready = 1;
      #1;
      expect_true(bit_clk == '0 && !last_bit, "token cleared after last bit");
      @(negedge clk);
      comp_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
