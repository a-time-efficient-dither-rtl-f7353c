// Testbench for sar_bit_regs (N=5). Random decisions are locked bit by bit,
// with random decisions also on comp_out when no bit clock fires. Checked
// after every cycle against a model code: each bit changes only on its own
// clock, PHI_MSB clears everything, and S1 rises with the last bit.
module sar_bit_regs_tb;
  localparam int N = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic phi_msb = 0, comp_out = 0;
  logic [1:N] bit_clk = '0;
  logic [1:N] code, model;
  logic s1, model_s1;

  sar_bit_regs #(.N(N)) dut (.clk, .rst_n, .phi_msb, .comp_out, .bit_clk, .code, .s1);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (code !== model || s1 !== model_s1) begin
      failures++;
      $display("FAIL %s: code=%b exp=%b s1=%b exp=%b", what, code, model, s1, model_s1);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    model = '0;
    model_s1 = 0;
    for (int conv = 0; conv < 30; conv++) begin
      @(negedge clk);
      phi_msb = 1;
      comp_out = 1'($urandom);
      @(negedge clk);
      phi_msb = 0;
      model = '0;
      model_s1 = 0;
      compare("after PHI_MSB");
      for (int k = 1; k <= N; k++) begin
        // an idle cycle with a changing comparator output
        comp_out = 1'($urandom);
        @(negedge clk);
        compare("idle cycle");
        comp_out = 1'($urandom);
        bit_clk = '0;
        bit_clk[k] = 1'b1;
        @(negedge clk);
        model[k] = comp_out;
        if (k == N) model_s1 = 1;
        bit_clk = '0;
        compare("bit locked");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
