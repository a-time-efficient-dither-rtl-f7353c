// Bit registers of the SAR logic, plus the path-select flag S1.
//
// Bit k records the comparator decision when its bit clock CLKk fires and
// holds it; the held code switches the DAC (through the DPCSN and the
// buffers). All bits clear when a conversion starts (PHI_MSB), so undecided
// bits read as zero. S1 is set together with the last bit and cleared at
// the next start: it tells the DPCSN that the N-th bit has been decided and
// the dithered code may go to the DAC.
//
// Clearing at PHI_MSB and generating S1 from the last bit clock are this
// design's choices; the document names S1 but not its source.
//
// Interface: comp_out is the comparator decision (1 = input above the DAC
// level, bit kept), bit_clk the lock enables. code and s1 change on the
// clock edge where the enable is high.
module sar_bit_regs #(
  parameter int N = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phi_msb,
  input  logic       comp_out,
  input  logic [1:N] bit_clk,
  output logic [1:N] code,
  output logic       s1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
      s1   <= 1'b0;
    end else if (phi_msb) begin
      code <= '0;
      s1   <= 1'b0;
    end else begin
      for (int k = 1; k <= N; k++) begin
        if (bit_clk[k]) code[k] <= comp_out;
      end
      if (bit_clk[N]) s1 <= 1'b1;
    end
  end

endmodule
