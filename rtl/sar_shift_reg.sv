// Shift register producing the shifted bit clocks CLK1..CLKn.
//
// A one-hot token marks the bit under decision. The first PHI_SAR strobe of
// a conversion puts it on bit 1 and every later strobe moves it one bit on.
// The bit clock CLKk is the lock pulse for bit k: token on k while the
// comparator reports its decision ready. The token is cleared once the last
// bit has locked, so nothing is latched between conversions.
//
// The token-and-enable form, for one synchronous clock, is this design's
// choice; the document gives the register's role, not its circuit.
//
// Interface: phi_sar strobe, comp_ready pulse; bit_clk[k] is the one-cycle
// lock enable of bit k, last_bit is high while bit N is under decision.
module sar_shift_reg #(
  parameter int N = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phi_sar,
  input  logic       comp_ready,
  output logic [1:N] bit_clk,
  output logic       last_bit
);

  localparam logic [1:N] FIRST = N'(1) << (N - 1);  // token on bit 1

  logic [1:N] token;
  logic       active;  // a token is in the register

  assign active = |token;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token <= '0;
    end else if (phi_sar) begin
      token <= active ? (token >> 1) : FIRST;
    end else if (comp_ready && token[N]) begin
      token <= '0;
    end
  end

  assign bit_clk  = comp_ready ? token : '0;
  assign last_bit = token[N];

endmodule
