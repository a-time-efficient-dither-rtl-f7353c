// Pulse generator of the self-timing SAR logic.
//
// A conversion starts with PHI_MSB. The generator then fires the comparator
// strobe PHI_SAR, waits until the comparator reports that its decision is
// ready (comp_ready, the self-timing loop), and fires the next strobe, until
// the decision of the last bit has come back. Each strobe also advances the
// shift register that produces the bit clocks.
//
// In silicon this loop is asynchronous. Here it is written for one fast
// clock: PHI_SAR is a one-cycle pulse issued the cycle after PHI_MSB or
// after a non-final comp_ready, so one bit takes (comparator latency + 1)
// cycles. The clocked form and the busy flag are this design's choices.
//
// Interface: phi_msb starts a conversion (ignored while busy), comp_ready
// is the comparator's decision-ready pulse, last_bit is high while the
// final bit is being decided. busy is high from the first strobe until the
// last decision has returned.
module sar_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic phi_msb,
  input  logic comp_ready,
  input  logic last_bit,
  output logic phi_sar,
  output logic busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_sar <= 1'b0;
      busy    <= 1'b0;
    end else begin
      phi_sar <= 1'b0;
      if (!busy) begin
        if (phi_msb) begin
          phi_sar <= 1'b1;
          busy    <= 1'b1;
        end
      end else if (comp_ready) begin
        if (last_bit) busy    <= 1'b0;
        else          phi_sar <= 1'b1;
      end
    end
  end

endmodule
