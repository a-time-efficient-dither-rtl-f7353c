// Self-timing SAR logic of one pipelined-SAR stage with DPCSN dither
// injection.
//
// Each stage of a pipelined SAR ADC is a small N-bit SAR converter whose
// residue is amplified into the next stage. For digital calibration a
// one-LSB dither is injected into that residue by switching the DAC with
// code + dither instead of code. Putting adders between the bit registers
// and the DAC would slow every SAR step and add a full N-bit carry chain
// after the last decision. Here the DPCSN does the injection instead: the
// first N-1 bits go to the DAC untouched (path one), the dithered code is
// prepared on the side, and after the N-th decision S1 switches the DAC to
// it (path two) with only a gate and a mux of delay.
//
// Blocks: pulse generator (PHI_SAR strobes), shift register (bit clocks
// CLK1..CLKN), bit registers (+ S1), DPCSN. The comparator, the capacitive
// sub-DAC and the DAC buffers are analog and sit outside: this module gives
// the strobe to the comparator, takes its decision and ready signal, and
// drives `dout` towards the buffers.
//
// Timing, all on one clock standing in for the asynchronous loop:
//   cycle 0      phi_msb high (accepted when not busy); dither is sampled
//   cycle 1      phi_sar strobe for bit 1
//   strobe + L   comparator answers with comp_ready and comp_out
//   next cycle   bit locked; phi_sar for the next bit
// With comparator latency L a conversion takes N*(L+1) cycles from phi_msb
// to the edge where the last bit locks; from that edge s1 is high and dout
// carries code + dither (modulo 2^N) until the next start. Until then dout
// equals the raw bit-register code, with undecided bits at zero.
//
// The block split, the S1 muxes and the DPCSN follow the described logic;
// the single clock, the sampling of the dither at the start and the ready
// handshake of the comparator are this design's choices.
module dither_sar_logic
  import dpcsn_pkg::*;
#(
  parameter int K = 2,
  parameter int M = 2,
  parameter bit TWO_GROUP = 1'b0,
  localparam int N = M*K + 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phi_msb,     // conversion start
  input  dither_t    dither,      // dither polarity for this conversion
  output logic       phi_sar,     // comparator strobe
  input  logic       comp_out,    // comparator decision
  input  logic       comp_ready,  // comparator decision valid (self-timing)
  output logic [1:N] code,        // raw bit-register code
  output logic [1:N] dout,        // code to the DAC buffers
  output logic       s1,          // 1 = dithered code on dout
  output logic       busy         // conversion in progress
);

  logic       start;
  logic       last_bit;
  logic [1:N] bit_clk;
  dither_t    dither_q;

  assign start = phi_msb & ~busy;

  // The dither must be settled before the SAR search begins.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dither_q <= DITHER_POS;
    else if (start) dither_q <= dither;
  end

  sar_pulse_gen u_pulse (
    .clk        (clk),
    .rst_n      (rst_n),
    .phi_msb    (start),
    .comp_ready (comp_ready),
    .last_bit   (last_bit),
    .phi_sar    (phi_sar),
    .busy       (busy)
  );

  sar_shift_reg #(.N(N)) u_shift (
    .clk        (clk),
    .rst_n      (rst_n),
    .phi_sar    (phi_sar),
    .comp_ready (comp_ready),
    .bit_clk    (bit_clk),
    .last_bit   (last_bit)
  );

  sar_bit_regs #(.N(N)) u_bits (
    .clk      (clk),
    .rst_n    (rst_n),
    .phi_msb  (start),
    .comp_out (comp_out),
    .bit_clk  (bit_clk),
    .code     (code),
    .s1       (s1)
  );

  dpcsn #(.K(K), .M(M), .TWO_GROUP(TWO_GROUP)) u_dpcsn (
    .code   (code),
    .dither (dither_q),
    .s1     (s1),
    .dout   (dout)
  );

  // Comparator handshake: one decision per strobe, no strobe while one is
  // outstanding.
  logic waiting;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          waiting <= 1'b0;
    else if (phi_sar)    waiting <= 1'b1;
    else if (comp_ready) waiting <= 1'b0;
  end

  a_ready_after_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    comp_ready |-> waiting)
    else $error("comp_ready without an outstanding PHI_SAR strobe");
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    phi_sar |-> !waiting)
    else $error("PHI_SAR while a decision is outstanding");

endmodule
