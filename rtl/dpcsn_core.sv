// DPCSN core: one-LSB dither injection into an N-bit SAR stage code.
//
// The stage resolution is N = M*K + 1. The upper M*K bits are split into M
// slices of K bits, each handled by an independent sub-block
// (dpcsn_sub_block) that pre-computes its carry and borrow results and
// selects among them once the lower bits are known. The remaining bit, the
// LSB, always flips when one LSB is added or subtracted, so an inverter
// produces Code_New<N>. The result is code_new = code + 1 for DITHER_POS and
// code - 1 for DITHER_NEG, modulo 2^N: like the described K-bit adders,
// nothing is kept beyond the stage width (a full-scale code wraps).
//
// TWO_GROUP = 1 selects the reduced arrangement for M > 2: only two
// sub-blocks, the first covering Code<1:N-K-1> and the second, final one
// Code<N-K:N-1>, so the first group's wider adders have the K decisions of
// the second group to settle in. The result is the same; only the timing
// budget differs. TWO_GROUP = 0 is the regular M-block arrangement.
//
// Interface: code[1] is the MSB, code[N] the LSB. Combinational; the sub-
// blocks share no signals, so the path from code[N] to any output bit is
// one chain gate plus one mux level (or the inverter for bit N).
module dpcsn_core
  import dpcsn_pkg::*;
#(
  parameter int K = 2,             // bits per sub-block
  parameter int M = 2,             // number of sub-blocks
  parameter bit TWO_GROUP = 1'b0,  // merge the first M-1 slices into one group
  localparam int N = M*K + 1       // stage resolution
) (
  input  logic [1:N] code,
  input  dither_t    dither,
  output logic [1:N] code_new
);

  if (TWO_GROUP && M > 2) begin : g_two
    localparam int W1 = N - K - 1;  // width of the first group

    dpcsn_sub_block #(.BW(W1), .LW(N - W1)) u_first (
      .code_blk     (code[1:W1]),
      .code_low     (code[W1+1:N]),
      .dither       (dither),
      .code_new_blk (code_new[1:W1])
    );

    dpcsn_sub_block #(.BW(K), .LW(1)) u_final (
      .code_blk     (code[W1+1:N-1]),
      .code_low     (code[N:N]),
      .dither       (dither),
      .code_new_blk (code_new[W1+1:N-1])
    );
  end else begin : g_regular
    for (genvar i = 1; i <= M; i++) begin : g_blk
      dpcsn_sub_block #(.BW(K), .LW(N - i*K)) u_blk (
        .code_blk     (code[i*K-K+1:i*K]),
        .code_low     (code[i*K+1:N]),
        .dither       (dither),
        .code_new_blk (code_new[i*K-K+1:i*K])
      );
    end
  end

  // The final bit: a one-LSB dither always flips the LSB.
  assign code_new[N] = ~code[N];

endmodule
