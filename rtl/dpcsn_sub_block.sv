// One sub-block of the DPCSN core.
//
// The sub-block owns the BW-bit slice Code<iK-K+1:iK> of the stage code. A
// one-LSB dither added to the whole code can change this slice in only three
// ways: it gains +1 (a carry arrives from below, +1 LSB dither and all lower
// bits ones), it gains 1..1, i.e. -1 (a borrow arrives, -1 LSB dither and
// all lower bits zeros), or it stays unchanged (every other case).
//
// Two BW-bit adders work out the first two results as soon as the slice is
// decided, long before the lower bits are known: one adds 0..01, the other
// adds 1..1; both drop their carry out. A mux group then picks the result:
// the dither polarity chooses between the "+0..01 or unchanged" pair and the
// "+1..1 or unchanged" pair, and the select chain (dpcsn_xor_tree) chooses
// within the pair. When the LSB finally arrives only the chain's last gate
// and the last mux level remain to settle.
//
// Structure (two adders, four-input mux group, select chain) follows the
// described sub-block. BW and LW are separate parameters so the same block
// also serves the wider first group of the two-group arrangement.
//
// Interface: code_blk is the slice, code_low the LW bits below it down to
// the LSB, code_new_blk the slice after dither injection. Combinational.
module dpcsn_sub_block
  import dpcsn_pkg::*;
#(
  parameter int BW = 2,  // width of the slice, K
  parameter int LW = 1   // number of lower bits, n - iK
) (
  input  logic [1:BW] code_blk,
  input  logic [1:LW] code_low,
  input  dither_t     dither,
  output logic [1:BW] code_new_blk
);

  logic [1:BW] sum_plus;   // slice + 0..01
  logic [1:BW] sum_minus;  // slice + 1..1 (slice - 1)
  logic        sel;

  // The two BW-bit adders. Their carry out is not used.
  assign sum_plus  = code_blk + BW'(1);
  assign sum_minus = code_blk + {BW{1'b1}};

  dpcsn_xor_tree #(.W(LW)) u_tree (
    .code_low (code_low),
    .dither   (dither),
    .sel      (sel)
  );

  // Mux group: dither polarity picks the pair, the chain output the member.
  always_comb begin
    unique case (dither)
      DITHER_POS: code_new_blk = sel ? sum_plus  : code_blk;
      DITHER_NEG: code_new_blk = sel ? sum_minus : code_blk;
    endcase
  end

endmodule
