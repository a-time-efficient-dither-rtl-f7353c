// Select chain ("XOR tree") of one DPCSN sub-block.
//
// A sub-block owning Code<iK-K+1:iK> must know whether the one-LSB dither
// ripples into it from below. With +1 LSB it does when the lower bits
// Code<iK+1:n> are all ones (a carry arrives); with -1 LSB it does when they
// are all zeros (a borrow arrives). Either way the question is "does every
// lower bit equal the dither polarity?".
//
// Each lower bit is compared with the dither polarity by an XOR-type
// equality gate, and the comparisons are combined along a chain in the order
// the SAR decides the bits: the first stage joins Code<iK+1> and Code<iK+2>,
// every further stage adds the next bit, and the last stage takes Code<n>,
// the LSB. All stages but the last settle while the SAR is still deciding,
// so after Code<n> arrives only one gate lies between it and `sel`.
//
// The chain order, the number of stages (W-1 for W inputs) and the place of
// Code<n> at the top follow the described structure. The gates themselves
// are an equality compare plus an AND per stage: a plain parity of the lower
// bits cannot tell "all ones" or "all zeros" from the other codes, so this
// design realises the selection rule that the scheme states in words.
//
// Interface: code_low[1] = Code<iK+1> ... code_low[W] = Code<n>; `dither`
// is the polarity; `sel` is 1 when the sub-block must take the adder result.
// Purely combinational.
module dpcsn_xor_tree
  import dpcsn_pkg::*;
#(
  parameter int W = 1  // number of lower bits, n - iK
) (
  input  logic [1:W] code_low,
  input  dither_t    dither,
  output logic       sel
);

  logic [1:W] match;  // lower bit j equals the dither polarity
  logic [1:W] chain;  // all of lower bits 1..j equal the dither polarity

  assign match = ~(code_low ^ {W{logic'(dither)}});

  // Stage j of the chain joins the result so far with lower bit j.
  assign chain[1] = match[1];
  for (genvar j = 2; j <= W; j++) begin : g_stage
    assign chain[j] = chain[j-1] & match[j];
  end

  assign sel = chain[W];

endmodule
