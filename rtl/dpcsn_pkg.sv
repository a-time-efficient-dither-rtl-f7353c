// Shared types for the dither-injection SAR logic.
//
// The injected dither is always one LSB in size, so a single bit carries it:
// its polarity. DITHER_POS adds one LSB to the stage code, DITHER_NEG
// subtracts one LSB. Which logic level means which polarity is this design's
// own choice; the scheme only needs the two to be told apart.
//
// Bit numbering throughout follows the SAR convention: Code[1] is the MSB
// (decided first) and Code[N] the LSB (decided last). Vectors are declared
// [1:N], so the leftmost bit is still the most significant one and ordinary
// arithmetic on a vector gives its binary value.
package dpcsn_pkg;

  typedef enum logic {
    DITHER_NEG = 1'b0,  // inject -1 LSB
    DITHER_POS = 1'b1   // inject +1 LSB
  } dither_t;

endpackage
