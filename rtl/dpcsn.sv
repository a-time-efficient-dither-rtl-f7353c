// Delay-reduced post-dither code selection network (DPCSN).
//
// Sits between the bit registers and the DAC buffers of a SAR stage, where
// a conventional design would put a chain of bit adders. Two paths reach
// the output. Path one carries the bit-register code unchanged, so the SAR
// search over the first N-1 bits runs without any dither disturbance. Path
// two carries the DPCSN core result, code + dither (one LSB). The core
// works on the partial code all through the conversion, so by the time the
// LSB is decided its adders are settled. S1 switches the multiplexers to
// path two once the N-th bit has been decided.
//
// Interface: code from the bit registers (code[1] = MSB), dither polarity,
// s1 (0 = path one, 1 = path two); dout goes to the DAC buffers.
// Combinational.
module dpcsn
  import dpcsn_pkg::*;
#(
  parameter int K = 2,
  parameter int M = 2,
  parameter bit TWO_GROUP = 1'b0,
  localparam int N = M*K + 1
) (
  input  logic [1:N] code,
  input  dither_t    dither,
  input  logic       s1,
  output logic [1:N] dout
);

  logic [1:N] code_new;

  dpcsn_core #(.K(K), .M(M), .TWO_GROUP(TWO_GROUP)) u_core (
    .code     (code),
    .dither   (dither),
    .code_new (code_new)
  );

  // Path multiplexers.
  assign dout = s1 ? code_new : code;

endmodule
