// rlwe_encode: maps one message bit to a coefficient of Z_q.
//
// Bit 1 becomes floor(q/2) = 3840 and bit 0 becomes 0, placing the two
// values as far apart as possible on the ring so that the noise added by
// encryption and decryption (well below q/4) cannot move one onto the
// other. Each message bit drives one coefficient of the encoded polynomial.
//
// Interface: bit_in in; coef out, combinational.
//
// The published design names ENCODE only; this mapping is the usual one for this
// R-LWE scheme and is this design's choice.
module rlwe_encode
  import rlwe_pkg::*;
(
  input  logic  bit_in,
  output coef_t coef
);

  assign coef = bit_in ? Q_HALF : coef_t'(0);

endmodule
