// rlwe_decode: maps one decrypted coefficient back to a message bit.
//
// A coefficient closer to q/2 than to 0 (modulo q) decodes to 1: the
// output is 1 for q/4 < coef < 3q/4, that is 1921 <= coef <= 5760 for
// q = 7681, and 0 otherwise. This inverts rlwe_encode as long as the
// accumulated noise stays below q/4 in magnitude.
//
// Interface: coef in; bit_out out, combinational.
//
// The published design names DECODE only; the threshold rule is the usual one for
// this R-LWE scheme and is this design's choice.
module rlwe_decode
  import rlwe_pkg::*;
(
  input  coef_t coef,
  output logic  bit_out
);

  localparam coef_t LO = coef_t'(Q / 4 + 1);      // 1921
  localparam coef_t HI = coef_t'((3 * Q) / 4);    // 5760

  assign bit_out = (coef >= LO) && (coef <= HI);

endmodule
