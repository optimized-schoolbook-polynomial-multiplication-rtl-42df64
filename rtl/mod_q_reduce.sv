// mod_q_reduce: y = x mod 7681 for an 18-bit unsigned x, without a divider
// or a multiplier.
//
// Because q = 2^13 - 2^9 + 1, x = 2^13*h + l (h = x[17:13], l = x[12:0])
// satisfies x - h*q = l + h*(2^9 - 1). The quotient estimate is
// t = x[17] + x[17:13]; t*q is formed as (t << 13) + t - (t << 9), and
// y = x - t*q lies in [0, 3q) for every 18-bit x, so two conditional
// subtractions of q finish the reduction. This is the reduction the
// reduced-width SPMA uses on each 13x5 product (at most 7680*31 < 2^18).
//
// Interface: x (18 bits) in, y (13 bits, 0 <= y < q) out. Purely
// combinational; the caller registers around it.
//
// Follows the published design: the estimate, the shift form of t*q and the two
// subtraction steps. The input width of 18 bits (bits 17..0) is taken from
// the bit positions the reduction uses.
module mod_q_reduce
  import rlwe_pkg::*;
(
  input  prod_t x,
  output coef_t y
);

  logic [5:0]    t;     // quotient estimate, at most 32
  logic [PW-1:0] tq;    // t * q, at most 32 * 7681 < 2^18
  logic [PW-1:0] y0, y1, y2;

  always_comb begin
    t  = 6'(x[PW-1]) + 6'(x[PW-1:QW]);
    tq = (PW'(t) << 13) + PW'(t) - (PW'(t) << 9);
    y0 = x - tq;
    y1 = (y0 >= PW'(Q)) ? y0 - PW'(Q) : y0;
    y2 = (y1 >= PW'(Q)) ? y1 - PW'(Q) : y1;
    y  = y2[QW-1:0];
  end

endmodule
