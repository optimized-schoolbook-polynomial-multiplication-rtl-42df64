// rlwe_pkg: constants and helper functions shared by the R-LWE schoolbook
// polynomial multiply-accumulate (SPMA) datapath and the encryption /
// decryption wrapper around it.
//
// The ring is Z_q[x]/(x^n + 1) with the medium-security parameter set
// n = 256, q = 7681 (13-bit coefficients). Gaussian noise and the secret
// key are held in a reduced 6-bit sign/magnitude form: bit 5 is the sign,
// bits 4..0 the magnitude (0..31), because the noise with sigma = 4.51 is
// bounded to [-31, 31]. The CDT constants below are this design's own
// computation of that distribution (see cdt_sampler).
package rlwe_pkg;

  localparam int unsigned N_POLY = 256;   // ring dimension n
  localparam int unsigned Q      = 7681;  // prime modulus
  localparam int unsigned QW     = 13;    // bits of a coefficient in [0, q)
  localparam int unsigned SW     = 6;     // bits of a small signed sample
  localparam int unsigned MW     = 5;     // magnitude bits of a small sample
  localparam int unsigned PW     = 18;    // bits of a 13x5 product
  localparam int unsigned ACCW   = 14;    // bits of the accumulator sum

  typedef logic [QW-1:0] coef_t;          // coefficient in [0, q)
  typedef logic [SW-1:0] small_t;         // {sign, magnitude[4:0]}
  typedef logic [PW-1:0] prod_t;          // one 18-bit field of the product

  // Encoded message bit 1: floor(q/2).
  localparam coef_t Q_HALF = coef_t'(Q / 2);

  // Sign and magnitude of a small sample.
  function automatic logic small_sign(small_t s);
    return s[SW-1];
  endfunction

  function automatic logic [MW-1:0] small_mag(small_t s);
    return s[MW-1:0];
  endfunction

  // Value of a small sample as an element of [0, q): -m becomes q - m,
  // and "-0" becomes 0.
  function automatic coef_t small_to_coef(small_t s);
    coef_t m;
    m = coef_t'(s[MW-1:0]);
    if (s[SW-1] && (m != '0)) return coef_t'(Q) - m;
    return m;
  endfunction

endpackage
