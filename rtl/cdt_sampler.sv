// cdt_sampler: constant-time cumulative distribution table (CDT) sampler
// of the zero-centred discrete Gaussian with sigma = 4.51 (s = 11.31).
//
// One 32-bit random word per sample: bit 31 is the sign, bits 30..0 a
// uniform fraction r. The magnitude is the number of table entries that r
// reaches, |x| = #{k in 0..30 : r >= CDT[k]}, found with 31 comparators in
// parallel, so every sample takes the same single cycle whatever its value.
// The magnitude is bounded to 31 and the result is given in the 6-bit
// sign/magnitude form of the SPMA noise operand; a zero magnitude is always
// returned with sign 0.
//
// Table formula (rho(x) = exp(-x^2 / (2 sigma^2)), x bounded to [-31, 31]):
//   CDT[k] = round(2^31 * (rho(0) + 2*sum_{x=1..k} rho(x))
//                       / (rho(0) + 2*sum_{x=1..31} rho(x)))
// so P(|x| = 0) = rho(0)/S and P(|x| = k) = 2 rho(k)/S before the random
// sign is applied.
//
// Interface: en and rng in; valid and sample out one cycle later
// (registered). One sample per clock while en is high.
//
// Follows the published design: CDT sampling in constant time, sigma = 4.51 and
// the [-31, 31] bound with a sign bit and five data bits. The 31-bit table
// precision, the parallel comparison and the use of rng bit 31 as sign are
// this design's choices.
module cdt_sampler
  import rlwe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] rng,
  output logic        valid,
  output small_t      sample
);

  localparam int unsigned ENTRIES = 31;

  localparam logic [31:0] CDT [ENTRIES] = '{
    32'h0b529159, 32'h216aef7c, 32'h35f12dc2, 32'h4817bbd3, 32'h575fbf44,
    32'h639f53e3, 32'h6cf80104, 32'h73c232b8, 32'h78745ac6, 32'h7b8be4a2,
    32'h7d7c1071, 32'h7ea42a31, 32'h7f4c6446, 32'h7fa7620d, 32'h7fd63cd8,
    32'h7fed3511, 32'h7ff7ed71, 32'h7ffcb0d4, 32'h7ffeb4a3, 32'h7fff845c,
    32'h7fffd400, 32'h7ffff111, 32'h7ffffb2b, 32'h7ffffe82, 32'h7fffff90,
    32'h7fffffe1, 32'h7ffffff8, 32'h7ffffffe, 32'h7fffffff, 32'h80000000,
    32'h80000000
  };

  logic [31:0]   r;
  logic [MW-1:0] mag;

  always_comb begin
    r   = {1'b0, rng[30:0]};
    mag = '0;
    for (int k = 0; k < ENTRIES; k++) begin
      mag = mag + MW'(r >= CDT[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      sample <= '0;
    end else begin
      valid  <= en;
      if (en) sample <= {rng[31] && (mag != '0), mag};
    end
  end

endmodule
