// spma_acc_lane: one accumulation lane of the SPMA.
//
// Each valid cycle it takes a reduced product m in [0, q) and adds either
// m or q - m to its running sum, then reduces the sum with one conditional
// subtraction (sum + addend < 2q, so a comparator and a multiplexer are
// enough). q - m is chosen when neg = 1; the SPMA drives neg with the XOR
// of the negacyclic wrap sign and the sign bit of the noise coefficient.
// On the first product of a row the sum starts from the coefficient c_init
// instead of the old sum, which computes d[i] = c[i] + sum_j (+-) a*b.
//
// Interface: valid, first, neg, m, c_init in; sum out (registered, 14-bit
// register, value always < q). Timing: the sum register updates on the
// clock edge of a valid cycle; no latency beyond that register.
//
// Follows the published design: the q - m multiplexer, the adder, the 14-bit sum
// register and the multiplexer-only reduction. Loading c as part of the
// first addition (rather than in a separate cycle) is this design's choice.
module spma_acc_lane
  import rlwe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  logic  first,
  input  logic  neg,
  input  coef_t m,
  input  coef_t c_init,
  output coef_t sum
);

  logic [ACCW-1:0] sum_q;
  logic [ACCW-1:0] addend, base, tmp, next;

  always_comb begin
    addend = neg ? ACCW'(Q) - ACCW'(m) : ACCW'(m);
    base   = first ? ACCW'(c_init) : sum_q;
    tmp    = base + addend;
    next   = (tmp >= ACCW'(Q)) ? tmp - ACCW'(Q) : tmp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sum_q <= '0;
    else if (valid) sum_q <= next;
  end

  assign sum = sum_q[QW-1:0];

endmodule
