// spma: optimized schoolbook polynomial multiply-accumulate,
// d = a*b + c in Z_q[x]/(x^n + 1), q = 7681.
//
// a and c are full 13-bit coefficients; b is a small noise or key
// polynomial in 6-bit sign/magnitude form (|b| <= 31). Only the 5-bit
// magnitude enters the multiplier, so each product is 13x5 = 18 bits, and
// two such products share one 23x13 multiplier (dual_mult). Per clock the
// datapath therefore forms a[j]*|b[(i-j) mod n]| for row i and
// a[j]*|b[(i+1-j) mod n]| for row i+1, reduces both modulo q
// (mod_q_reduce), and accumulates m or q - m into two sums
// (spma_acc_lane); q - m is taken when the wrap sign (j > i, resp.
// j > i+1) differs from the sign bit of the b coefficient. A full product
// takes n*n/2 issue cycles instead of n*n.
//
// Pipeline (T = issue cycle of an (i, j) pair from spma_ctrl):
//   T    addresses out to the a, b and c memories (synchronous read)
//   T+1  read data in; c[i], c[i+1] captured into hold registers
//   T+2  multiplier operand registers
//   T+3  36-bit product register, split into two 18-bit fields
//   T+4  reduced products registered (two mod-q units)
//   T+5  sums updated; after j = n-1 d_we is high with d[row], d[row+1]
// From the cycle start is sampled to the done pulse takes n*n/2 + 6 cycles.
//
// Memory interface: a_addr/b1_addr/b2_addr with rd_en, c_addr with c_re,
// all read with one cycle of latency (data expected the cycle after the
// address). Outputs: d_we with d_addr (even row index i), d1 = d[i] and
// d2 = d[i+1]. start is a one-cycle pulse accepted while not busy; done
// pulses one cycle after the last d_we.
//
// Follows the published design: bit packing, reduced-width operands, the mod-q
// reduction, the sign rule and the two-lane accumulation. The pipeline
// depth, the handshake and the memory timing are this design's choices.
module spma
  import rlwe_pkg::*;
#(
  parameter int unsigned N = rlwe_pkg::N_POLY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // a: full coefficients
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] a_addr,
  input  coef_t                a_data,
  // b: small signed coefficients, two read ports
  output logic [$clog2(N)-1:0] b1_addr,
  output logic [$clog2(N)-1:0] b2_addr,
  input  small_t               b1_data,
  input  small_t               b2_data,
  // c: addend coefficients, one read port
  output logic                 c_re,
  output logic [$clog2(N)-1:0] c_addr,
  input  coef_t                c_data,
  // d: two result coefficients per row pair
  output logic                 d_we,
  output logic [$clog2(N)-1:0] d_addr,
  output coef_t                d1,
  output coef_t                d2
);

  localparam int unsigned LN = $clog2(N);

  typedef struct packed {
    logic          v;
    logic          first;
    logic          last;
    logic          sig1;
    logic          sig2;
    logic          c_re;
    logic          c_hi;     // c read is c[i+1]
    logic [LN-1:0] row;
  } tag_t;

  typedef struct packed {
    logic          v;
    logic          first;
    logic          last;
    logic          neg1;
    logic          neg2;
    logic [LN-1:0] row;
  } acc_tag_t;

  // ---------------- control address unit
  logic ctl_busy, issue, first, last, sig1, sig2;
  logic [LN-1:0] row;

  spma_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start,
    .busy(ctl_busy), .issue, .first, .last, .row,
    .a_addr, .b1_addr, .b2_addr, .c_re, .c_addr, .sig1, .sig2
  );

  assign rd_en = issue;

  // ---------------- T+1: read data, c hold registers, sign decision
  tag_t     t1;
  acc_tag_t t2, t3, t4;
  coef_t    c1_hold, c2_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0;
    end else begin
      t1 <= '{v: issue, first: first, last: last, sig1: sig1, sig2: sig2,
              c_re: c_re, c_hi: c_addr[0], row: row};
    end
  end

  always_ff @(posedge clk) begin
    if (t1.c_re && !t1.c_hi) c1_hold <= c_data;
    if (t1.c_re &&  t1.c_hi) c2_hold <= c_data;
  end

  // ---------------- T+2, T+3: packed multiplication
  prod_t p_lo, p_hi;

  dual_mult u_mult (
    .clk,
    .a    (a_data),
    .b_lo (small_mag(b1_data)),
    .b_hi (small_mag(b2_data)),
    .p_lo,
    .p_hi
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t2 <= '0;
      t3 <= '0;
    end else begin
      t2 <= '{v: t1.v, first: t1.first, last: t1.last,
              neg1: t1.sig1 ^ small_sign(b1_data),
              neg2: t1.sig2 ^ small_sign(b2_data), row: t1.row};
      t3 <= t2;
    end
  end

  // ---------------- T+4: modular reduction of both products
  coef_t m1, m2, m1_q, m2_q;

  mod_q_reduce u_mod1 (.x(p_lo), .y(m1));
  mod_q_reduce u_mod2 (.x(p_hi), .y(m2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t4   <= '0;
      m1_q <= '0;
      m2_q <= '0;
    end else begin
      t4   <= t3;
      m1_q <= m1;
      m2_q <= m2;
    end
  end

  // ---------------- T+5: accumulation lanes
  spma_acc_lane u_lane1 (
    .clk, .rst_n, .valid(t4.v), .first(t4.first), .neg(t4.neg1),
    .m(m1_q), .c_init(c1_hold), .sum(d1)
  );

  spma_acc_lane u_lane2 (
    .clk, .rst_n, .valid(t4.v), .first(t4.first), .neg(t4.neg2),
    .m(m2_q), .c_init(c2_hold), .sum(d2)
  );

  logic d_we_q, done_q;
  logic [LN-1:0] d_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_we_q   <= 1'b0;
      d_addr_q <= '0;
      done_q   <= 1'b0;
    end else begin
      d_we_q   <= t4.v && t4.last;
      d_addr_q <= t4.row;
      done_q   <= d_we_q && (d_addr_q == LN'(N - 2));
    end
  end

  assign d_we   = d_we_q;
  assign d_addr = d_addr_q;
  assign done   = done_q;
  assign busy   = ctl_busy || t1.v || t2.v || t3.v || t4.v || d_we_q;

  // A row's c hold registers must not be overwritten before the row's
  // first accumulation, which needs rows of at least 4 products.
  initial assert (N >= 4);
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("spma: start while busy");

endmodule
