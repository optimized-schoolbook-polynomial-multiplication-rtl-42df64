// spma_ctrl: control address unit of the SPMA.
//
// Walks the loops of the two-lane schoolbook multiply-accumulate: an outer
// row index i = 0, 2, ..., n-2 (lane 1 computes d[i], lane 2 d[i+1]) and an
// inner index j = 0 .. n-1, one (i, j) pair issued per clock. For each pair
// it addresses a[j], b[(i - j) mod n] and b[(i + 1 - j) mod n], and gives
// the negacyclic wrap signs sig1 = (i < j) and sig2 = (i + 1 < j): a product
// whose b index wrapped past x^n picks up a factor -1. The c coefficients
// of the row are read through a single port, c[i] with j = 0 and c[i+1]
// with j = 1. first/last mark j = 0 and j = n-1 so the datapath knows where
// a row starts and ends.
//
// Interface: start (pulse, ignored while busy) begins one full
// multiplication; issue is high for each of the n*n/2 issue cycles, which
// follow start back to back; busy covers them. The outputs are the loop
// counters, or a subtraction or comparison of them, so they are valid from
// the clock edge that advances the counters.
// N must be a power of two (addresses wrap modulo n by truncation).
//
// Follows the published design: the loop order, the two b addresses and the sign
// rules. The single c port read on j = 0 and j = 1 and the first/last tags
// are this design's choice.
module spma_ctrl #(
  parameter int unsigned N = rlwe_pkg::N_POLY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 issue,
  output logic                 first,
  output logic                 last,
  output logic [$clog2(N)-1:0] row,
  output logic [$clog2(N)-1:0] a_addr,
  output logic [$clog2(N)-1:0] b1_addr,
  output logic [$clog2(N)-1:0] b2_addr,
  output logic                 c_re,
  output logic [$clog2(N)-1:0] c_addr,
  output logic                 sig1,
  output logic                 sig2
);

  localparam int unsigned LN = $clog2(N);
  typedef logic [LN-1:0] idx_t;

  idx_t i_q, j_q;
  logic active_q;

  initial assert (N >= 4 && (N & (N - 1)) == 0)
    else $error("spma_ctrl: N must be a power of two of at least 4");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      i_q      <= '0;
      j_q      <= '0;
    end else if (!active_q) begin
      if (start) begin
        active_q <= 1'b1;
        i_q      <= '0;
        j_q      <= '0;
      end
    end else begin
      j_q <= j_q + 1'b1;
      if (j_q == idx_t'(N - 1)) begin
        i_q <= i_q + idx_t'(2);
        if (i_q == idx_t'(N - 2)) active_q <= 1'b0;
      end
    end
  end

  always_comb begin
    busy    = active_q;
    issue   = active_q;
    first   = (j_q == '0);
    last    = (j_q == idx_t'(N - 1));
    row     = i_q;
    a_addr  = j_q;
    b1_addr = i_q - j_q;
    b2_addr = i_q + 1'b1 - j_q;
    sig1    = (i_q < j_q);
    sig2    = ({1'b0, i_q} + 1'b1) < {1'b0, j_q};
    c_re    = active_q && (j_q <= idx_t'(1));
    c_addr  = i_q + idx_t'(j_q[0]);
  end

endmodule
