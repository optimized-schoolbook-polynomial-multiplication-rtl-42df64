// poly_add: coefficient-wise polynomial addition modulo q = 7681.
//
// Adds two coefficients in [0, q) and subtracts q once if the 14-bit sum
// reaches q. Polynomial addition is applied one coefficient at a time as
// the coefficients stream past, so the block is a single combinational
// adder, comparator and multiplexer.
//
// Interface: x, y in; s = (x + y) mod q out, combinational.
//
// The published design shows the adder; its inner structure is this design's
// choice.
module poly_add
  import rlwe_pkg::*;
(
  input  coef_t x,
  input  coef_t y,
  output coef_t s
);

  logic [QW:0] sum;

  always_comb begin
    sum = {1'b0, x} + {1'b0, y};
    if (sum >= (QW+1)'(Q)) sum = sum - (QW+1)'(Q);
    s = sum[QW-1:0];
  end

endmodule
