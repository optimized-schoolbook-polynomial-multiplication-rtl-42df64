// dual_mult: two 13x5 unsigned multiplications in one 23x13 multiplier.
//
// The two 5-bit magnitudes are packed into one 23-bit operand as
// {b_hi, 13'b0, b_lo}. Multiplied by the 13-bit coefficient a, the low
// product a*b_lo (< 2^18) occupies bits 17..0 and the high product a*b_hi
// occupies bits 35..18 of the 36-bit result, with no carry between them.
// On a 7-series FPGA the 23x13 product fits a single 25x18 DSP slice, so
// one DSP block yields two products per clock.
//
// Interface: a (13 bits), b_lo and b_hi (5 bits) in; p_lo and p_hi
// (18 bits each) out. Timing: two register stages, like the input and
// product registers of a DSP slice: operands presented in cycle T give
// products in cycle T+2. Free-running, no enable.
//
// Follows the published design: the packing, the 13 zero bits and the field
// positions. The two register stages are this design's choice.
module dual_mult
  import rlwe_pkg::*;
(
  input  logic          clk,
  input  coef_t         a,
  input  logic [MW-1:0] b_lo,
  input  logic [MW-1:0] b_hi,
  output prod_t         p_lo,
  output prod_t         p_hi
);

  localparam int unsigned PACKW = 2*MW + QW;   // 23-bit packed operand

  logic [PACKW-1:0]  pack_q;
  coef_t             a_q;
  logic [2*PW-1:0]   prod_q;                   // 36-bit product

  always_ff @(posedge clk) begin
    pack_q <= {b_hi, {QW{1'b0}}, b_lo};
    a_q    <= a;
    prod_q <= (2*PW)'(pack_q) * (2*PW)'(a_q);
  end

  assign p_lo = prod_q[PW-1:0];
  assign p_hi = prod_q[2*PW-1:PW];

endmodule
