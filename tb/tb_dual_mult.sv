// tb_dual_mult: random and corner operands through the packed 23x13
// multiplier; both 18-bit products are compared with separate
// multiplications, two cycles after the operands are applied.
module tb_dual_mult;
  import rlwe_pkg::*;

  logic          clk = 0;
  coef_t         a;
  logic [MW-1:0] b_lo, b_hi;
  prod_t         p_lo, p_hi;
  int            checks = 0, failures = 0;
  int            exp_lo [$], exp_hi [$];

  dual_mult dut (.clk, .a, .b_lo, .b_hi, .p_lo, .p_hi);

  always #5 clk = ~clk;

  task automatic apply(int av, int bl, int bh);
    a = coef_t'(av); b_lo = MW'(bl); b_hi = MW'(bh);
    exp_lo.push_back(av * bl);
    exp_hi.push_back(av * bh);
  endtask

  initial begin
    a = '0; b_lo = '0; b_hi = '0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      case (k)
        0:       apply(8191, 31, 31);
        1:       apply(7680, 31, 0);
        2:       apply(7680, 0, 31);
        3:       apply(1, 1, 1);
        default: apply($urandom_range(8191), $urandom_range(31), $urandom_range(31));
      endcase
      // products of the operands applied two cycles earlier
      if (k >= 2) begin
        checks++;
        if (int'(p_lo) != exp_lo[0] || int'(p_hi) != exp_hi[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d lo=%0d/%0d hi=%0d/%0d", k, p_lo, exp_lo[0], p_hi, exp_hi[0]);
        end
        void'(exp_lo.pop_front());
        void'(exp_hi.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
