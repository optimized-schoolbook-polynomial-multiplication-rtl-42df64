// tb_spma_acc_lane: random rows of (m, neg) pairs with a random starting
// coefficient; the lane's sum is compared after every valid cycle with an
// integer model of sum = (sum + (neg ? -m : m)) mod q. Every fourth
// product is chosen so that the unreduced sum equals q exactly.
module tb_spma_acc_lane;
  import rlwe_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  valid, first, neg;
  coef_t m, c_init, sum;
  int    checks = 0, failures = 0;
  int    model;

  spma_acc_lane dut (.clk, .rst_n, .valid, .first, .neg, .m, .c_init, .sum);

  always #5 clk = ~clk;

  initial begin
    valid = 0; first = 0; neg = 0; m = '0; c_init = '0; model = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < 200; row++) begin
      for (int j = 0; j < 20; j++) begin
        @(negedge clk);
        valid  = ($urandom_range(3) != 0) || j == 0;
        first  = (j == 0);
        neg    = $urandom_range(1);
        m      = (row % 5 == 0) ? coef_t'(($urandom_range(1) != 0) ? 0 : int'(Q) - 1)
                                : coef_t'($urandom_range(int'(Q) - 1));
        c_init = coef_t'($urandom_range(int'(Q) - 1));
        // every fourth product brings the sum to exactly q (must wrap to 0)
        if (j % 4 == 3) begin
          neg = 0;
          m   = coef_t'((int'(Q) - model) % int'(Q));
        end
        if (valid) begin
          if (first) model = int'(c_init);
          model = (model + (neg ? int'(Q) - int'(m) : int'(m))) % int'(Q);
        end
        @(posedge clk);
        #1;
        checks++;
        if (int'(sum) != model) begin
          failures++;
          if (failures < 10) $display("FAIL row=%0d j=%0d sum=%0d model=%0d", row, j, sum, model);
        end
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
