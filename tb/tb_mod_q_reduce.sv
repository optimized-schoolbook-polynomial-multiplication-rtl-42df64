// tb_mod_q_reduce: exhaustive check of the mod-7681 reduction over every
// 18-bit input against the % operator.
module tb_mod_q_reduce;
  import rlwe_pkg::*;

  prod_t x;
  coef_t y;
  int    checks = 0, failures = 0;

  mod_q_reduce dut (.x, .y);

  initial begin
    for (int v = 0; v < (1 << PW); v++) begin
      x = prod_t'(v);
      #1;
      checks++;
      if (int'(y) != v % int'(Q)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", v, y, v % int'(Q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
