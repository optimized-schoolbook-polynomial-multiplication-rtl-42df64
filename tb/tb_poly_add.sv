// tb_poly_add: modular addition of random and corner coefficient pairs
// against (x + y) % q.
module tb_poly_add;
  import rlwe_pkg::*;

  coef_t x, y, s;
  int    checks = 0, failures = 0;

  poly_add dut (.x, .y, .s);

  task automatic check(int xv, int yv);
    x = coef_t'(xv); y = coef_t'(yv);
    #1;
    checks++;
    if (int'(s) != (xv + yv) % int'(Q)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d = %0d", xv, yv, s);
    end
  endtask

  initial begin
    check(0, 0); check(int'(Q) - 1, int'(Q) - 1); check(int'(Q) - 1, 1);
    check(int'(Q) - 1, 0); check(3840, 3841); check(3840, 3840);
    for (int k = 0; k < 20000; k++)
      check($urandom_range(int'(Q) - 1), $urandom_range(int'(Q) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
