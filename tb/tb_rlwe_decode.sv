// tb_rlwe_decode: every coefficient 0..q-1 against the rule
// "1 when the coefficient lies strictly between q/4 and 3q/4".
module tb_rlwe_decode;
  import rlwe_pkg::*;

  coef_t coef;
  logic  bit_out, expected;
  int    checks = 0, failures = 0;

  rlwe_decode dut (.coef, .bit_out);

  initial begin
    for (int v = 0; v < int'(Q); v++) begin
      coef = coef_t'(v);
      // 4v > q and 4v < 3q, in integers
      expected = (4 * v > int'(Q)) && (4 * v < 3 * int'(Q));
      #1;
      checks++;
      if (bit_out != expected) begin
        failures++;
        if (failures < 10) $display("FAIL coef=%0d bit=%0d", v, bit_out);
      end
    end
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
