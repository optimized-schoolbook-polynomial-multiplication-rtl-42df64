// tb_rlwe_encode: both message bits, and the round trip through the
// decoder, including the largest tolerated noise on either side.
module tb_rlwe_encode;
  import rlwe_pkg::*;

  logic  bit_in, bit_out;
  coef_t coef, noisy;
  int    checks = 0, failures = 0;

  rlwe_encode dut (.bit_in, .coef);
  rlwe_decode u_dec (.coef(noisy), .bit_out);

  initial begin
    for (int b = 0; b < 2; b++) begin
      bit_in = b[0];
      noisy  = '0;
      #1;
      checks++;
      if (int'(coef) != (b ? 3840 : 0)) begin
        failures++;
        $display("FAIL encode(%0d) = %0d", b, coef);
      end
      // noise up to +-1919 must not change the decoded bit
      for (int e = -1919; e <= 1919; e += 101) begin
        noisy = coef_t'((int'(coef) + e + int'(Q)) % int'(Q));
        #1;
        checks++;
        if (bit_out != b[0]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d noise %0d", b, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
