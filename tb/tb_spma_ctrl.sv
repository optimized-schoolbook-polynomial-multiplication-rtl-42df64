// tb_spma_ctrl: two complete runs of the SPMA address generator at n = 256.
// Every issue cycle is compared with the loops i = 0, 2, .., n-2 and
// j = 0 .. n-1 of the two-lane schoolbook algorithm: a[j],
// b[(i-j) mod n], b[(i+1-j) mod n], the wrap signs, c[i] / c[i+1] on
// j = 0 / 1, and the row tags. The issue count must be exactly n*n/2,
// back to back after start.
module tb_spma_ctrl;
  localparam int N = 256;
  localparam int LN = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, issue, first, last, c_re, sig1, sig2;
  logic [LN-1:0] row, a_addr, b1_addr, b2_addr, c_addr;
  int checks = 0, failures = 0;

  spma_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < N; i += 2) begin
        for (int j = 0; j < N; j++) begin
          expect_eq("issue", issue, 1);
          expect_eq("row", row, i);
          expect_eq("a_addr", a_addr, j);
          expect_eq("b1_addr", b1_addr, (i - j + N) % N);
          expect_eq("b2_addr", b2_addr, (i + 1 - j + N) % N);
          expect_eq("sig1", sig1, i < j);
          expect_eq("sig2", sig2, i + 1 < j);
          expect_eq("first", first, j == 0);
          expect_eq("last", last, j == N - 1);
          expect_eq("c_re", c_re, j < 2);
          if (j < 2) expect_eq("c_addr", c_addr, i + j);
          @(negedge clk);
        end
      end
      expect_eq("issue after n*n/2", issue, 0);
      expect_eq("busy after n*n/2", busy, 0);
      repeat (5) @(negedge clk);
      expect_eq("idle", issue, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
