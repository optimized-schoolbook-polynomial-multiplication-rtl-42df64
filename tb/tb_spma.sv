// tb_spma: full polynomial multiply-accumulates d = a*b + c in
// Z_7681[x]/(x^256 + 1) through the SPMA, with its a, b and c memories
// modelled here (synchronous read, one cycle). The reference evaluates the
// negacyclic sum d[k] = c[k] + sum_{i+j=k} a_i b_j - sum_{i+j=k+n} a_i b_j
// directly with signed integers. Runs: random operands, all-negative b
// with a = q-1 (largest products, every product negated or wrapped), b = 0
// (d = c), and b = x (a single 1), which rotates a negacyclically. Each
// run must take n*n/2 + 6 cycles from start to done, and every d word must
// be written exactly once.
module tb_spma;
  import rlwe_pkg::*;
  localparam int N = 256;
  localparam int LN = 8;
  localparam int LATENCY = N * N / 2 + 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, c_re, d_we;
  logic [LN-1:0] a_addr, b1_addr, b2_addr, c_addr, d_addr;
  coef_t  a_data, c_data, d1, d2;
  small_t b1_data, b2_data;

  coef_t  amem [N];
  small_t bmem [N];
  coef_t  cmem [N];
  coef_t  dmem [N];
  int     dcount [N];
  int     checks = 0, failures = 0;
  int     neg_products = 0;

  spma #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      a_data  <= amem[a_addr];
      b1_data <= bmem[b1_addr];
      b2_data <= bmem[b2_addr];
    end
    if (c_re) c_data <= cmem[c_addr];
    if (d_we) begin
      dmem[d_addr]     <= d1;
      dmem[d_addr + 1] <= d2;
      dcount[d_addr]++;
      dcount[d_addr + 1]++;
    end
  end

  function automatic int sval(small_t s);
    return s[5] ? -int'(s[4:0]) : int'(s[4:0]);
  endfunction

  task automatic run_and_check(string name);
    int cycles;
    longint acc;
    foreach (dcount[k]) dcount[k] = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 2 * LATENCY) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, cycles, LATENCY);
    end
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      acc = longint'(cmem[k]);
      for (int i = 0; i < N; i++) begin
        int j;
        longint p;
        j = (k - i + N) % N;
        p = longint'(amem[i]) * longint'(sval(bmem[j]));
        if (i + j >= N) p = -p;
        if (p < 0) neg_products++;
        acc += p;
      end
      acc = acc % longint'(Q);
      if (acc < 0) acc += longint'(Q);
      checks++;
      if (longint'(dmem[k]) != acc || dcount[k] != 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s: d[%0d]=%0d expected %0d (written %0d times)",
                   name, k, dmem[k], acc, dcount[k]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int k = 0; k < N; k++) begin
      amem[k] = coef_t'($urandom_range(int'(Q) - 1));
      bmem[k] = small_t'($urandom_range(63));
      cmem[k] = coef_t'($urandom_range(int'(Q) - 1));
    end
    run_and_check("random");

    for (int k = 0; k < N; k++) begin
      amem[k] = coef_t'(int'(Q) - 1);
      bmem[k] = 6'b111111;
      cmem[k] = coef_t'(int'(Q) - 1);
    end
    run_and_check("extreme");

    for (int k = 0; k < N; k++) begin
      amem[k] = coef_t'($urandom_range(int'(Q) - 1));
      bmem[k] = (k == 0 || $urandom_range(1) != 0) ? 6'b100000 : 6'b000000;
      cmem[k] = coef_t'($urandom_range(int'(Q) - 1));
    end
    run_and_check("zero b");

    for (int k = 0; k < N; k++) begin
      amem[k] = coef_t'($urandom_range(int'(Q) - 1));
      bmem[k] = (k == 1) ? 6'd1 : 6'd0;
      cmem[k] = '0;
    end
    run_and_check("times x");

    checks++;
    if (neg_products == 0) begin
      failures++;
      $display("FAIL no negated product exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
