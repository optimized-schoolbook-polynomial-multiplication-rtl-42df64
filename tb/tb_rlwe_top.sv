// tb_rlwe_top: end-to-end R-LWE encryption and decryption at the full size
// (n = 256, q = 7681), with the top's parameters at their defaults.
//
// The testbench makes its own key pair: a uniform, r1 and r2 Gaussian
// (drawn with a CDT computed here from exp()), p = r1 - a*r2. It feeds a
// fresh random word on rng every cycle and, knowing that sample k is drawn
// from the k-th word after start_enc, recomputes e1, e2 and e3 with its
// own table. After encryption it reads RAM3 through the ciphertext port and
// compares c1 = a*e1 + e2 and c2 = p*e1 + e3 + ENCODE(m) with negacyclic
// products evaluated here; after decryption it compares msg_out with m.
// Two rounds run with different messages and noise. Cycle counts of both
// operations are checked, and the mechanisms of the design are counted:
// negative noise samples (the sign bit path), a negative zero drawn by the
// sampler, wrapped (x^n = -1) products, observed on the public-key
// address sequence, the two encryption passes, and
// decoded 0 and 1 bits; each must occur.
module tb_rlwe_top;
  import rlwe_pkg::*;
  localparam int N = 256;
  localparam int LN = 8;
  localparam int ENC_CYCLES = 3 * N + 1 + 2 * (N * N / 2 + 7);
  localparam int DEC_CYCLES = N * N / 2 + N + 9;

  logic clk = 0, rst_n = 0, start_enc = 0, start_dec = 0;
  logic busy, enc_done, dec_done;
  logic [31:0] rng = '0;
  logic [N-1:0] msg = '0, msg_out;
  logic pk_rd_en, pk_sel, sk_rd_en, ct_rd_en = 0;
  logic [LN-1:0] pk_addr, sk_addr1, sk_addr2;
  logic [LN:0] ct_addr = '0;
  coef_t pk_data, ct_data;
  small_t sk_data1, sk_data2;

  rlwe_top dut (.*);

  always #5 clk = ~clk;

  // key memories
  int a_poly [N], p_poly [N], r1 [N], r2 [N];
  int e1 [N], e2 [N], e3 [N];
  longint cdt [31];

  function automatic small_t to_small(int v);
    return (v < 0) ? {1'b1, 5'(-v)} : {1'b0, 5'(v)};
  endfunction

  always_ff @(posedge clk) begin
    if (pk_rd_en) pk_data <= coef_t'(pk_sel ? p_poly[pk_addr] : a_poly[pk_addr]);
    if (sk_rd_en) begin
      sk_data1 <= to_small(r2[sk_addr1]);
      sk_data2 <= to_small(r2[sk_addr2]);
    end
  end

  int checks = 0, failures = 0;
  int cnt_neg_samples = 0, cnt_neg_zero = 0, cnt_wraps = 0;
  int cnt_pass = 0, cnt_bit0 = 0, cnt_bit1 = 0;

  // Issue t of an encryption pass is pair (i, j) = (2*(t / n), t % n);
  // the public-key address must be j, and the b index i - j wraps when j > i.
  int issue_t = 0, addr_errors = 0;
  always_ff @(posedge clk) begin
    if (start_enc) issue_t <= 0;
    if (pk_rd_en) begin
      if (int'(pk_addr) != issue_t % N) addr_errors++;
      if (issue_t % N > 2 * ((issue_t / N) % (N / 2))) cnt_wraps++;
      issue_t <= (issue_t + 1) % (N * N / 2);
    end
  end

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d want %0d", what, got, want);
    end
  endtask

  function automatic int modq(longint v);
    v = v % longint'(Q);
    if (v < 0) v += longint'(Q);
    return int'(v);
  endfunction

  // signed value of a sample drawn from a 32-bit word, per the CDT method
  function automatic int sample_of(logic [31:0] w);
    int m = 31;
    for (int k = 0; k < 31; k++)
      if (longint'(w[30:0]) < cdt[k]) begin m = k; break; end
    return w[31] ? -m : m;
  endfunction

  // negacyclic product x*y (y small), result coefficient k
  function automatic longint nprod(const ref int x [N], const ref int y [N], int k);
    longint acc = 0;
    for (int i = 0; i < N; i++) begin
      int j = (k - i + N) % N;
      if (i + j >= N) acc -= longint'(x[i]) * y[j];
      else            acc += longint'(x[i]) * y[j];
    end
    return acc;
  endfunction

  task automatic one_round(int round);
    int cycles;
    logic [31:0] w;
    int c1 [N], c2 [N];
    for (int k = 0; k < N; k++) msg[k] = $urandom_range(1);
    // ---------------- encryption
    @(negedge clk);
    start_enc = 1;
    @(negedge clk);
    start_enc = 0;
    cycles = 1;
    for (int k = 0; k < 3 * N; k++) begin
      w = $urandom;
      if (round == 0 && k == 5) w = 32'h8000_0000;   // "-0": magnitude 0, sign 1
      rng = w;
      if (w[31] && sample_of(w) == 0) cnt_neg_zero++;
      if (sample_of(w) < 0) cnt_neg_samples++;
      if (k < N)          e1[k] = sample_of(w);
      else if (k < 2 * N) e2[k - N] = sample_of(w);
      else                e3[k - 2 * N] = sample_of(w);
      @(negedge clk);
      cycles++;
    end
    while (!enc_done && cycles < 2 * ENC_CYCLES) begin
      rng = $urandom;
      @(negedge clk);
      cycles++;
    end
    expect_eq("encryption cycles", cycles, ENC_CYCLES);

    // ---------------- ciphertext against the reference
    for (int k = 0; k < N; k++) begin
      c1[k] = modq(nprod(a_poly, e1, k) + e2[k]);
      c2[k] = modq(nprod(p_poly, e1, k) + e3[k] + (msg[k] ? int'(Q / 2) : 0));
    end
    for (int k = 0; k < 2 * N; k++) begin
      ct_rd_en = 1; ct_addr = (LN+1)'(k);
      @(negedge clk);
      ct_rd_en = 0;
      expect_eq(k < N ? "c1" : "c2", ct_data, k < N ? c1[k] : c2[k - N]);
    end
    cnt_pass += 2;

    // ---------------- decryption
    start_dec = 1;
    @(negedge clk);
    start_dec = 0;
    cycles = 1;
    while (!dec_done && cycles < 2 * DEC_CYCLES) begin
      @(negedge clk);
      cycles++;
    end
    expect_eq("decryption cycles", cycles, DEC_CYCLES);
    for (int k = 0; k < N; k++) begin
      expect_eq("decrypted bit", msg_out[k], msg[k]);
      if (msg_out[k]) cnt_bit1++; else cnt_bit0++;
    end
  endtask

  initial begin
    real rho [32];
    real total, cum;
    total = 0.0;
    for (int x = 0; x < 32; x++) begin
      rho[x] = $exp(-real'(x * x) / (2.0 * 4.51 * 4.51));
      total += (x == 0) ? rho[x] : 2.0 * rho[x];
    end
    cum = 0.0;
    for (int k = 0; k < 31; k++) begin
      cum += (k == 0) ? rho[k] : 2.0 * rho[k];
      cdt[k] = longint'($floor(2.0 ** 31 * cum / total + 0.5));
    end

    // key pair: p = r1 - a*r2
    for (int k = 0; k < N; k++) begin
      a_poly[k] = $urandom_range(int'(Q) - 1);
      r1[k] = sample_of($urandom);
      r2[k] = sample_of($urandom);
    end
    for (int k = 0; k < N; k++) p_poly[k] = modq(r1[k] - nprod(a_poly, r2, k));

    repeat (3) @(negedge clk);
    rst_n = 1;
    one_round(0);
    one_round(1);

    expect_eq("negative samples seen", cnt_neg_samples > 0, 1);
    expect_eq("negative zero seen", cnt_neg_zero > 0, 1);
    expect_eq("wrapped products", cnt_wraps > 0, 1);
    expect_eq("public-key address errors", addr_errors, 0);
    expect_eq("encryption passes", cnt_pass, 4);
    expect_eq("decoded ones", cnt_bit1 > 0, 1);
    expect_eq("decoded zeros", cnt_bit0 > 0, 1);
    $display("mechanisms: negative samples %0d, negative zero %0d, wrapped products issued %0d, passes %0d, bits 0/1 %0d/%0d",
             cnt_neg_samples, cnt_neg_zero, cnt_wraps, cnt_pass, cnt_bit0, cnt_bit1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 2 * (ENC_CYCLES + DEC_CYCLES) + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
