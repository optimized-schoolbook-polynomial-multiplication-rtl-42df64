// tb_rlwe_ctrl: the R-LWE sequencer with the two SPMAs replaced by
// counters that raise done a fixed number of cycles after start. Checks the
// 3n sampling cycles and their write indices, the two encryption passes
// (enc_pass 0 then 1), the decryption pass with dec_phase, the n decode
// reads and their write indices, the done pulses and the ignored start
// commands while busy.
module tb_rlwe_ctrl;
  localparam int N = 256;
  localparam int LN = 8;
  localparam int LS = 10;
  localparam int SPMA_CYC = 37;

  logic clk = 0, rst_n = 0, start_enc = 0, start_dec = 0;
  logic busy, enc_done, dec_done, smp_en, smp_we, enc_spma_start, enc_spma_done;
  logic enc_pass, dec_spma_start, dec_spma_done, dec_phase, dcd_re, dcd_we;
  logic [LS-1:0] smp_idx;
  logic [LN-1:0] dcd_addr, dcd_idx;
  int checks = 0, failures = 0;
  int enc_cnt = -1, dec_cnt = -1;
  int enc_starts = 0, dec_starts = 0;

  rlwe_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // SPMA stand-ins: done SPMA_CYC cycles after start
  always_ff @(posedge clk) begin
    enc_spma_done <= 1'b0;
    dec_spma_done <= 1'b0;
    if (enc_spma_start && rst_n) begin enc_cnt <= SPMA_CYC; enc_starts++; end
    else if (enc_cnt > 0) enc_cnt <= enc_cnt - 1;
    if (enc_cnt == 1) enc_spma_done <= 1'b1;
    if (dec_spma_start && rst_n) begin dec_cnt <= SPMA_CYC; dec_starts++; end
    else if (dec_cnt > 0) dec_cnt <= dec_cnt - 1;
    if (dec_cnt == 1) dec_spma_done <= 1'b1;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    int smp_en_cycles, we_seen, passes, cycles, dcd_seen, phase_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enc_spma_done = 0; dec_spma_done = 0;

    // ---------------- encryption
    @(negedge clk);
    start_enc = 1;
    @(negedge clk);
    start_enc = 0;
    smp_en_cycles = 0; we_seen = 0; passes = 0; cycles = 1;
    while (!enc_done && cycles < 5000) begin
      if (smp_en) smp_en_cycles++;
      if (smp_we) begin
        expect_eq("smp_idx", smp_idx, we_seen);
        we_seen++;
      end
      if (enc_spma_start) begin
        expect_eq("enc_pass at start", enc_pass, passes);
        passes++;
      end
      if (cycles == 100) begin
        start_dec = 1;       // must be ignored while busy
        start_enc = 1;
      end else begin
        start_dec = 0;
        start_enc = 0;
      end
      expect_eq("busy", busy, 1);
      expect_eq("no dec start", dec_spma_start, 0);
      @(negedge clk);
      cycles++;
    end
    expect_eq("sampling cycles", smp_en_cycles, 3 * N);
    expect_eq("sample writes", we_seen, 3 * N);
    expect_eq("encryption passes", passes, 2);
    expect_eq("enc cycles", cycles, 3 * N + 2 * (SPMA_CYC + 2) + 1);
    @(negedge clk);
    expect_eq("idle after enc", busy, 0);
    expect_eq("enc_done one cycle", enc_done, 0);

    // ---------------- decryption
    start_dec = 1;
    @(negedge clk);
    start_dec = 0;
    dcd_seen = 0; passes = 0; cycles = 1; phase_cycles = 0;
    while (!dec_done && cycles < 5000) begin
      if (dec_spma_start) passes++;
      if (dec_phase) phase_cycles++;
      expect_eq("no enc start", enc_spma_start, 0);
      expect_eq("no sampling", smp_en, 0);
      if (dcd_re) expect_eq("dcd_addr", dcd_addr, dcd_seen);
      if (dcd_re) expect_eq("dcd_re after spma", dec_phase, 0);
      if (dcd_we) expect_eq("dcd_idx", dcd_idx, dcd_seen - 1);
      if (dcd_re) dcd_seen++;
      @(negedge clk);
      cycles++;
    end
    expect_eq("decryption passes", passes, 1);
    expect_eq("decode reads", dcd_seen, N);
    expect_eq("dec_phase cycles", phase_cycles, SPMA_CYC + 2);
    expect_eq("dec cycles", cycles, SPMA_CYC + 2 + N + 2);
    expect_eq("spma starts", enc_starts + dec_starts, 3);
    @(negedge clk);
    expect_eq("idle after dec", busy, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
