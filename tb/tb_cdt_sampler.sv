// tb_cdt_sampler: the CDT sampler against a table computed here from the
// Gaussian itself, rho(x) = exp(-x^2 / (2 * 4.51^2)) over [-31, 31]:
// CDT[k] = round(2^31 * (rho(0) + 2 sum_{1..k} rho) / S). For random words
// and for the words just below and at every table boundary, the expected
// magnitude is the first k with r < CDT[k]; the sign is rng bit 31 except
// for zero. valid must follow en by one cycle. Also checks that the
// empirical standard deviation of 20000 samples is close to 4.51.
module tb_cdt_sampler;
  import rlwe_pkg::*;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] rng = '0;
  logic        valid;
  small_t      sample;
  longint      cdt [31];
  int          checks = 0, failures = 0;
  real         sumsq = 0.0;
  int          nsamp = 0;

  cdt_sampler dut (.clk, .rst_n, .en, .rng, .valid, .sample);

  always #5 clk = ~clk;

  function automatic int ref_mag(longint r);
    for (int k = 0; k < 31; k++)
      if (r < cdt[k]) return k;
    return 31;
  endfunction

  task automatic draw(logic [31:0] word);
    int m;
    logic s;
    @(negedge clk);
    en = 1; rng = word;
    @(negedge clk);
    en = 0;
    m = ref_mag(longint'(word[30:0]));
    s = word[31] && (m != 0);
    checks++;
    if (!valid || sample != {s, 5'(m)}) begin
      failures++;
      if (failures < 10)
        $display("FAIL rng=%08h sample=%b expected %b valid=%0d", word, sample, {s, 5'(m)}, valid);
    end
    sumsq += real'(m * m);
    nsamp++;
  endtask

  initial begin
    real rho [32];
    real total, cum;
    real sigma;
    sigma = 4.51;
    total = 0.0;
    for (int x = 0; x < 32; x++) begin
      rho[x] = $exp(-real'(x * x) / (2.0 * sigma * sigma));
      total += (x == 0) ? rho[x] : 2.0 * rho[x];
    end
    cum = 0.0;
    for (int k = 0; k < 31; k++) begin
      cum += (k == 0) ? rho[k] : 2.0 * rho[k];
      cdt[k] = longint'($floor(2.0 ** 31 * cum / total + 0.5));
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (valid) begin
      failures++;
      $display("FAIL valid without en");
    end
    for (int k = 0; k < 31; k++) begin
      if (cdt[k] < 64'h8000_0000) begin
        draw({1'b0, 31'(cdt[k] - 1)});
        draw({1'b1, 31'(cdt[k])});
      end
    end
    draw(32'h7fff_ffff);
    draw(32'hffff_ffff);
    draw(32'h8000_0000);
    sumsq = 0.0;
    nsamp = 0;
    for (int k = 0; k < 20000; k++) draw($urandom);
    checks++;
    if ($sqrt(sumsq / nsamp) < 4.3 || $sqrt(sumsq / nsamp) > 4.7) begin
      failures++;
      $display("FAIL empirical sigma %f", $sqrt(sumsq / nsamp));
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
