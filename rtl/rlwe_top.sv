// rlwe_top: compact R-LWE public-key encryption and decryption built
// around the optimized schoolbook polynomial multiply-accumulate (SPMA).
//
// Scheme (ring Z_q[x]/(x^n + 1), n = 256, q = 7681, Gaussian sigma = 4.51):
//   encryption  c1 = a*e1 + e2,  c2 = p*e1 + e3 + ENCODE(m)
//   decryption  m' = DECODE(c1*r2 + c2)
// (a, p) is the public key and r2 the secret key; e1, e2, e3 are fresh
// Gaussian noise polynomials.
//
// Structure. Encryption: a CDT sampler fills RAM1 with e1 and RAM2 with e2
// and e3 (6-bit sign/magnitude samples); one SPMA, run twice, multiplies
// the public-key polynomial (a, then p) by e1 and adds e2, then e3 (turned
// into Z_q on the way in); on the second run each result coefficient is
// added to its encoded message bit; a multiplexer sends c1 or c2 to RAM3.
// Decryption: a second SPMA reads c1 and c2 from RAM3 and the secret key
// from outside, writes c1*r2 + c2 to RAM4, and a decoder turns each
// coefficient of RAM4 into a bit of msg_out. rlwe_ctrl sequences it all.
//
// Interface:
//   start_enc / start_dec  one-cycle commands; busy until enc_done /
//                          dec_done pulses. One operation at a time.
//   rng                    32 random bits per clock while sampling
//   msg                    n message bits, held stable during encryption
//   msg_out                n decrypted bits, valid after dec_done
//   pk_*                   external public-key memory: coefficient pk_addr
//                          of a (pk_sel = 0) or p (pk_sel = 1), read data
//                          expected on pk_data the cycle after pk_rd_en
//   sk_*                   external secret-key memory with two read ports,
//                          6-bit sign/magnitude coefficients of r2, data the
//                          cycle after sk_rd_en
//   ct_*                   read port of RAM3 (c1 at 0..n-1, c2 at n..2n-1),
//                          data the cycle after ct_rd_en; usable while no
//                          decryption is running
// Timing (n = 256): encryption 3n + 1 + 2*(n*n/2 + 7) cycles from start_enc
// to enc_done, decryption n*n/2 + n + 9 cycles to dec_done.
//
// Follows the published design: the block diagram (sampler, RAM1..RAM4, the two
// SPMAs, encoder, adder, multiplexer, decoder, control address unit) and
// the scheme. The external key memories, the ciphertext read port and the
// exact sequencing are this design's choices.
module rlwe_top
  import rlwe_pkg::*;
#(
  parameter int unsigned N = rlwe_pkg::N_POLY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_enc,
  input  logic                 start_dec,
  output logic                 busy,
  output logic                 enc_done,
  output logic                 dec_done,
  input  logic [31:0]          rng,
  input  logic [N-1:0]         msg,
  output logic [N-1:0]         msg_out,
  output logic                 pk_rd_en,
  output logic                 pk_sel,
  output logic [$clog2(N)-1:0] pk_addr,
  input  coef_t                pk_data,
  output logic                 sk_rd_en,
  output logic [$clog2(N)-1:0] sk_addr1,
  output logic [$clog2(N)-1:0] sk_addr2,
  input  small_t               sk_data1,
  input  small_t               sk_data2,
  input  logic                 ct_rd_en,
  input  logic [$clog2(N):0]   ct_addr,
  output coef_t                ct_data
);

  localparam int unsigned LN = $clog2(N);
  localparam int unsigned LS = $clog2(3*N);

  // ------------------------------------------------------------ control
  logic          smp_en, smp_we, enc_spma_start, enc_spma_done, enc_pass;
  logic          dec_spma_start, dec_spma_done, dec_phase;
  logic          dcd_re, dcd_we;
  logic [LS-1:0] smp_idx;
  logic [LN-1:0] dcd_addr, dcd_idx;

  rlwe_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start_enc, .start_dec, .busy, .enc_done, .dec_done,
    .smp_en, .smp_we, .smp_idx,
    .enc_spma_start, .enc_spma_done, .enc_pass,
    .dec_spma_start, .dec_spma_done, .dec_phase,
    .dcd_re, .dcd_addr, .dcd_we, .dcd_idx
  );

  // ------------------------------------------------------------ sampling
  logic   smp_valid;
  small_t smp;

  cdt_sampler u_cdt (
    .clk, .rst_n, .en(smp_en), .rng, .valid(smp_valid), .sample(smp)
  );

  logic smp_to_ram1;
  assign smp_to_ram1 = (smp_idx < LS'(N));

  // ------------------------------------------------------------ encryption
  logic          e_rd_en, e_c_re, e_d_we;
  logic [LN-1:0] e_a_addr, e_b1_addr, e_b2_addr, e_c_addr, e_d_addr;
  small_t        e1_d1, e1_d2, e23_d;
  coef_t         e_c_data, e_d1, e_d2;

  // RAM1: e1, read through two ports by the SPMA
  poly_ram #(.DEPTH(N), .WIDTH(SW)) u_ram1 (
    .clk,
    .re0(e_rd_en), .raddr0(e_b1_addr), .rdata0(e1_d1),
    .re1(e_rd_en), .raddr1(e_b2_addr), .rdata1(e1_d2),
    .we0(smp_we && smp_valid && smp_to_ram1), .waddr0(LN'(smp_idx)), .wdata0(smp),
    .we1(1'b0), .waddr1('0), .wdata1('0)
  );

  // RAM2: e2 at 0..n-1, e3 at n..2n-1
  logic [LS-1:0] ram2_widx;
  assign ram2_widx = smp_idx - LS'(N);

  poly_ram #(.DEPTH(2*N), .WIDTH(SW)) u_ram2 (
    .clk,
    .re0(e_c_re), .raddr0({enc_pass, e_c_addr}), .rdata0(e23_d),
    .re1(1'b0), .raddr1('0), .rdata1(),
    .we0(smp_we && smp_valid && !smp_to_ram1), .waddr0((LN+1)'(ram2_widx)), .wdata0(smp),
    .we1(1'b0), .waddr1('0), .wdata1('0)
  );

  assign e_c_data = small_to_coef(e23_d);

  spma #(.N(N)) u_spma_enc (
    .clk, .rst_n, .start(enc_spma_start), .busy(), .done(enc_spma_done),
    .rd_en(e_rd_en), .a_addr(e_a_addr), .a_data(pk_data),
    .b1_addr(e_b1_addr), .b2_addr(e_b2_addr), .b1_data(e1_d1), .b2_data(e1_d2),
    .c_re(e_c_re), .c_addr(e_c_addr), .c_data(e_c_data),
    .d_we(e_d_we), .d_addr(e_d_addr), .d1(e_d1), .d2(e_d2)
  );

  assign pk_rd_en = e_rd_en;
  assign pk_sel   = enc_pass;
  assign pk_addr  = e_a_addr;

  // Encoded message added on the second pass (c2), bypassed on the first.
  logic [LN-1:0] e_d_addr2;
  coef_t         m_enc1, m_enc2, c2_1, c2_2, ct_w1, ct_w2;

  assign e_d_addr2 = e_d_addr | LN'(1);

  rlwe_encode u_enc1 (.bit_in(msg[e_d_addr]),  .coef(m_enc1));
  rlwe_encode u_enc2 (.bit_in(msg[e_d_addr2]), .coef(m_enc2));
  poly_add    u_add1 (.x(e_d1), .y(m_enc1), .s(c2_1));
  poly_add    u_add2 (.x(e_d2), .y(m_enc2), .s(c2_2));

  assign ct_w1 = enc_pass ? c2_1 : e_d1;
  assign ct_w2 = enc_pass ? c2_2 : e_d2;

  // ------------------------------------------------------------ RAM3: c1/c2
  logic          d_rd_en, d_c_re, d_d_we;
  logic [LN-1:0] d_a_addr, d_b1_addr, d_b2_addr, d_c_addr, d_d_addr;
  coef_t         r3_d0, r3_d1, d_d1, d_d2;

  poly_ram #(.DEPTH(2*N), .WIDTH(QW)) u_ram3 (
    .clk,
    .re0   (dec_phase ? d_rd_en : ct_rd_en),
    .raddr0(dec_phase ? {1'b0, d_a_addr} : ct_addr),
    .rdata0(r3_d0),
    .re1   (d_c_re),
    .raddr1({1'b1, d_c_addr}),
    .rdata1(r3_d1),
    .we0(e_d_we), .waddr0({enc_pass, e_d_addr}),  .wdata0(ct_w1),
    .we1(e_d_we), .waddr1({enc_pass, e_d_addr2}), .wdata1(ct_w2)
  );

  assign ct_data = r3_d0;

  // ------------------------------------------------------------ decryption
  spma #(.N(N)) u_spma_dec (
    .clk, .rst_n, .start(dec_spma_start), .busy(), .done(dec_spma_done),
    .rd_en(d_rd_en), .a_addr(d_a_addr), .a_data(r3_d0),
    .b1_addr(d_b1_addr), .b2_addr(d_b2_addr), .b1_data(sk_data1), .b2_data(sk_data2),
    .c_re(d_c_re), .c_addr(d_c_addr), .c_data(r3_d1),
    .d_we(d_d_we), .d_addr(d_d_addr), .d1(d_d1), .d2(d_d2)
  );

  assign sk_rd_en = d_rd_en;
  assign sk_addr1 = d_b1_addr;
  assign sk_addr2 = d_b2_addr;

  // RAM4: c = c1*r2 + c2
  coef_t r4_d;

  poly_ram #(.DEPTH(N), .WIDTH(QW)) u_ram4 (
    .clk,
    .re0(dcd_re), .raddr0(dcd_addr), .rdata0(r4_d),
    .re1(1'b0), .raddr1('0), .rdata1(),
    .we0(d_d_we), .waddr0(d_d_addr),            .wdata0(d_d1),
    .we1(d_d_we), .waddr1(d_d_addr | LN'(1)),   .wdata1(d_d2)
  );

  logic dcd_bit;

  rlwe_decode u_dec (.coef(r4_d), .bit_out(dcd_bit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      msg_out <= '0;
    else if (dcd_we) msg_out[dcd_idx] <= dcd_bit;
  end

endmodule
