// rlwe_ctrl: control address unit of the R-LWE encryption/decryption
// datapath (rlwe_top).
//
// Encryption (start_enc) runs three phases:
//   SAMPLE  3n cycles with the CDT sampler enabled; sample k goes to RAM1
//           (e1) for k < n and to RAM2 (e2 at 0..n-1, e3 at n..2n-1)
//           otherwise. smp_we/smp_idx trail smp_en by the sampler's one
//           cycle of latency.
//   ENC1    the encryption SPMA computes c1 = a*e1 + e2 (enc_pass = 0).
//   ENC2    the same SPMA computes p*e1 + e3, to which the encoded message
//           is added on the way into RAM3, giving c2 (enc_pass = 1).
// Decryption (start_dec) runs two phases:
//   DEC     the decryption SPMA computes c1*r2 + c2 into RAM4
//           (dec_phase = 1 while it runs, giving it RAM3's read ports).
//   DECODE  n cycles reading RAM4, one coefficient per cycle; dcd_we and
//           dcd_idx trail dcd_re by the RAM's one cycle of read latency.
// enc_done / dec_done pulse once at the end; busy is high from the start
// command to that pulse. A start command while busy is ignored.
//
// Follows the published design: the order of operations of the R-LWE scheme and
// the single encryption SPMA reused for both ciphertext polynomials, as the
// block diagram draws them. The state encoding and the one-operation-at-a-
// time policy are this design's choices.
module rlwe_ctrl #(
  parameter int unsigned N = rlwe_pkg::N_POLY
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start_enc,
  input  logic                   start_dec,
  output logic                   busy,
  output logic                   enc_done,
  output logic                   dec_done,
  // CDT sampler and its write demultiplexer
  output logic                   smp_en,
  output logic                   smp_we,
  output logic [$clog2(3*N)-1:0] smp_idx,
  // encryption SPMA
  output logic                   enc_spma_start,
  input  logic                   enc_spma_done,
  output logic                   enc_pass,
  // decryption SPMA
  output logic                   dec_spma_start,
  input  logic                   dec_spma_done,
  output logic                   dec_phase,
  // decoding
  output logic                   dcd_re,
  output logic [$clog2(N)-1:0]   dcd_addr,
  output logic                   dcd_we,
  output logic [$clog2(N)-1:0]   dcd_idx
);

  localparam int unsigned LN = $clog2(N);
  localparam int unsigned LS = $clog2(3*N);

  typedef enum logic [3:0] {
    S_IDLE, S_SAMPLE, S_ENC1_GO, S_ENC1, S_ENC2_GO, S_ENC2,
    S_DEC_GO, S_DEC, S_DECODE, S_DEC_END
  } state_t;

  state_t        state_q;
  logic [LS-1:0] cnt_q;
  logic          smp_we_q, dcd_we_q;
  logic [LS-1:0] smp_idx_q;
  logic [LN-1:0] dcd_idx_q;
  logic          enc_done_q, dec_done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cnt_q      <= '0;
      enc_done_q <= 1'b0;
      dec_done_q <= 1'b0;
    end else begin
      enc_done_q <= 1'b0;
      dec_done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          cnt_q <= '0;
          if (start_enc)      state_q <= S_SAMPLE;
          else if (start_dec) state_q <= S_DEC_GO;
        end
        S_SAMPLE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == LS'(3*N - 1)) state_q <= S_ENC1_GO;
        end
        S_ENC1_GO: state_q <= S_ENC1;
        S_ENC1:    if (enc_spma_done) state_q <= S_ENC2_GO;
        S_ENC2_GO: state_q <= S_ENC2;
        S_ENC2: begin
          if (enc_spma_done) begin
            state_q    <= S_IDLE;
            enc_done_q <= 1'b1;
          end
        end
        S_DEC_GO:  state_q <= S_DEC;
        S_DEC: begin
          cnt_q <= '0;
          if (dec_spma_done) state_q <= S_DECODE;
        end
        S_DECODE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == LS'(N - 1)) state_q <= S_DEC_END;
        end
        S_DEC_END: begin
          state_q    <= S_IDLE;
          dec_done_q <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Write strobes one cycle behind the read / sample request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_we_q  <= 1'b0;
      smp_idx_q <= '0;
      dcd_we_q  <= 1'b0;
      dcd_idx_q <= '0;
    end else begin
      smp_we_q  <= smp_en;
      smp_idx_q <= cnt_q;
      dcd_we_q  <= dcd_re;
      dcd_idx_q <= cnt_q[LN-1:0];
    end
  end

  always_comb begin
    busy           = (state_q != S_IDLE);
    enc_done       = enc_done_q;
    dec_done       = dec_done_q;
    smp_en         = (state_q == S_SAMPLE);
    smp_we         = smp_we_q;
    smp_idx        = smp_idx_q;
    enc_spma_start = (state_q == S_ENC1_GO) || (state_q == S_ENC2_GO);
    enc_pass       = (state_q == S_ENC2_GO) || (state_q == S_ENC2);
    dec_spma_start = (state_q == S_DEC_GO);
    dec_phase      = (state_q == S_DEC_GO) || (state_q == S_DEC);
    dcd_re         = (state_q == S_DECODE);
    dcd_addr       = cnt_q[LN-1:0];
    dcd_we         = dcd_we_q;
    dcd_idx        = dcd_idx_q;
  end

endmodule
