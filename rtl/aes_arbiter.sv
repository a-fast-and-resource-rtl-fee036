// aes_arbiter: shares the single AES unit between the sharing path and the reconstruction
// path, one whole packet at a time, and issues that packet's blocks into the AES unit.
//
// Sharing request: the secret-in buffer holds a complete packet and the SGU buffer has room
// for it plus its key block, counting blocks still inside the AES pipeline. On grant the
// first cycle issues the key block (bypass); if the packet header asks for a new key, the
// key is taken from new_key (new_key_rd pops it) and loaded into the sharing key register.
// Then one plaintext block is issued per cycle until the packet's last block.
// Reconstruction request: the SRU buffer holds a complete packet (a reconstructed key block
// followed by the encrypted payload) and the secret-out buffer has room for the payload. On
// grant the first cycle pops the key block into the reconstruction key register; then one
// block per cycle is decrypted.
// When both request, the side that was not served last wins (round robin). The AES pipeline
// cannot stall, which is why room is checked for the whole packet before it starts.
// The arbiter is named, not detailed, in the reference design; this behaviour is this
// design's simplest one that meets the stated rule: a packet is passed to the AES when it is
// complete in its buffer and the AES is not busy.
module aes_arbiter
  import css_pkg::*;
#(
  parameter int unsigned PKT_BLOCKS = 64,
  parameter int unsigned FW         = 8    // width of the buffer fill/free counts
) (
  input  logic          clk,
  input  logic          rst_n,
  // sharing side: secret-in buffer head, SGU buffer room
  input  logic [FW-1:0] secin_pkts,
  input  logic          secin_valid,
  input  logic [127:0]  secin_data,
  input  logic          secin_last,
  input  css_hdr_t      secin_hdr,
  output logic          secin_rd,
  input  logic [FW-1:0] sgubuf_free,
  input  logic [127:0]  new_key,
  output logic          new_key_rd,
  // reconstruction side: SRU buffer head, secret-out buffer room
  input  logic [FW-1:0] srubuf_pkts,
  input  logic          srubuf_valid,
  input  logic [127:0]  srubuf_data,
  input  logic          srubuf_last,
  input  css_hdr_t      srubuf_hdr,
  output logic          srubuf_rd,
  input  logic [FW-1:0] secout_free,
  // AES unit issue port
  output logic          aes_side,
  output logic          aes_start,
  output logic          aes_ld_key,
  output logic [127:0]  aes_key,
  output logic          aes_valid,
  output logic          aes_bypass,
  output logic          aes_last,
  output css_hdr_t      aes_hdr,
  output logic [127:0]  aes_data,
  // AES unit output, for the in-flight counts
  input  logic          aes_out_valid,
  input  logic          aes_out_side,
  output logic          busy
);
  typedef enum logic [2:0] {S_IDLE, S_ENC_KEY, S_ENC, S_DEC_KEY, S_DEC} state_e;

  state_e        state, state_n;
  logic          last_dec;      // the last granted packet was a reconstruction packet
  logic [7:0]    inflight_enc, inflight_dec;
  logic          req_enc, req_dec, grant_enc, grant_dec;

  assign req_enc = (secin_pkts != '0) &&
                   (32'(sgubuf_free) >= PKT_BLOCKS + 1 + 32'(inflight_enc));
  assign req_dec = (srubuf_pkts != '0) &&
                   (32'(secout_free) >= PKT_BLOCKS + 32'(inflight_dec));
  assign grant_enc = (state == S_IDLE) && req_enc && (!req_dec || last_dec);
  assign grant_dec = (state == S_IDLE) && req_dec && !grant_enc;
  assign busy      = (state != S_IDLE);

  always_comb begin
    state_n    = state;
    secin_rd   = 1'b0;
    srubuf_rd  = 1'b0;
    new_key_rd = 1'b0;
    aes_side   = 1'b0;
    aes_start  = 1'b0;
    aes_ld_key = 1'b0;
    aes_key    = new_key;
    aes_valid  = 1'b0;
    aes_bypass = 1'b0;
    aes_last   = 1'b0;
    aes_hdr    = secin_hdr;
    aes_data   = secin_data;
    case (state)
      S_IDLE: begin
        if (grant_enc)      state_n = S_ENC_KEY;
        else if (grant_dec) state_n = S_DEC_KEY;
      end
      S_ENC_KEY: begin
        aes_start  = 1'b1;
        aes_ld_key = secin_hdr.new_key;
        new_key_rd = secin_hdr.new_key;
        aes_valid  = 1'b1;
        aes_bypass = 1'b1;
        state_n    = S_ENC;
      end
      S_ENC: begin
        secin_rd  = secin_valid;
        aes_valid = secin_valid;
        aes_last  = secin_last;
        if (secin_valid && secin_last) state_n = S_IDLE;
      end
      S_DEC_KEY: begin
        aes_side   = 1'b1;
        aes_start  = 1'b1;
        aes_ld_key = srubuf_valid;
        aes_key    = srubuf_data;
        aes_hdr    = srubuf_hdr;
        srubuf_rd  = srubuf_valid;
        if (srubuf_valid) state_n = S_DEC;
      end
      S_DEC: begin
        aes_side  = 1'b1;
        aes_hdr   = srubuf_hdr;
        aes_data  = srubuf_data;
        srubuf_rd = srubuf_valid;
        aes_valid = srubuf_valid;
        aes_last  = srubuf_last;
        if (srubuf_valid && srubuf_last) state_n = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      last_dec     <= 1'b0;
      inflight_enc <= '0;
      inflight_dec <= '0;
    end else begin
      state <= state_n;
      if (grant_enc) last_dec <= 1'b0;
      if (grant_dec) last_dec <= 1'b1;
      inflight_enc <= inflight_enc + 8'(aes_valid && !aes_side)
                                   - 8'(aes_out_valid && !aes_out_side);
      inflight_dec <= inflight_dec + 8'(aes_valid && aes_side)
                                   - 8'(aes_out_valid && aes_out_side);
    end
  end

  // A reconstruction packet starts with its key block, so that block is never the last one.
  always_ff @(posedge clk) begin
    if (state == S_DEC_KEY && srubuf_valid)
      assert (!srubuf_last) else $error("aes_arbiter: reconstruction packet without payload");
  end
endmodule
