// css_core: computational secret sharing (CSS) core for dispersed storage.
//
// Sharing path: a packet of PKT_BLOCKS 128-bit plaintext blocks enters the secret-in buffer.
// When it is complete, the AES arbiter passes it through the shared AES unit in counter mode
// (taking a fresh key first if the header asks for one); the key block and the encrypted
// blocks go to the SGU buffer. From there the SGU first shares the key with Shamir's scheme
// (each W-bit key word gets its own polynomial with K-1 random coefficients) and then
// disperses the payload (each K payload words form one polynomial). The N shares of each
// polynomial go to N share-out buffers, one share packet per buffer:
//   share packet = KEY_WORDS key-share words, then PAY_WORDS/K payload-share words,
// all of W bits, with the packet header beside every word.
// Reconstruction path: K share packets of the same packet (any K of the N, in the order the
// host loaded the columns of X^-1) enter the K share-in buffers. The SRU recovers the key
// words (Shamir mode) and the encrypted payload (dispersal mode) into the SRU buffer; the
// arbiter then decrypts the payload with the recovered key into the secret-out buffer.
// External parts: random words (rand/rand_rd) and fresh keys (new_key/new_key_rd) come from
// a random number generator outside the core; the x-values of the N shares and the inverted
// Vandermonde matrix of the K share-in streams come from the host processor.
// All streams use valid/ready with a last flag and a css_hdr_t header. Block diagram,
// buffer roles, one shared AES, CTR mode and the packet-level sequencing follow the
// reference architecture; buffer sizes, the packet size and the share packet layout are
// this design's choices (see the parameter comments).
module css_core
  import css_pkg::*;
#(
  parameter int unsigned W          = 64,  // word width of SGU and SRU (8, 16, 32, 64, 128)
  parameter int unsigned N          = 8,   // number of shares
  parameter int unsigned K          = 4,   // threshold
  parameter int unsigned XW         = 8,   // width of the x-values
  parameter int unsigned PKT_BLOCKS = 64,  // payload of a packet in 128-bit blocks (assumed)
  parameter int unsigned BUF_PKTS   = 2,   // packets each buffer can hold (assumed)
  parameter int unsigned CTR_W      = 32,  // AES-CTR block counter width
  parameter int unsigned BASE_W     = 16,  // Karatsuba recursion stops at this width
  parameter int unsigned DSP_SLICES = K    // SRU slices using DSP-based multipliers
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // secret in
  input  logic                  secin_valid,
  output logic                  secin_ready,
  input  logic [127:0]          secin_data,
  input  logic                  secin_last,
  input  css_hdr_t              secin_hdr,
  // secret out
  output logic                  secout_valid,
  input  logic                  secout_ready,
  output logic [127:0]          secout_data,
  output logic                  secout_last,
  output css_hdr_t              secout_hdr,
  // random number source
  input  logic [W-1:0]          rand_word,
  output logic                  rand_rd,
  input  logic [127:0]          new_key,
  output logic                  new_key_rd,
  // host configuration
  input  logic [N-1:0][XW-1:0]  x,
  input  logic                  mat_we,
  input  logic [$clog2(K)-1:0]  mat_col,
  input  logic [$clog2(K)-1:0]  mat_row,
  input  logic [W-1:0]          mat_data,
  // share out, one stream per share
  output logic [N-1:0]          shout_valid,
  input  logic [N-1:0]          shout_ready,
  output logic [N-1:0][W-1:0]   shout_data,
  output logic [N-1:0]          shout_last,
  output css_hdr_t [N-1:0]      shout_hdr,
  // share in, one stream per used share
  input  logic [K-1:0]          shin_valid,
  output logic [K-1:0]          shin_ready,
  input  logic [K-1:0][W-1:0]   shin_data,
  input  logic [K-1:0]          shin_last,
  input  css_hdr_t [K-1:0]      shin_hdr
);
  localparam int unsigned KEY_WORDS   = 128 / W;
  localparam int unsigned PAY_WORDS   = PKT_BLOCKS * 128 / W;
  localparam int unsigned SH_WORDS    = KEY_WORDS + PAY_WORDS / K;
  localparam int unsigned TOTAL_WORDS = KEY_WORDS + PAY_WORDS;
  localparam int unsigned BLK_DEPTH   = 1 << $clog2(BUF_PKTS * PKT_BLOCKS);
  localparam int unsigned KBLK_DEPTH  = 1 << $clog2(BUF_PKTS * (PKT_BLOCKS + 1));
  localparam int unsigned SH_DEPTH    = 1 << $clog2(BUF_PKTS * SH_WORDS);
  localparam int unsigned FW          = 16;
  localparam int unsigned CW          = 16;

  // ------------------------------------------------------------------ buffers
  logic [$clog2(BLK_DEPTH):0]  secin_cnt, secin_free, secin_pkts;
  logic [$clog2(BLK_DEPTH):0]  secout_cnt, secout_free, secout_pkts;
  logic [$clog2(KBLK_DEPTH):0] sgub_cnt, sgub_free, sgub_pkts;
  logic [$clog2(KBLK_DEPTH):0] srub_cnt, srub_free, srub_pkts;

  logic         secin_hv, secin_rd, secin_hlast;
  logic [127:0] secin_hdata;
  css_hdr_t     secin_hhdr;

  pkt_fifo #(.DW(128), .DEPTH(BLK_DEPTH)) u_secin_buf (
    .clk, .rst_n,
    .in_valid(secin_valid), .in_ready(secin_ready), .in_data(secin_data),
    .in_last(secin_last), .in_hdr(secin_hdr),
    .out_valid(secin_hv), .out_ready(secin_rd), .out_data(secin_hdata),
    .out_last(secin_hlast), .out_hdr(secin_hhdr),
    .count(secin_cnt), .free(secin_free), .pkt_count(secin_pkts)
  );

  // AES unit output
  logic         aes_ov, aes_oside, aes_obypass, aes_olast;
  css_hdr_t     aes_ohdr;
  logic [127:0] aes_odata;

  logic         sgub_wr;
  logic         sgub_hv, sgub_rd, sgub_hlast;
  logic [127:0] sgub_hdata;
  css_hdr_t     sgub_hhdr;
  logic         sgub_ready_unused;

  assign sgub_wr = aes_ov && !aes_oside;

  pkt_fifo #(.DW(128), .DEPTH(KBLK_DEPTH)) u_sgu_buf (
    .clk, .rst_n,
    .in_valid(sgub_wr), .in_ready(sgub_ready_unused), .in_data(aes_odata),
    .in_last(aes_olast), .in_hdr(aes_ohdr),
    .out_valid(sgub_hv), .out_ready(sgub_rd), .out_data(sgub_hdata),
    .out_last(sgub_hlast), .out_hdr(sgub_hhdr),
    .count(sgub_cnt), .free(sgub_free), .pkt_count(sgub_pkts)
  );

  logic         secout_ready_unused;
  pkt_fifo #(.DW(128), .DEPTH(BLK_DEPTH)) u_secout_buf (
    .clk, .rst_n,
    .in_valid(aes_ov && aes_oside), .in_ready(secout_ready_unused), .in_data(aes_odata),
    .in_last(aes_olast), .in_hdr(aes_ohdr),
    .out_valid(secout_valid), .out_ready(secout_ready), .out_data(secout_data),
    .out_last(secout_last), .out_hdr(secout_hdr),
    .count(secout_cnt), .free(secout_free), .pkt_count(secout_pkts)
  );

  logic         srub_wr, srub_wlast;
  logic [127:0] srub_wdata;
  css_hdr_t     srub_whdr;
  logic         srub_hv, srub_rd, srub_hlast;
  logic [127:0] srub_hdata;
  css_hdr_t     srub_hhdr;
  logic         srub_ready_unused;

  pkt_fifo #(.DW(128), .DEPTH(KBLK_DEPTH)) u_sru_buf (
    .clk, .rst_n,
    .in_valid(srub_wr), .in_ready(srub_ready_unused), .in_data(srub_wdata),
    .in_last(srub_wlast), .in_hdr(srub_whdr),
    .out_valid(srub_hv), .out_ready(srub_rd), .out_data(srub_hdata),
    .out_last(srub_hlast), .out_hdr(srub_hhdr),
    .count(srub_cnt), .free(srub_free), .pkt_count(srub_pkts)
  );

  // ------------------------------------------------------------------ AES arbiter and unit
  logic         a_side, a_start, a_ld_key, a_valid, a_bypass, a_last;
  logic [127:0] a_key, a_data;
  css_hdr_t     a_hdr;
  logic         arb_busy;

  aes_arbiter #(.PKT_BLOCKS(PKT_BLOCKS), .FW(FW)) u_arbiter (
    .clk, .rst_n,
    .secin_pkts(FW'(secin_pkts)), .secin_valid(secin_hv), .secin_data(secin_hdata),
    .secin_last(secin_hlast), .secin_hdr(secin_hhdr), .secin_rd(secin_rd),
    .sgubuf_free(FW'(sgub_free)), .new_key(new_key), .new_key_rd(new_key_rd),
    .srubuf_pkts(FW'(srub_pkts)), .srubuf_valid(srub_hv), .srubuf_data(srub_hdata),
    .srubuf_last(srub_hlast), .srubuf_hdr(srub_hhdr), .srubuf_rd(srub_rd),
    .secout_free(FW'(secout_free)),
    .aes_side(a_side), .aes_start(a_start), .aes_ld_key(a_ld_key), .aes_key(a_key),
    .aes_valid(a_valid), .aes_bypass(a_bypass), .aes_last(a_last), .aes_hdr(a_hdr),
    .aes_data(a_data), .aes_out_valid(aes_ov), .aes_out_side(aes_oside), .busy(arb_busy)
  );

  aes_ctr_unit #(.CTR_W(CTR_W)) u_aes (
    .clk, .rst_n,
    .side(a_side), .start(a_start), .ld_key(a_ld_key), .key_in(a_key),
    .in_valid(a_valid), .in_bypass(a_bypass), .in_last(a_last), .in_hdr(a_hdr),
    .in_data(a_data),
    .out_valid(aes_ov), .out_side(aes_oside), .out_bypass(aes_obypass),
    .out_last(aes_olast), .out_hdr(aes_ohdr), .out_data(aes_odata)
  );

  // ------------------------------------------------------------------ share generation
  logic         sp_word_valid, sp_word_last, sp_word_rd;
  logic [W-1:0] sp_word;

  block_splitter #(.W(W)) u_splitter (
    .clk, .rst_n,
    .blk_valid(sgub_hv), .blk_data(sgub_hdata), .blk_last(sgub_hlast), .blk_rd(sgub_rd),
    .word_valid(sp_word_valid), .word(sp_word), .word_last(sp_word_last), .word_rd(sp_word_rd)
  );

  logic [N-1:0][$clog2(SH_DEPTH):0] shout_cnt, shout_free, shout_pkts;
  logic [N-1:0]                     shout_in_ready_unused;

  logic                 g_active;
  logic [CW-1:0]        g_rd_cnt, g_sh_cnt;
  css_hdr_t             g_hdr;
  logic                 g_room;
  logic                 g_start;
  ss_mode_e             g_mode;
  logic                 g_enable;
  logic                 g_share_valid;
  logic [N-1:0][W-1:0]  g_share;
  logic                 g_share_last;

  always_comb begin
    g_room = 1'b1;
    for (int i = 0; i < N; i++)
      if (32'(shout_free[i]) < SH_WORDS) g_room = 1'b0;
  end

  assign g_start      = !g_active && (sgub_pkts != '0) && g_room;
  assign g_mode       = (32'(g_rd_cnt) < KEY_WORDS) ? MODE_SHAMIR : MODE_IDS;
  assign g_enable     = g_active && (32'(g_rd_cnt) < TOTAL_WORDS);
  assign g_share_last = (32'(g_sh_cnt) == SH_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_active <= 1'b0;
      g_rd_cnt <= '0;
      g_sh_cnt <= '0;
      g_hdr    <= '0;
    end else begin
      if (g_start) begin
        g_active <= 1'b1;
        g_rd_cnt <= '0;
        g_sh_cnt <= '0;
        g_hdr    <= sgub_hhdr;
      end else begin
        if (sp_word_rd) g_rd_cnt <= g_rd_cnt + 1'b1;
        if (g_share_valid) begin
          g_sh_cnt <= g_sh_cnt + 1'b1;
          if (g_share_last) g_active <= 1'b0;
        end
      end
    end
  end

  sgu #(.W(W), .N(N), .K(K), .XW(XW)) u_sgu (
    .clk, .rst_n,
    .enable(g_enable), .mode(g_mode),
    .secret_valid(sp_word_valid), .secret(sp_word), .secret_rd(sp_word_rd),
    .rand_word(rand_word), .rand_rd(rand_rd),
    .x(x),
    .share_valid(g_share_valid), .share(g_share)
  );

  for (genvar i = 0; i < N; i++) begin : g_shout
    pkt_fifo #(.DW(W), .DEPTH(SH_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid(g_share_valid), .in_ready(shout_in_ready_unused[i]), .in_data(g_share[i]),
      .in_last(g_share_last), .in_hdr(g_hdr),
      .out_valid(shout_valid[i]), .out_ready(shout_ready[i]), .out_data(shout_data[i]),
      .out_last(shout_last[i]), .out_hdr(shout_hdr[i]),
      .count(shout_cnt[i]), .free(shout_free[i]), .pkt_count(shout_pkts[i])
    );
  end

  // ------------------------------------------------------------------ secret reconstruction
  logic [K-1:0][$clog2(SH_DEPTH):0] shin_cnt, shin_free, shin_pkts;
  logic [K-1:0]                     shin_hv, shin_hlast;
  logic [K-1:0][W-1:0]              shin_hdata;
  css_hdr_t [K-1:0]                 shin_hhdr;
  logic                             r_share_rd;

  for (genvar j = 0; j < K; j++) begin : g_shin
    pkt_fifo #(.DW(W), .DEPTH(SH_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid(shin_valid[j]), .in_ready(shin_ready[j]), .in_data(shin_data[j]),
      .in_last(shin_last[j]), .in_hdr(shin_hdr[j]),
      .out_valid(shin_hv[j]), .out_ready(r_share_rd), .out_data(shin_hdata[j]),
      .out_last(shin_hlast[j]), .out_hdr(shin_hhdr[j]),
      .count(shin_cnt[j]), .free(shin_free[j]), .pkt_count(shin_pkts[j])
    );
  end

  logic          r_active, r_all_pkts, r_start, r_enable;
  logic [CW-1:0] r_rd_cnt, r_blk_cnt;
  css_hdr_t      r_hdr;
  ss_mode_e      r_mode;
  logic          r_secret_valid;
  logic [W-1:0]  r_secret;
  logic          pk_valid;
  logic [127:0]  pk_data;

  always_comb begin
    r_all_pkts = 1'b1;
    for (int j = 0; j < K; j++)
      if (shin_pkts[j] == '0) r_all_pkts = 1'b0;
  end

  assign r_start  = !r_active && r_all_pkts && (32'(srub_free) >= PKT_BLOCKS + 1);
  assign r_mode   = (32'(r_rd_cnt) < KEY_WORDS) ? MODE_SHAMIR : MODE_IDS;
  assign r_enable = r_active && (32'(r_rd_cnt) < SH_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_active  <= 1'b0;
      r_rd_cnt  <= '0;
      r_blk_cnt <= '0;
      r_hdr     <= '0;
    end else begin
      if (r_start) begin
        r_active  <= 1'b1;
        r_rd_cnt  <= '0;
        r_blk_cnt <= '0;
        r_hdr     <= shin_hhdr[0];
      end else begin
        if (r_share_rd) r_rd_cnt <= r_rd_cnt + 1'b1;
        if (pk_valid) begin
          r_blk_cnt <= r_blk_cnt + 1'b1;
          if (32'(r_blk_cnt) == PKT_BLOCKS) r_active <= 1'b0;
        end
      end
    end
  end

  sru #(.W(W), .K(K), .BASE_W(BASE_W), .DSP_SLICES(DSP_SLICES)) u_sru (
    .clk, .rst_n,
    .enable(r_enable), .mode(r_mode),
    .mat_we(mat_we), .mat_col(mat_col), .mat_row(mat_row), .mat_data(mat_data),
    .share_valid(&shin_hv), .share(shin_hdata), .share_rd(r_share_rd),
    .secret_valid(r_secret_valid), .secret(r_secret)
  );

  word_packer #(.W(W)) u_packer (
    .clk, .rst_n,
    .word_valid(r_secret_valid), .word(r_secret),
    .blk_valid(pk_valid), .blk_data(pk_data)
  );

  assign srub_wr    = pk_valid;
  assign srub_wdata = pk_data;
  assign srub_wlast = (32'(r_blk_cnt) == PKT_BLOCKS);
  assign srub_whdr  = r_hdr;

  initial begin
    assert (W == 8 || W == 16 || W == 32 || W == 64 || W == 128)
      else $error("css_core: W must be 8, 16, 32, 64 or 128");
    assert (PAY_WORDS % K == 0) else $error("css_core: packet words must be a multiple of K");
    assert (K <= N) else $error("css_core: threshold above number of shares");
  end
endmodule
