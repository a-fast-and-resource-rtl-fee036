// tb_css_core: end-to-end test of the CSS core at its default parameters (64-bit words,
// 8 shares, threshold 4, 64-block packets).
//  1. Ten plaintext packets are shared (even packets ask for a new key, odd ones reuse
//     it) while the share outputs are not read at first, so every buffer fills up. Every share packet is checked: length, header, the key shares exactly (the key and
//     the random words are known, so each key-share word is f(x_i) of a known polynomial)
//     and the payload shares for consistency (shares 0..3 determine the polynomial, shares
//     4..7 must lie on it). The payload must not equal the plaintext.
//  2. While packets 10 and 11 are shared, the share packets of packets 0..3 taken from
//     shares {0, 2, 5, 7} are fed back with the matching inverse matrix, so both sides
//     compete for the AES.
//  3. The matrix for shares {1, 3, 4, 6} is loaded and packets 4..11 are reconstructed.
// Every reconstructed packet must equal its plaintext, with its header. Share outputs are
// read with random backpressure so the share buffers fill and the SGU waits for room.
// Mechanisms counted, each must occur: new key, key reuse, Shamir and dispersal
// polynomials in the SGU and in the SRU, AES contention, SGU waiting for room, secret-in
// backpressure. Rate: while dispersing, the SGU takes one word in every cycle.
module tb_css_core;
  import css_pkg::*;
  import gf_ref_pkg::*;

  localparam int W = 64, N = 8, K = 4, XW = 8, PKT = 64;
  localparam int KEY_WORDS = 128 / W, PAY_WORDS = PKT * 128 / W;
  localparam int SH = KEY_WORDS + PAY_WORDS / K;
  localparam int NPKT = 12;

  logic                 clk = 0, rst_n = 0;
  logic                 secin_valid = 0, secin_ready, secin_last = 0;
  logic [127:0]         secin_data = '0;
  css_hdr_t             secin_hdr = '0;
  logic                 secout_valid, secout_ready = 1, secout_last;
  logic [127:0]         secout_data;
  css_hdr_t             secout_hdr;
  logic [W-1:0]         rand_word;
  logic                 rand_rd;
  logic [127:0]         new_key;
  logic                 new_key_rd;
  logic [N-1:0][XW-1:0] x;
  logic                 mat_we = 0;
  logic [1:0]           mat_col = 0, mat_row = 0;
  logic [W-1:0]         mat_data = '0;
  logic [N-1:0]         shout_valid, shout_ready = '0, shout_last;
  logic [N-1:0][W-1:0]  shout_data;
  css_hdr_t [N-1:0]     shout_hdr;
  logic [K-1:0]         shin_valid = '0, shin_ready, shin_last = '0;
  logic [K-1:0][W-1:0]  shin_data = '0;
  css_hdr_t [K-1:0]     shin_hdr = '0;

  int checks = 0, failures = 0;

  css_core dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ random word and key sources
  logic [63:0]  lfsr = 64'h0123_4567_89AB_CDEF;
  logic [127:0] key_src = 128'h000102030405060708090a0b0c0d0e0f;
  logic [W-1:0] rnd_log [$];
  logic [127:0] key_log [$];
  assign rand_word = lfsr;
  assign new_key   = key_src;
  always @(posedge clk) begin
    if (rst_n && rand_rd) begin
      rnd_log.push_back(rand_word);
      lfsr <= {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
    end
    if (rst_n && new_key_rd) begin
      key_log.push_back(new_key);
      key_src <= {key_src[126:0], key_src[127]} ^ {$urandom, $urandom, $urandom, $urandom};
    end
  end

  // ------------------------------------------------------------ plaintext and headers
  logic [127:0] pt [NPKT][PKT];
  css_hdr_t     hdr [NPKT];

  // ------------------------------------------------------------ share-out collection
  logic [W-1:0] shw [N][$];
  logic         hold_shares = 1'b1;   // share outputs are not read at first
  int           shout_pkts [N];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst_n && shout_valid[i] && shout_ready[i]) begin
        int p;
        p = shw[i].size() / SH;
        checks++;
        if (shout_hdr[i] !== hdr[p] ||
            shout_last[i] !== ((shw[i].size() % SH) == SH - 1))
          fail($sformatf("share %0d packet %0d word %0d: header or last flag", i, p,
                         shw[i].size() % SH));
        shw[i].push_back(shout_data[i]);
        if (shout_last[i]) shout_pkts[i]++;
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) shout_ready[i] = !hold_shares && ($urandom_range(0, 99) < 60);
  end

  // ------------------------------------------------------------ secret-out collection
  logic [127:0] sow [$];
  always @(posedge clk) begin
    if (rst_n && secout_valid && secout_ready) begin
      int p, b;
      p = sow.size() / PKT;
      b = sow.size() % PKT;
      checks++;
      if (p >= NPKT) fail("extra secret block");
      else if (secout_data !== pt[p][b] || secout_hdr !== hdr[p] ||
               secout_last !== (b == PKT - 1))
        fail($sformatf("packet %0d block %0d: %h expected %h", p, b, secout_data, pt[p][b]));
      sow.push_back(secout_data);
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int m_new_key = 0, m_key_reuse = 0, m_sgu_shamir = 0, m_sgu_ids = 0, m_sru_shamir = 0;
  int m_sru_ids = 0, m_contention = 0, m_sgu_wait_room = 0, m_secin_bp = 0, m_ids_idle = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (new_key_rd) m_new_key++;
      if (dut.u_arbiter.aes_start && !dut.u_arbiter.aes_side && !dut.u_arbiter.aes_ld_key)
        m_key_reuse++;
      if (dut.u_sgu.secret_rd && dut.u_sgu.coef_idx == 0)
        if (dut.u_sgu.mode_cur == MODE_SHAMIR) m_sgu_shamir++; else m_sgu_ids++;
      if (dut.r_share_rd)
        if (dut.r_mode == MODE_SHAMIR) m_sru_shamir++; else m_sru_ids++;
      if (dut.u_arbiter.req_enc && dut.u_arbiter.req_dec) m_contention++;
      if (!dut.g_active && dut.sgub_pkts != 0 && !dut.g_room) m_sgu_wait_room++;
      if (secin_valid && !secin_ready) m_secin_bp++;
      if (dut.g_enable && dut.u_sgu.mode_cur == MODE_IDS && !dut.u_sgu.secret_rd) m_ids_idle++;
    end
  end

  // ------------------------------------------------------------ drivers
  task automatic send_packet(input int p);
    for (int b = 0; b < PKT; b++) begin
      @(negedge clk);
      secin_valid = 1; secin_data = pt[p][b]; secin_last = (b == PKT - 1); secin_hdr = hdr[p];
      #1;
      while (!secin_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
    end
    @(negedge clk);
    secin_valid = 0;
  endtask

  task automatic send_share_stream(input int j, input int s, input int p);
    for (int m = 0; m < SH; m++) begin
      @(negedge clk);
      shin_valid[j] = 1; shin_data[j] = shw[s][p*SH + m]; shin_last[j] = (m == SH - 1);
      shin_hdr[j] = hdr[p];
      #1;
      while (!shin_ready[j]) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk);
        shin_valid[j] = 0;
      end
    end
    @(negedge clk);
    shin_valid[j] = 0;
  endtask

  task automatic send_shares(input int sub[K], input int p0, input int p1);
    for (int p = p0; p <= p1; p++) begin
      fork
        send_share_stream(0, sub[0], p);
        send_share_stream(1, sub[1], p);
        send_share_stream(2, sub[2], p);
        send_share_stream(3, sub[3], p);
      join
    end
  endtask

  task automatic load_matrix(input int sub[K]);
    vec_t xs;
    mat_t inv;
    for (int j = 0; j < K; j++) xs[j] = elem_t'(x[sub[j]]);
    inv = vandermonde_inv(xs, K, W);
    for (int j = 0; j < K; j++)
      for (int r = 0; r < K; r++) begin
        @(negedge clk);
        mat_we = 1; mat_col = 2'(j); mat_row = 2'(r); mat_data = inv[r][j][W-1:0];
      end
    @(negedge clk);
    mat_we = 0;
  endtask

  task automatic wait_shares(input int n);
    int done;
    do begin
      @(negedge clk);
      done = 1;
      for (int i = 0; i < N; i++) if (shout_pkts[i] < n) done = 0;
    end while (!done);
  endtask

  // ------------------------------------------------------------ share checks
  task automatic check_shares(input int p, input logic [127:0] key);
    vec_t  c, xs;
    mat_t  inv;
    elem_t e;
    int    same;
    // key shares: c3, c2, c1 are the random words in the order they were taken, c0 the key word
    for (int m = 0; m < KEY_WORDS; m++) begin
      for (int i = 0; i < K - 1; i++)
        c[K-1-i] = elem_t'(rnd_log[p*KEY_WORDS*(K-1) + m*(K-1) + i]);
      c[0] = elem_t'(key[127 - W*m -: W]);
      for (int s = 0; s < N; s++) begin
        e = poly_eval(c, K, elem_t'(x[s]), W);
        checks++;
        if (shw[s][p*SH + m] !== e[W-1:0])
          fail($sformatf("packet %0d key share %0d word %0d", p, s, m));
      end
    end
    // payload shares: shares 0..3 define the polynomial, 4..7 must lie on it
    for (int j = 0; j < K; j++) xs[j] = elem_t'(x[j]);
    inv = vandermonde_inv(xs, K, W);
    same = 0;
    for (int m = KEY_WORDS; m < SH; m++) begin
      for (int r = 0; r < K; r++) begin
        c[r] = '0;
        for (int j = 0; j < K; j++) c[r] ^= gf_mul(inv[r][j], elem_t'(shw[j][p*SH + m]), W);
      end
      for (int s = K; s < N; s++) begin
        e = poly_eval(c, K, elem_t'(x[s]), W);
        checks++;
        if (shw[s][p*SH + m] !== e[W-1:0])
          fail($sformatf("packet %0d payload share %0d word %0d inconsistent", p, s, m));
      end
      // c3 is the first word of the group: compare with the plaintext word at that place
      if (c[K-1][W-1:0] == pt[p][((m - KEY_WORDS) * K) / 2][127 -: W]) same++;
    end
    checks++;
    if (same > 2) fail($sformatf("packet %0d payload looks unencrypted", p));
  endtask

  // ------------------------------------------------------------ main sequence
  initial begin
    #6000000;
    failures++;
    $display("watchdog: shares out %0d, secret blocks out %0d", shout_pkts[0], sow.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sub_a[K] = '{0, 2, 5, 7};
    int sub_b[K] = '{1, 3, 4, 6};
    logic [127:0] cur_key;
    for (int i = 0; i < N; i++) x[i] = XW'(i + 1);
    x[N-1] = 8'hF0;
    for (int p = 0; p < NPKT; p++) begin
      hdr[p] = '{pkt_id: 32'(1000 + p), frag: 16'(p), rsvd: '0, new_key: (p % 2 == 0)};
      for (int b = 0; b < PKT; b++) pt[p][b] = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. share packets 0..3
    fork
      for (int p = 0; p < 10; p++) send_packet(p);
      begin
        repeat (3000) @(negedge clk);
        hold_shares = 0;
      end
    join
    wait_shares(10);
    for (int p = 0; p < 10; p++) begin
      cur_key = key_log[p / 2];
      check_shares(p, cur_key);
    end

    // 2. share packets 4..7 while reconstructing 0..3 from shares {0,2,5,7}
    load_matrix(sub_a);
    fork
      for (int p = 10; p < 12; p++) send_packet(p);
      send_shares(sub_a, 0, 3);
    join
    while (sow.size() < 4 * PKT) @(negedge clk);

    // 3. reconstruct 4..7 from shares {1,3,4,6}
    wait_shares(12);
    load_matrix(sub_b);
    send_shares(sub_b, 4, 11);
    while (sow.size() < NPKT * PKT) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int p = 10; p < 12; p++) check_shares(p, key_log[p / 2]);

    $display("mechanisms: new_key %0d key_reuse %0d sgu_shamir %0d sgu_ids %0d sru_shamir %0d",
             m_new_key, m_key_reuse, m_sgu_shamir, m_sgu_ids, m_sru_shamir);
    $display("            sru_ids %0d aes_contention %0d sgu_wait_room %0d secin_backpressure %0d",
             m_sru_ids, m_contention, m_sgu_wait_room, m_secin_bp);
    checks += 10;
    if (m_new_key == 0)       fail("no new key was loaded");
    if (m_key_reuse == 0)     fail("no key was reused");
    if (m_sgu_shamir == 0)    fail("no Shamir polynomial in the SGU");
    if (m_sgu_ids == 0)       fail("no dispersal polynomial in the SGU");
    if (m_sru_shamir == 0)    fail("no Shamir reconstruction");
    if (m_sru_ids == 0)       fail("no dispersal reconstruction");
    if (m_contention == 0)    fail("the AES was never contended");
    if (m_sgu_wait_room == 0) fail("the SGU never waited for share buffer room");
    if (m_secin_bp == 0)      fail("the secret-in buffer never pushed back");
    if (m_ids_idle != 0)      fail($sformatf("SGU idle for %0d cycles while dispersing", m_ids_idle));
    checks++;
    if (m_sgu_shamir != NPKT * KEY_WORDS || m_sgu_ids != NPKT * PAY_WORDS / K)
      fail("wrong number of SGU polynomials");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
