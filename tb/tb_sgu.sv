// tb_sgu: checks the share generation unit (W = 64, N = 8 shares, K = 4).
// A stream of secret words is offered with gaps; the testbench records every coefficient the
// unit takes (secret words in order, random words from its own generator in the order they
// are popped) and rebuilds each polynomial: Shamir mode f = r1 x + r2 x^2 + r3 x^3 + s
// (the first random word popped is c_3), dispersal mode f = w0 x^3 + w1 x^2 + w2 x + w3.
// Every share must equal the term-by-term evaluation at its x-value. It also checks the
// rate: in dispersal mode with secrets always available, one polynomial every K cycles.
module tb_sgu;
  import gf_ref_pkg::*;
  import css_pkg::*;
  localparam int W = 64, N = 8, K = 4, XW = 8;

  logic                 clk = 0, rst_n = 0;
  logic                 enable = 0;
  ss_mode_e             mode = MODE_SHAMIR;
  logic                 secret_valid = 0;
  logic [W-1:0]         secret;
  logic                 secret_rd;
  logic [W-1:0]         rand_word;
  logic                 rand_rd;
  logic [N-1:0][XW-1:0] x;
  logic                 share_valid;
  logic [N-1:0][W-1:0]  share;
  int checks = 0, failures = 0;

  sgu #(.W(W), .N(N), .K(K), .XW(XW)) dut (.*);

  always #5 clk = ~clk;

  // sources and recording
  logic [W-1:0] sec_q [$];     // words still to offer
  logic [63:0]  lfsr = 64'hACE1_2345_6789_0BDF;
  int           n_polys = 0, n_shares = 0;

  assign secret    = sec_q.size() > 0 ? sec_q[0] : '0;
  assign rand_word = lfsr;

  // a word is removed after the edge that read it, so the unit samples it first
  logic popped = 1'b0;
  always @(negedge clk) begin
    if (popped) void'(sec_q.pop_front());
    popped <= 1'b0;
  end

  // log of everything the unit consumed, in order
  logic [W-1:0] sec_log [$];
  logic [W-1:0] rnd_log [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (secret_rd) begin
        sec_log.push_back(secret);
        popped <= 1'b1;
      end
      if (rand_rd) begin
        rnd_log.push_back(rand_word);
        lfsr <= {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
      end
    end
  end

  // The first 12 polynomials are Shamir (c3, c2, c1 random in pop order, c0 the secret),
  // the following ones dispersal (c3..c0 = four consecutive secret words).
  always @(posedge clk) begin
    vec_t  c;
    elem_t e;
    int    q;
    if (rst_n && share_valid) begin
      if (n_shares < 12) begin
        for (int i = 0; i < K - 1; i++) c[K-1-i] = elem_t'(rnd_log[(K-1)*n_shares + i]);
        c[0] = elem_t'(sec_log[n_shares]);
      end else begin
        q = n_shares - 12;
        for (int i = 0; i < K; i++) c[K-1-i] = elem_t'(sec_log[12 + K*q + i]);
      end
      for (int s = 0; s < N; s++) begin
        e = poly_eval(c, K, elem_t'(x[s]), W);
        checks++;
        if (share[s] !== e[W-1:0]) begin
          failures++;
          $display("FAIL poly %0d share %0d: %h expected %h", n_shares, s, share[s], e[W-1:0]);
        end
      end
      n_shares++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    for (int i = 0; i < N; i++) x[i] = XW'(i + 1);
    x[N-1] = 8'hFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Shamir mode: 12 secrets, offered with gaps
    @(negedge clk);
    mode = MODE_SHAMIR; enable = 1;
    for (int i = 0; i < 12; i++) begin
      sec_q.push_back({$urandom, $urandom});
      secret_valid = 1;
      wait (sec_q.size() == 0);
      @(negedge clk);
      secret_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (K + 2) @(negedge clk);
    enable = 0;
    checks++;
    if (n_shares != 12) begin
      failures++; $display("FAIL: %0d Shamir share sets, expected 12", n_shares);
    end
    // dispersal mode: 16 polynomials back to back, check rate
    for (int i = 0; i < 16 * K; i++) sec_q.push_back({$urandom, $urandom});
    @(negedge clk);
    mode = MODE_IDS; enable = 1; secret_valid = 1;
    t0 = $time;
    wait (n_shares == 12 + 16);
    t1 = $time;
    @(negedge clk);
    secret_valid = 0; enable = 0;
    // first share set after K cycles + 1 pipeline stage, then one every K cycles
    checks++;
    if ((t1 - t0 + 5) / 10 != 16 * K + 1) begin
      failures++;
      $display("FAIL: 16 dispersal polynomials took %0d cycles, expected %0d",
               (t1 - t0 + 5) / 10, 16 * K + 1);
    end
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
