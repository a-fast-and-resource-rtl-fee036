// tb_sru: checks the secret reconstruction unit (W = 64, K = 4).
// Four x-values are drawn; the inverse Vandermonde matrix is computed here by Gauss-Jordan
// elimination and loaded column by column, as the host would. Share sets are generated by
// evaluating random polynomials at those points: Shamir sets must return c_0, dispersal sets
// must return c_3, c_2, c_1, c_0 (the words in the order they were shared). Also checked:
// 3 cycles from share_rd to the first secret, one Shamir set per cycle, one dispersal set
// per K cycles, and a second matrix for a different choice of shares.
module tb_sru;
  import gf_ref_pkg::*;
  import css_pkg::*;
  localparam int W = 64, K = 4;

  logic                clk = 0, rst_n = 0;
  logic                enable = 0;
  ss_mode_e            mode;
  logic                mat_we = 0;
  logic [1:0]          mat_col = 0, mat_row = 0;
  logic [W-1:0]        mat_data = '0;
  logic                share_valid;
  logic [K-1:0][W-1:0] share;
  logic                share_rd;
  logic                secret_valid;
  logic [W-1:0]        secret;
  int checks = 0, failures = 0;

  sru #(.W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [K-1:0][W-1:0] sh;
    ss_mode_e            mode;
  } set_t;

  set_t         sets [$];
  logic [W-1:0] expect_q [$];
  int           rd_cycle [$];
  int           cycle = 0, n_out = 0, first_out_cycle = -1, last_out_cycle = 0;

  assign share_valid = sets.size() > 0;
  assign share       = sets.size() > 0 ? sets[0].sh : '0;
  assign mode        = sets.size() > 0 ? sets[0].mode : MODE_SHAMIR;

  // the share set is removed after the edge that read it, so the unit samples it first
  logic popped = 1'b0;
  always @(negedge clk) begin
    if (popped) void'(sets.pop_front());
    popped <= 1'b0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && share_rd) begin
      rd_cycle.push_back(cycle);
      popped <= 1'b1;
    end
    if (rst_n && secret_valid) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("FAIL: unexpected secret %h", secret);
      end else begin
        logic [W-1:0] e;
        e = expect_q.pop_front();
        if (secret !== e) begin
          failures++; $display("FAIL secret %0d: %h expected %h", n_out, secret, e);
        end
      end
      if (first_out_cycle < 0) first_out_cycle = cycle;
      last_out_cycle = cycle;
      n_out++;
    end
  end

  task automatic load_matrix(input vec_t xs);
    mat_t inv;
    inv = vandermonde_inv(xs, K, W);
    for (int j = 0; j < K; j++)
      for (int r = 0; r < K; r++) begin
        @(negedge clk);
        mat_we = 1; mat_col = 2'(j); mat_row = 2'(r); mat_data = inv[r][j][W-1:0];
      end
    @(negedge clk);
    mat_we = 0;
  endtask

  task automatic add_set(input vec_t xs, input ss_mode_e m);
    vec_t c;
    set_t s;
    elem_t e;
    for (int i = 0; i < K; i++) c[i] = elem_t'({$urandom, $urandom});
    for (int j = 0; j < K; j++) begin
      e = poly_eval(c, K, xs[j], W);
      s.sh[j] = e[W-1:0];
    end
    s.mode = m;
    sets.push_back(s);
    if (m == MODE_SHAMIR) expect_q.push_back(c[0][W-1:0]);
    else for (int i = K - 1; i >= 0; i--) expect_q.push_back(c[i][W-1:0]);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t xs;
    int   t0;
    xs[0] = 128'h01; xs[1] = 128'h05; xs[2] = 128'h9A; xs[3] = 128'hFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_matrix(xs);
    // Shamir sets back to back: one per cycle, first secret 3 cycles after the first read
    for (int i = 0; i < 20; i++) add_set(xs, MODE_SHAMIR);
    @(negedge clk);
    enable = 1;
    wait (n_out == 20);
    @(negedge clk);
    expect_eq(first_out_cycle - rd_cycle[0], 3, "latency share_rd to secret");
    expect_eq(last_out_cycle - first_out_cycle, 19, "cycles for 20 Shamir secrets");
    // dispersal sets: K secrets per set, one set every K cycles
    enable = 0;
    rd_cycle.delete();
    first_out_cycle = -1;
    for (int i = 0; i < 10; i++) add_set(xs, MODE_IDS);
    @(negedge clk);
    enable = 1;
    wait (n_out == 20 + 10 * K);
    @(negedge clk);
    expect_eq(rd_cycle[9] - rd_cycle[0], 9 * K, "cycles between dispersal set reads");
    expect_eq(last_out_cycle - first_out_cycle, 10 * K - 1, "cycles for 40 dispersal secrets");
    // other shares: new matrix, mixed modes
    enable = 0;
    xs[0] = 128'h02; xs[1] = 128'h03; xs[2] = 128'h04; xs[3] = 128'h80;
    load_matrix(xs);
    for (int i = 0; i < 20; i++) add_set(xs, (i % 3 == 0) ? MODE_SHAMIR : MODE_IDS);
    enable = 1;
    wait (sets.size() == 0);
    repeat (K + 4) @(negedge clk);
    expect_eq(expect_q.size(), 0, "secrets missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
