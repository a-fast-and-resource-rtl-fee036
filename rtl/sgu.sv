// sgu: share generation unit. N polynomial evaluation units (PEUs) evaluate the same
// polynomial at N different points x_i in parallel, so one polynomial yields N shares.
//
// A polynomial has K coefficients, fed from c_{K-1} down to c_0, one per cycle.
//   MODE_SHAMIR: c_0 is one secret word, c_1..c_{K-1} are random words (threshold sharing).
//   MODE_IDS   : all K coefficients are secret words (information dispersal); the first
//                word read becomes c_{K-1}, the last c_0.
// Two pipeline stages follow the reference figure. Stage A is the FSM: it counts the
// coefficient index, latches the mode at the start of a polynomial, and pops a secret word
// (secret_rd) into the secret register when one is needed: for each coefficient in IDS mode,
// once at the start of the polynomial in Shamir mode. Stage B is the multiplexer, which
// takes the registered secret or the random word (rand_rd pops it in the same cycle), and
// the PEUs. share_valid marks the cycle in which share[i] = f(x_i) is presented.
// Throughput: one polynomial per K cycles, i.e. one secret word per cycle in IDS mode.
// Latency: share_valid follows the secret_rd of the polynomial's last coefficient by one
// cycle. The FSM only advances while enable is high and, when it needs a secret word,
// secret_valid is high; a stall inserts bubbles that leave the PEU accumulators untouched.
// The random source must deliver a word in any cycle that asserts rand_rd.
module sgu
  import css_pkg::*;
#(
  parameter int unsigned W  = 64,
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 4,
  parameter int unsigned XW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  ss_mode_e             mode,
  input  logic                 secret_valid,
  input  logic [W-1:0]         secret,
  output logic                 secret_rd,
  input  logic [W-1:0]         rand_word,
  output logic                 rand_rd,
  input  logic [N-1:0][XW-1:0] x,
  output logic                 share_valid,
  output logic [N-1:0][W-1:0]  share
);
  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;

  // ---- stage A: coefficient sequencer ----
  logic [CW-1:0] coef_idx;   // 0 -> c_{K-1}, K-1 -> c_0
  ss_mode_e      mode_q;
  ss_mode_e      mode_cur;
  logic          need_secret;
  logic          advance;

  assign mode_cur    = (coef_idx == '0) ? mode : mode_q;
  assign need_secret = (mode_cur == MODE_IDS) || (coef_idx == '0);
  assign advance     = enable && (!need_secret || secret_valid);
  assign secret_rd   = advance && need_secret;

  logic [W-1:0] secret_q;
  logic         b_valid, b_first, b_last;
  logic         b_use_secret;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_idx     <= '0;
      mode_q       <= MODE_SHAMIR;
      secret_q     <= '0;
      b_valid      <= 1'b0;
      b_first      <= 1'b0;
      b_last       <= 1'b0;
      b_use_secret <= 1'b0;
    end else begin
      b_valid <= advance;
      if (advance) begin
        if (coef_idx == '0) mode_q <= mode;
        coef_idx     <= (coef_idx == CW'(K - 1)) ? '0 : coef_idx + 1'b1;
        b_first      <= (coef_idx == '0);
        b_last       <= (coef_idx == CW'(K - 1));
        b_use_secret <= (mode_cur == MODE_IDS) || (coef_idx == CW'(K - 1));
      end
      if (secret_rd) secret_q <= secret;
    end
  end

  // ---- stage B: coefficient multiplexer and PEUs ----
  logic [W-1:0] coef;
  assign coef        = b_use_secret ? secret_q : rand_word;
  assign rand_rd     = b_valid && !b_use_secret;
  assign share_valid = b_valid && b_last;

  for (genvar i = 0; i < N; i++) begin : g_peu
    peu #(.W(W), .XW(XW)) u_peu (
      .clk       (clk),
      .rst_n     (rst_n),
      .x         (x[i]),
      .coef_valid(b_valid),
      .first     (b_first),
      .coef      (coef),
      .share     (share[i])
    );
  end

  initial assert (K >= 2) else $error("sgu: threshold K must be at least 2");
endmodule
