// sru: secret reconstruction unit. Recovers secret words from K share words by
// SEC = X^-1 * SH, where X is the Vandermonde matrix of the K x-values used.
//
// X^-1 is computed outside (by the host processor) and loaded column by column into the K
// subreconstruction slices (mat_we, mat_col = sel_col, mat_row, mat_data). A share set, one
// word from each of the K share streams, is popped with share_rd and held in the slices'
// share registers. The rows of X^-1 are then applied one per cycle; each row gives one
// coefficient c_r = sum_j X^-1[r][j] * share_j. The K products are XORed unreduced and
// reduced once, so only one reduction circuit is needed.
//   MODE_SHAMIR: only row 0 is applied (the secret is c_0): one share set per cycle.
//   MODE_IDS   : rows K-1 down to 0 are applied, which returns the K secret words in the order
//                the share generation unit read them: one share set per K cycles.
// There is no feedback, so the datapath is a pipeline: share registers, product registers,
// secret register. secret_valid follows share_rd by 3 cycles for the first row. The mode is
// sampled when a share set is popped. The unit pops while enable and share_valid are high.
// DSP_SLICES sets how many slices build their multiplier on DSP-based 9 x 6 polynomial
// multipliers (4 DSPs per 16 x 16 base block) instead of logic only, trading DSPs for LUTs;
// the default uses DSPs in all slices, as the prototype's resource figures suggest.
module sru
  import css_pkg::*;
#(
  parameter int unsigned W      = 64,
  parameter int unsigned K      = 4,
  parameter int unsigned BASE_W = 16,
  parameter int unsigned DSP_SLICES = K  // slices whose multipliers use DSP base blocks
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  ss_mode_e             mode,
  // host-computed matrix X^-1
  input  logic                 mat_we,
  input  logic [$clog2(K)-1:0] mat_col,
  input  logic [$clog2(K)-1:0] mat_row,
  input  logic [W-1:0]         mat_data,
  // share streams
  input  logic                 share_valid,
  input  logic [K-1:0][W-1:0]  share,
  output logic                 share_rd,
  // reconstructed secret words
  output logic                 secret_valid,
  output logic [W-1:0]         secret
);
  localparam int unsigned RW = $clog2(K);

  logic          busy;
  logic [RW-1:0] row;
  logic          last_row;

  assign last_row = busy && (row == '0);
  assign share_rd = enable && share_valid && (!busy || last_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
    end else if (share_rd) begin
      busy <= 1'b1;
      row  <= (mode == MODE_IDS) ? RW'(K - 1) : '0;
    end else if (last_row) begin
      busy <= 1'b0;
    end else if (busy) begin
      row <= row - 1'b1;
    end
  end

  logic [K-1:0][2*W-2:0] prod_q;

  for (genvar j = 0; j < K; j++) begin : g_sub
    sru_subrec #(.W(W), .K(K), .BASE_W(BASE_W), .USE_DSP(j < DSP_SLICES)) u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .mat_we   (mat_we && (mat_col == RW'(j))),
      .mat_row  (mat_row),
      .mat_data (mat_data),
      .share_ld (share_rd),
      .share_in (share[j]),
      .row_valid(busy),
      .row_sel  (row),
      .prod_q   (prod_q[j])
    );
  end

  logic           p_valid;
  logic [2*W-2:0] sum;
  logic [W-1:0]   sum_red;

  always_comb begin
    sum = '0;
    for (int j = 0; j < K; j++) sum ^= prod_q[j];
  end

  gf_reduce #(.W(W), .IN_W(2*W-1)) u_reduce (.d(sum), .q(sum_red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid      <= 1'b0;
      secret_valid <= 1'b0;
      secret       <= '0;
    end else begin
      p_valid      <= busy;
      secret_valid <= p_valid;
      if (p_valid) secret <= sum_red;
    end
  end

  initial assert (K >= 2) else $error("sru: K must be at least 2");
endmodule
