// sru_subrec: one "share_j subreconstruction" slice of the secret reconstruction unit.
//
// It holds column j of the inverted Vandermonde matrix X^-1 in a small memory (K words,
// written by the host through mat_we/mat_row/mat_data), a register for the current share
// word of share stream j, and a full W x W carry-less Karatsuba multiplier followed by a
// product register. On each row cycle it outputs the unreduced product X^-1[row][j] * share_j
// one cycle later; the unit sums the slices and reduces once. share_ld captures share_in.
// USE_DSP selects DSP-based base multipliers inside the Karatsuba multiplier.
module sru_subrec #(
  parameter int unsigned W      = 64,
  parameter int unsigned K      = 4,
  parameter int unsigned BASE_W = 16,
  parameter bit          USE_DSP = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mat_we,
  input  logic [$clog2(K)-1:0] mat_row,
  input  logic [W-1:0]         mat_data,
  input  logic                 share_ld,
  input  logic [W-1:0]         share_in,
  input  logic                 row_valid,
  input  logic [$clog2(K)-1:0] row_sel,
  output logic [2*W-2:0]       prod_q
);
  logic [W-1:0]   mem [K];
  logic [W-1:0]   share_q;
  logic [2*W-2:0] prod;

  always_ff @(posedge clk) begin
    if (mat_we) mem[mat_row] <= mat_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      share_q <= '0;
      prod_q  <= '0;
    end else begin
      if (share_ld)  share_q <= share_in;
      if (row_valid) prod_q  <= prod;
    end
  end

  karatsuba_mul #(.W(W), .BASE_W(BASE_W), .USE_DSP(USE_DSP)) u_mult (.a(mem[row_sel]), .b(share_q), .p(prod));
endmodule
