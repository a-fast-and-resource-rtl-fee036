// aes128_pipe: fully pipelined AES-128 encryption core with on-the-fly key expansion.
//
// A new 128-bit block and its own key may enter in every cycle; the ciphertext leaves 22
// cycles later. Each block carries its key through the pipeline, so blocks under different
// keys can follow each other back to back. Stage 1 registers the inputs, stage 2 the initial
// AddRoundKey, and each of the 10 rounds takes two stages: SubBytes together with the
// key-schedule S-box word, then ShiftRows, MixColumns (not in round 10) and AddRoundKey with
// the round key just expanded. A valid bit and TAG_W bits of user sideband travel with each
// block. There is no stall: the pipeline always advances.
// The reference design takes an existing open-source core with the same rate and latency;
// this is an independent implementation of the FIPS-197 cipher with that timing.
module aes128_pipe #(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [127:0]     in_block,
  input  logic [127:0]     in_key,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [127:0]     out_block,
  output logic [TAG_W-1:0] out_tag
);
  import aes_pkg::*;

  localparam int unsigned STAGES = 22;

  logic [127:0]     st  [STAGES+1];  // state after stage i (st[0] unused)
  logic [127:0]     key [STAGES+1];  // round key belonging to the state
  logic [31:0]      kt  [STAGES+1];  // key-schedule word between the two stages of a round
  logic             vld [STAGES+1];
  logic [TAG_W-1:0] tag [STAGES+1];

  // control sideband: valid is reset, data is not
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= STAGES; i++) vld[i] <= 1'b0;
    end else begin
      vld[1] <= in_valid;
      for (int i = 2; i <= STAGES; i++) vld[i] <= vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    st[1]  <= in_block;
    key[1] <= in_key;
    kt[1]  <= '0;
    tag[1] <= in_tag;
    st[2]  <= st[1] ^ key[1];
    key[2] <= key[1];
    kt[2]  <= '0;
    tag[2] <= tag[1];
    for (int i = 3; i <= STAGES; i++) tag[i] <= tag[i-1];
  end

  for (genvar r = 1; r <= 10; r++) begin : g_round
    localparam int unsigned SA = 2*r + 1;  // SubBytes stage
    localparam int unsigned SB = 2*r + 2;  // ShiftRows/MixColumns/AddRoundKey stage
    logic [127:0] rk;
    assign rk = next_round_key(key[SA], kt[SA]);
    always_ff @(posedge clk) begin
      st[SA]  <= sub_bytes(st[SA-1]);
      key[SA] <= key[SA-1];
      kt[SA]  <= key_core(key[SA-1][31:0], rcon(r));
      if (r == 10) st[SB] <= shift_rows(st[SA]) ^ rk;
      else         st[SB] <= mix_columns(shift_rows(st[SA])) ^ rk;
      key[SB] <= rk;
      kt[SB]  <= '0;
    end
  end

  assign out_valid = vld[STAGES];
  assign out_block = st[STAGES];
  assign out_tag   = tag[STAGES];
endmodule
