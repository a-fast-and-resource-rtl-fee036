// aes_ctr_unit: the AES unit of the CSS core, the pipelined AES-128 core run in counter
// (CTR) mode and shared by the sharing side (side 0, encryption) and the reconstruction side
// (side 1, decryption; CTR decryption is the same operation).
//
// It holds one key register and one block counter register per side. A block issued on side
// s is combined with the keystream AES(key_s, {hdr, count_s}), count_s being the number of
// payload blocks of the current packet issued before it: `start` restarts count_s at 0 and
// `ld_key` loads key_s from key_in (the new key is already used in that cycle). The packet
// header is the CTR nonce. A `bypass` block does not use the cipher: it carries the key of
// its side through the pipeline unchanged, so the sharing side can place the key in front of
// its encrypted payload in the same stream. Data, header and flags travel with the block.
// Latency 22 cycles, one block per cycle, no stall.
// CTR mode, two key and two count registers follow the reference design; the counter-block
// layout, the bypass and the per-packet counter restart are choices of this design.
module aes_ctr_unit
  import css_pkg::*;
#(
  parameter int unsigned CTR_W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         side,      // 0: sharing (enc), 1: reconstruction (dec)
  input  logic         start,     // first cycle of a packet on `side`
  input  logic         ld_key,
  input  logic [127:0] key_in,
  input  logic         in_valid,
  input  logic         in_bypass,
  input  logic         in_last,
  input  css_hdr_t     in_hdr,
  input  logic [127:0] in_data,
  output logic         out_valid,
  output logic         out_side,
  output logic         out_bypass,
  output logic         out_last,
  output css_hdr_t     out_hdr,
  output logic [127:0] out_data
);
  typedef struct packed {
    logic         side;
    logic         bypass;
    logic         last;
    css_hdr_t     hdr;
    logic [127:0] data;
  } tag_t;

  logic [127:0]     key_q [2];
  logic [CTR_W-1:0] cnt_q [2];
  logic [127:0]     key_use;
  logic [CTR_W-1:0] cnt_use;
  logic [127:0]     ctr_block;
  tag_t             tag_in, tag_out;
  logic [127:0]     ks;

  assign key_use   = ld_key ? key_in : key_q[side];
  assign cnt_use   = start ? '0 : cnt_q[side];
  assign ctr_block = {in_hdr, {(64-CTR_W){1'b0}}, cnt_use};
  assign tag_in    = '{side: side, bypass: in_bypass, last: in_last, hdr: in_hdr,
                       data: in_bypass ? key_use : in_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q[0] <= '0;
      key_q[1] <= '0;
      cnt_q[0] <= '0;
      cnt_q[1] <= '0;
    end else begin
      if (ld_key) key_q[side] <= key_in;
      if (in_valid && !in_bypass) cnt_q[side] <= cnt_use + 1'b1;
      else if (start)             cnt_q[side] <= '0;
    end
  end

  aes128_pipe #(.TAG_W($bits(tag_t))) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_block (ctr_block),
    .in_key   (key_use),
    .in_tag   (tag_in),
    .out_valid(out_valid),
    .out_block(ks),
    .out_tag  (tag_out)
  );

  assign out_side   = tag_out.side;
  assign out_bypass = tag_out.bypass;
  assign out_last   = tag_out.last;
  assign out_hdr    = tag_out.hdr;
  assign out_data   = tag_out.bypass ? tag_out.data : (tag_out.data ^ ks);

  initial assert (CTR_W >= 1 && CTR_W <= 64) else $error("aes_ctr_unit: CTR_W out of range");
endmodule
