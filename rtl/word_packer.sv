// word_packer: gathers W-bit words into 128-bit blocks, first word in the most significant
// position (W divides 128). blk_valid pulses for one cycle in the cycle after the word that
// completes a block; there is no backpressure, the receiver must have room.
module word_packer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         word_valid,
  input  logic [W-1:0] word,
  output logic         blk_valid,
  output logic [127:0] blk_data
);
  localparam int unsigned NW = 128 / W;
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic [IW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      blk_valid <= 1'b0;
      blk_data  <= '0;
    end else begin
      blk_valid <= word_valid && (idx == IW'(NW - 1));
      if (word_valid) begin
        blk_data[127 - W*idx -: W] <= word;
        idx <= (idx == IW'(NW - 1)) ? '0 : idx + 1'b1;
      end
    end
  end

  initial assert (W <= 128 && 128 % W == 0) else $error("word_packer: W must divide 128");
endmodule
