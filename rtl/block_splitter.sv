// block_splitter: presents a FIFO of 128-bit blocks as a stream of W-bit words, most
// significant word first (W divides 128). First word fall through: word/valid show the
// current word; word_rd consumes it, and the block is popped from the FIFO with its last
// word. word_last is high on the last word of the last block of a packet.
module block_splitter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         blk_valid,
  input  logic [127:0] blk_data,
  input  logic         blk_last,
  output logic         blk_rd,
  output logic         word_valid,
  output logic [W-1:0] word,
  output logic         word_last,
  input  logic         word_rd
);
  localparam int unsigned NW = 128 / W;
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic [IW-1:0] idx;
  logic          at_end;

  assign at_end     = (idx == IW'(NW - 1));
  assign word_valid = blk_valid;
  assign word       = blk_data[127 - W*idx -: W];
  assign word_last  = blk_last && at_end;
  assign blk_rd     = word_rd && at_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       idx <= '0;
    else if (word_rd) idx <= at_end ? '0 : idx + 1'b1;
  end

  initial assert (W <= 128 && 128 % W == 0) else $error("block_splitter: W must divide 128");
endmodule
