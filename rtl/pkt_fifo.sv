// pkt_fifo: packet buffer, a first-word-fall-through FIFO that also counts whole packets.
//
// Every buffer of the CSS core (secret in/out, SGU and SRU buffers, share in/out buffers) is
// one of these. Each entry stores a data word, its end-of-packet flag and the packet header,
// so the header leaves together with every word of its packet. pkt_count is the number of
// complete packets inside (incremented when a last word is written, decremented when one is
// read); the controllers start a packet only when it is complete and the destination has
// `free` entries for all of it, so no packet ever stalls half way.
// Interface: valid/ready on both sides; a word moves when valid and ready are both high.
// out_* shows the oldest entry combinationally. DEPTH must be a power of two.
module pkt_fifo
  import css_pkg::*;
#(
  parameter int unsigned DW    = 128,
  parameter int unsigned DEPTH = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [DW-1:0]          in_data,
  input  logic                   in_last,
  input  css_hdr_t               in_hdr,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [DW-1:0]          out_data,
  output logic                   out_last,
  output css_hdr_t               out_hdr,
  output logic [$clog2(DEPTH):0] count,
  output logic [$clog2(DEPTH):0] free,
  output logic [$clog2(DEPTH):0] pkt_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    css_hdr_t      hdr;
    logic          last;
    logic [DW-1:0] data;
  } entry_t;

  entry_t      mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        do_wr, do_rd;

  assign count     = wr_ptr - rd_ptr;
  assign free      = (AW+1)'(DEPTH) - count;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  assign out_data = mem[rd_ptr[AW-1:0]].data;
  assign out_last = mem[rd_ptr[AW-1:0]].last;
  assign out_hdr  = mem[rd_ptr[AW-1:0]].hdr;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= '{hdr: in_hdr, last: in_last, data: in_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      pkt_count <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      pkt_count <= pkt_count + (AW+1)'(do_wr && in_last) - (AW+1)'(do_rd && out_last);
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("pkt_fifo: DEPTH must be a power of two");
endmodule
