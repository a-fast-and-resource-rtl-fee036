// tb_pkt_fifo: checks the packet buffer against a queue model with random pushes and pops
// (DEPTH = 16, so it runs full and empty often): data, last flag and header order, the
// count/free/whole-packet counters, and that ready drops when full and valid when empty.
module tb_pkt_fifo;
  import css_pkg::*;
  localparam int DW = 32, DEPTH = 16;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, in_ready, in_last = 0;
  logic [DW-1:0] in_data = '0;
  css_hdr_t      in_hdr = '0;
  logic          out_valid, out_ready = 0, out_last;
  logic [DW-1:0] out_data;
  css_hdr_t      out_hdr;
  logic [4:0]    count, free, pkt_count;
  int checks = 0, failures = 0;

  pkt_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  typedef struct packed {
    css_hdr_t      hdr;
    logic          last;
    logic [DW-1:0] data;
  } ent_t;
  ent_t model [$];
  int   model_pkts = 0;
  int   full_seen = 0, empty_seen = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(count) != model.size() || int'(free) != DEPTH - model.size() ||
          int'(pkt_count) != model_pkts || in_ready != (model.size() < DEPTH) ||
          out_valid != (model.size() > 0)) begin
        failures++;
        $display("FAIL status: count %0d free %0d pkts %0d ready %0d valid %0d, model %0d/%0d",
                 count, free, pkt_count, in_ready, out_valid, model.size(), model_pkts);
      end
      if (model.size() == DEPTH) full_seen++;
      if (model.size() == 0) empty_seen++;
      if (out_valid && out_ready) begin
        ent_t e;
        e = model.pop_front();
        checks++;
        if (out_data !== e.data || out_last !== e.last || out_hdr !== e.hdr) begin
          failures++;
          $display("FAIL data: %h %0d %h expected %h %0d %h", out_data, out_last, out_hdr,
                   e.data, e.last, e.hdr);
        end
        if (e.last) model_pkts--;
      end
      if (in_valid && in_ready) begin
        model.push_back('{hdr: in_hdr, last: in_last, data: in_data});
        if (in_last) model_pkts++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pkt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, balanced
      in_valid  = ($urandom_range(0, 99) < ((i / 250) % 3 == 0 ? 80 : (i / 250) % 3 == 1 ? 20 : 50));
      out_ready = ($urandom_range(0, 99) < ((i / 250) % 3 == 0 ? 20 : (i / 250) % 3 == 1 ? 80 : 50));
      in_data   = $urandom;
      in_last   = ($urandom_range(0, 4) == 0);
      in_hdr    = '{pkt_id: 32'(pkt), frag: 16'($urandom), rsvd: '0, new_key: 1'($urandom)};
      if (in_valid && in_last) pkt++;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 0;
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin
      failures++; $display("FAIL: full %0d / empty %0d never reached", full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
