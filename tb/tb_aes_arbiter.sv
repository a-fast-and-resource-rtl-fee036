// tb_aes_arbiter: checks the AES arbiter with modelled buffers and a 22-cycle model of the
// AES pipeline (PKT_BLOCKS = 4). Three sharing packets and three reconstruction packets wait
// at once; the destination buffers have room for two packets each and are not drained at
// first. Checked: each sharing packet is issued as a key block (bypass, start, new key only
// when its header asks, with new_key_rd) followed by its blocks in order; each
// reconstruction packet pops its key block into the key register and then issues its
// blocks; both sides alternate; no packet starts without room for all of it, counting
// blocks still in the pipeline; the third packets start once room is made.
module tb_aes_arbiter;
  import css_pkg::*;
  localparam int PKT = 4, FW = 8;

  logic          clk = 0, rst_n = 0;
  logic [FW-1:0] secin_pkts, sgubuf_free, srubuf_pkts, secout_free;
  logic          secin_valid, secin_last, secin_rd;
  logic [127:0]  secin_data;
  css_hdr_t      secin_hdr;
  logic [127:0]  new_key;
  logic          new_key_rd;
  logic          srubuf_valid, srubuf_last, srubuf_rd;
  logic [127:0]  srubuf_data;
  css_hdr_t      srubuf_hdr;
  logic          aes_side, aes_start, aes_ld_key, aes_valid, aes_bypass, aes_last;
  logic [127:0]  aes_key, aes_data;
  css_hdr_t      aes_hdr;
  logic          aes_out_valid, aes_out_side, busy;
  int checks = 0, failures = 0;

  aes_arbiter #(.PKT_BLOCKS(PKT), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  // ---- modelled buffers: block queues, 3 packets each
  typedef struct {
    logic [127:0] data;
    logic         last;
    css_hdr_t     hdr;
  } blk_t;
  blk_t secin_q [$], srub_q [$];
  int   secin_np = 3, srub_np = 3;
  int   sgub_cap = 2 * (PKT + 1), secout_cap = 2 * PKT;
  int   sgub_fill = 0, secout_fill = 0;

  assign secin_pkts   = FW'(secin_np);
  assign secin_valid  = secin_q.size() > 0;
  assign secin_data   = secin_valid ? secin_q[0].data : '0;
  assign secin_last   = secin_valid ? secin_q[0].last : 1'b0;
  assign secin_hdr    = secin_valid ? secin_q[0].hdr : '0;
  assign srubuf_pkts  = FW'(srub_np);
  assign srubuf_valid = srub_q.size() > 0;
  assign srubuf_data  = srubuf_valid ? srub_q[0].data : '0;
  assign srubuf_last  = srubuf_valid ? srub_q[0].last : 1'b0;
  assign srubuf_hdr   = srubuf_valid ? srub_q[0].hdr : '0;
  assign sgubuf_free  = FW'(sgub_cap - sgub_fill);
  assign secout_free  = FW'(secout_cap - secout_fill);
  assign new_key      = 128'hC0FFEE;

  // ---- 22-cycle pipeline model
  logic [21:0] pv = '0, ps = '0;
  assign aes_out_valid = pv[21];
  assign aes_out_side  = ps[21];

  // expected issue streams
  blk_t exp_enc [$], exp_dec [$];
  logic pop_secin = 0, pop_srub = 0;
  int   enc_started = 0, dec_started = 0;
  int   order [$];   // 0 = sharing packet, 1 = reconstruction packet, in grant order

  always @(posedge clk) begin
    if (rst_n) begin
      pv <= {pv[20:0], aes_valid};
      ps <= {ps[20:0], aes_side};
      if (aes_out_valid && !aes_out_side) sgub_fill++;
      if (aes_out_valid && aes_out_side)  secout_fill++;
      if (sgub_fill > sgub_cap || secout_fill > secout_cap) begin
        failures++; $display("FAIL: buffer overflow %0d %0d", sgub_fill, secout_fill);
      end
      if (aes_start) begin
        order.push_back(int'(aes_side));
        if (aes_side) dec_started++; else enc_started++;
      end
      // sharing side
      if (aes_valid && !aes_side) begin
        blk_t e;
        e = exp_enc.pop_front();
        checks++;
        if (aes_bypass != aes_start || aes_data !== (aes_bypass ? aes_data : e.data) ||
            (!aes_bypass && aes_last !== e.last) || aes_hdr !== e.hdr) begin
          failures++; $display("FAIL enc issue: %h last %0d", aes_data, aes_last);
        end
        if (aes_bypass) begin
          checks++;
          if (aes_ld_key !== e.hdr.new_key || new_key_rd !== e.hdr.new_key ||
              aes_key !== new_key) begin
            failures++; $display("FAIL key block: ld %0d rd %0d", aes_ld_key, new_key_rd);
          end
        end
        if (secin_rd) pop_secin <= 1;
        if (secin_rd && secin_last) secin_np--;
      end
      // reconstruction side
      if (aes_side && aes_start) begin
        blk_t e;
        e = exp_dec.pop_front();
        checks++;
        if (aes_valid || !aes_ld_key || aes_key !== e.data || !srubuf_rd) begin
          failures++; $display("FAIL dec key pop");
        end
        pop_srub <= 1;
      end else if (aes_valid && aes_side) begin
        blk_t e;
        e = exp_dec.pop_front();
        checks++;
        if (aes_data !== e.data || aes_last !== e.last || aes_hdr !== e.hdr || aes_bypass) begin
          failures++; $display("FAIL dec issue: %h", aes_data);
        end
        pop_srub <= 1;
        if (aes_last) srub_np--;
      end
    end
  end

  always @(negedge clk) begin
    if (pop_secin) void'(secin_q.pop_front());
    if (pop_srub)  void'(srub_q.pop_front());
    pop_secin <= 0;
    pop_srub  <= 0;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b;
    for (int p = 0; p < 3; p++) begin
      b.hdr = '{pkt_id: 32'(p), frag: '0, rsvd: '0, new_key: (p != 1)};
      exp_enc.push_back(b);  // key block entry (data not compared)
      for (int i = 0; i < PKT; i++) begin
        b.data = {$urandom, $urandom, $urandom, $urandom}; b.last = (i == PKT - 1);
        secin_q.push_back(b); exp_enc.push_back(b);
      end
      b.hdr = '{pkt_id: 32'(100 + p), frag: '0, rsvd: '0, new_key: 1'b0};
      b.data = {$urandom, $urandom, $urandom, $urandom}; b.last = 0;
      srub_q.push_back(b); exp_dec.push_back(b);
      for (int i = 0; i < PKT; i++) begin
        b.data = {$urandom, $urandom, $urandom, $urandom}; b.last = (i == PKT - 1);
        srub_q.push_back(b); exp_dec.push_back(b);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (120) @(negedge clk);
    checks++;
    if (enc_started != 2 || dec_started != 2) begin
      failures++;
      $display("FAIL: %0d/%0d packets started with room for two", enc_started, dec_started);
    end
    checks++;
    if (order.size() < 4 || order[0] == order[1] || order[1] == order[2] || order[2] == order[3])
    begin
      failures++; $display("FAIL: sides did not alternate");
    end
    // make room: drain the destination buffers
    sgub_fill = 0; secout_fill = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (enc_started != 3 || dec_started != 3 || exp_enc.size() != 0 || exp_dec.size() != 0) begin
      failures++; $display("FAIL: not all packets issued after room was made");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
