// tb_aes_ctr_unit: checks the counter-mode AES unit. The sharing side loads a key, sends the
// key block (bypass) and three payload blocks; the keystream AES(key, {header, count}) is
// taken from an independent AES implementation. The reconstruction side, with its own key
// register, decrypts the ciphertext back while the sharing side keeps its key, so the two key
// and count registers are checked to be separate. Latency 22 cycles.
module tb_aes_ctr_unit;
  import css_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         side = 0, start = 0, ld_key = 0;
  logic [127:0] key_in = '0;
  logic         in_valid = 0, in_bypass = 0, in_last = 0;
  css_hdr_t     in_hdr = '0;
  logic [127:0] in_data = '0;
  logic         out_valid, out_side, out_bypass, out_last;
  css_hdr_t     out_hdr;
  logic [127:0] out_data;
  int checks = 0, failures = 0;

  aes_ctr_unit dut (.*);

  always #5 clk = ~clk;

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] KS [3] = '{128'h1b1f9da4d94f1b0337498813de822e64,
                                      128'h39902b5de85052fff2ce2a25811d5d8a,
                                      128'h3f856ae248edaf185b0a91ec44dfb1f1};

  typedef struct {
    logic         side;
    logic         last;
    logic [127:0] data;
    int           cycle;
  } exp_t;
  exp_t exp_q [$];
  int   cycle = 0;
  logic [127:0] ct [3];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e.data || out_side !== e.side || out_last !== e.last ||
            cycle - e.cycle != 22 || out_hdr !== in_hdr_q) begin
          failures++;
          $display("FAIL: out %h side %0d last %0d after %0d cycles, expected %h %0d %0d 22",
                   out_data, out_side, out_last, cycle - e.cycle, e.data, e.side, e.last);
        end
      end
    end
  end

  css_hdr_t in_hdr_q;

  task automatic issue(input logic s, input logic st, input logic ld, input logic [127:0] k,
                       input logic byp, input logic lst, input logic [127:0] d,
                       input logic [127:0] expect_data);
    exp_t e;
    @(negedge clk);
    side = s; start = st; ld_key = ld; key_in = k; in_valid = 1; in_bypass = byp;
    in_last = lst; in_data = d;
    e.side = s; e.last = lst; e.data = expect_data; e.cycle = cycle;
    exp_q.push_back(e);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pt [3];
    in_hdr = '{pkt_id: 32'd5, frag: 16'd3, rsvd: '0, new_key: 1'b1};
    in_hdr_q = in_hdr;
    for (int i = 0; i < 3; i++) pt[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // sharing side: load key, key block, two payload blocks (counts 0, 1)
    issue(0, 1, 1, KEY, 1, 0, '0, KEY);
    issue(0, 0, 0, '0, 0, 0, pt[0], pt[0] ^ KS[0]);
    issue(0, 0, 0, '0, 0, 0, pt[1], pt[1] ^ KS[1]);
    // reconstruction side starts a packet with its own key and count register
    issue(1, 1, 1, KEY, 0, 0, pt[0] ^ KS[0], pt[0]);
    // sharing side continues at count 2 with its stored key (key_in is not loaded)
    issue(0, 0, 0, '1, 0, 1, pt[2], pt[2] ^ KS[2]);
    // reconstruction side continues at count 1
    issue(1, 0, 0, '1, 0, 1, pt[1] ^ KS[1], pt[1]);
    // a key block without a new key carries the stored sharing key
    issue(0, 1, 0, '1, 1, 0, '0, KEY);
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
