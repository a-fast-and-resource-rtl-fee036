// tb_aes128_pipe: checks the pipelined AES-128 core with known-answer vectors (the two
// examples of FIPS-197 and further vectors from an independent AES implementation), issued
// back to back with different keys, then with gaps. Checks the ciphertexts, that the tag
// travels with its block, the 22-cycle latency and one block per cycle.
module tb_aes128_pipe;
  localparam int NV = 5;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0;
  logic [127:0] in_block = '0, in_key = '0;
  logic [7:0]   in_tag = '0;
  logic         out_valid;
  logic [127:0] out_block;
  logic [7:0]   out_tag;
  int checks = 0, failures = 0;

  aes128_pipe #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;

  logic [127:0] kv [NV], pv [NV], cv [NV];
  initial begin
    kv[0] = 128'h000102030405060708090a0b0c0d0e0f;
    pv[0] = 128'h00112233445566778899aabbccddeeff;
    cv[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    kv[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pv[1] = 128'h3243f6a8885a308d313198a2e0370734;
    cv[1] = 128'h3925841d02dc09fbdc118597196a0b32;
    kv[2] = 128'h52f22665a60c12d289185d950ee88136;
    pv[2] = 128'h09166f6b113d178d6c0fd3901ff239a1;
    cv[2] = 128'h447bb5b7aad1fea99e3b9f207d32575e;
    kv[3] = 128'ha095f20f9395650cf9380b8edb224a6b;
    pv[3] = 128'h248a1e924e8fd0ae2e1a9492a3305f18;
    cv[3] = 128'h3cae5cb5928013f56b94dad7ccff0662;
    kv[4] = 128'h8cb610900f9e347fae886dc6507795ec;
    pv[4] = 128'h745c4c3fcb2eb2c73e14934c867ee057;
    cv[4] = 128'h88165e09ea288663c16c0e953e85bdf7;
  end

  int cycle = 0;
  int issue_cycle [$];
  int n_out = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) issue_cycle.push_back(cycle);
    if (rst_n && out_valid) begin
      int idx, lat;
      idx = int'(out_tag) % NV;
      lat = cycle - issue_cycle.pop_front();
      checks += 2;
      if (out_block !== cv[idx]) begin
        failures++;
        $display("FAIL vector %0d: %h expected %h", idx, out_block, cv[idx]);
      end
      if (lat != 22) begin
        failures++;
        $display("FAIL latency %0d, expected 22", lat);
      end
      n_out++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // back to back, keys changing every cycle
    for (int i = 0; i < 3 * NV; i++) begin
      @(negedge clk);
      in_valid = 1; in_tag = 8'(i); in_key = kv[i % NV]; in_block = pv[i % NV];
    end
    @(negedge clk);
    in_valid = 0; in_key = '1; in_block = '1;
    // with gaps
    for (int i = 0; i < NV; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      in_valid = 1; in_tag = 8'(i); in_key = kv[i]; in_block = pv[i];
      @(negedge clk);
      in_valid = 0; in_key = '0; in_block = '0;
    end
    repeat (30) @(negedge clk);
    checks++;
    if (n_out != 4 * NV) begin
      failures++; $display("FAIL: %0d blocks out, expected %0d", n_out, 4 * NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
