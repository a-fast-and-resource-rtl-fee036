// tb_gf_reduce: checks the reduction circuit. A full product a*b of two field elements is
// reduced and compared with the bit-serial field multiplication of the reference package,
// for each supported word width (8, 16, 32, 64, 128 bits). A product is formed here with the
// reference carry-less multiply (128-bit products by splitting into 64-bit halves).
module tb_gf_reduce;
  import gf_ref_pkg::*;

  logic [14:0]  d8;   logic [7:0]   q8;
  logic [30:0]  d16;  logic [15:0]  q16;
  logic [62:0]  d32;  logic [31:0]  q32;
  logic [126:0] d64;  logic [63:0]  q64;
  logic [254:0] d128; logic [127:0] q128;
  int checks = 0, failures = 0;

  gf_reduce #(.W(8))   u8   (.d(d8),   .q(q8));
  gf_reduce #(.W(16))  u16  (.d(d16),  .q(q16));
  gf_reduce #(.W(32))  u32  (.d(d32),  .q(q32));
  gf_reduce #(.W(64))  u64  (.d(d64),  .q(q64));
  gf_reduce #(.W(128)) u128 (.d(d128), .q(q128));

  function automatic logic [254:0] clmul128(input elem_t a, input elem_t b);
    logic [254:0] r;
    r = '0;
    for (int i = 0; i < 128; i++) if (b[i]) r[i +: 128] = r[i +: 128] ^ a;
    return r;
  endfunction

  task automatic check(input int w, input elem_t got, input elem_t exp, input elem_t a,
                       input elem_t b);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL w=%0d: %h*%h reduced to %h, expected %h", w, a, b, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t a, b, p;
    for (int i = 0; i < 200; i++) begin
      a = rand128(); b = rand128();
      if (i == 0) begin a = '1; b = '1; end
      p = clmul_ref(a & mask(8), b & mask(8), 8);    d8  = p[14:0];
      p = clmul_ref(a & mask(16), b & mask(16), 16); d16 = p[30:0];
      p = clmul_ref(a & mask(32), b & mask(32), 32); d32 = p[62:0];
      p = clmul_ref(a & mask(64), b & mask(64), 64); d64 = p[126:0];
      d128 = clmul128(a, b);
      #1;
      check(8,   elem_t'(q8),   gf_mul(a, b, 8),   a & mask(8),  b & mask(8));
      check(16,  elem_t'(q16),  gf_mul(a, b, 16),  a & mask(16), b & mask(16));
      check(32,  elem_t'(q32),  gf_mul(a, b, 32),  a & mask(32), b & mask(32));
      check(64,  elem_t'(q64),  gf_mul(a, b, 64),  a & mask(64), b & mask(64));
      check(128, q128,          gf_mul(a, b, 128), a, b);
    end
    // AES field: {57}*{83} = {c1} (FIPS-197 4.2)
    d8 = 15'(clmul_ref(128'h57, 128'h83, 8)); #1;
    check(8, elem_t'(q8), 128'hc1, 128'h57, 128'h83);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
