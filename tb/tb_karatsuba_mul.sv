// tb_karatsuba_mul: checks the Karatsuba carry-less multiplier at 64 bits (three levels of
// recursion down to 16-bit schoolbook blocks), the same with DSP-based base blocks, and at
// 16 bits (base case only) against a bit-by-bit reference product, for corner values and
// random operands.
module tb_karatsuba_mul;
  import gf_ref_pkg::*;

  logic [63:0]  a64, b64;
  logic [126:0] p64;
  logic [15:0]  a16, b16;
  logic [30:0]  p16;
  int checks = 0, failures = 0;

  karatsuba_mul #(.W(64)) dut64 (.a(a64), .b(b64), .p(p64));
  karatsuba_mul #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  logic [126:0] p64d;
  karatsuba_mul #(.W(64), .USE_DSP(1'b1)) dut64d (.a(a64), .b(b64), .p(p64d));

  task automatic check64(input logic [63:0] a, input logic [63:0] b);
    elem_t exp;
    a64 = a; b64 = b; #1;
    exp = clmul_ref(a, b, 64);
    checks++;
    if (p64 !== exp[126:0]) begin
      failures++;
      $display("FAIL 64: %h * %h = %h, expected %h", a, b, p64, exp[126:0]);
    end
    checks++;
    if (p64d !== exp[126:0]) begin
      failures++;
      $display("FAIL 64 DSP: %h * %h = %h, expected %h", a, b, p64d, exp[126:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t e;
    check64(64'h0, 64'hFFFF_FFFF_FFFF_FFFF);
    check64(64'h1, 64'hDEAD_BEEF_0123_4567);
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    // (x+1)^2 = x^2+1 in GF(2)[x]
    check64(64'h3, 64'h3);
    for (int i = 0; i < 300; i++) check64({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 100; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      e = clmul_ref(a16, b16, 16);
      checks++;
      if (p16 !== e[30:0]) begin
        failures++;
        $display("FAIL 16: %h * %h = %h, expected %h", a16, b16, p16, e[30:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
