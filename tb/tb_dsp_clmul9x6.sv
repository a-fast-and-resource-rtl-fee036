// tb_dsp_clmul9x6: exhaustive check of the DSP-based 9 x 6 polynomial multiplier (all 2^15
// operand pairs) against a bit-by-bit carry-less product, then random checks of the
// 16 x 16 and 8 x 8 base multipliers built from it. A step counter drives the operands on
// the rising clock edge; the results are compared on the falling edge.
module tb_dsp_clmul9x6;
  import gf_ref_pkg::*;

  localparam int EXH = 32768;
  localparam int RND = 2000;

  logic        clk = 1'b0;
  int          n = 0;
  logic [8:0]  a;
  logic [5:0]  b;
  logic [13:0] p;
  logic [15:0] a16, b16;
  logic [30:0] p16;
  logic [7:0]  a8, b8;
  logic [14:0] p8;
  int checks = 0, failures = 0;

  dsp_clmul9x6 dut (.a(a), .b(b), .p(p));
  dsp_base_mul #(.W(16)) u16 (.a(a16), .b(b16), .p(p16));
  dsp_base_mul #(.W(8))  u8  (.a(a8),  .b(b8),  .p(p8));

  always #1 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operands
  always @(posedge clk) begin
    n <= n + 1;
    a <= n[14:6];
    b <= n[5:0];
    a16 <= (n == 0) ? '1 : 16'($urandom);
    b16 <= (n == 0) ? '1 : 16'($urandom);
    a8  <= (n == 0) ? '1 : 8'($urandom);
    b8  <= (n == 0) ? '1 : 8'($urandom);
  end

  // checks
  always @(negedge clk) begin
    elem_t r;
    if (n >= 1 && n <= EXH) begin
      r = clmul_ref(a, b, 9);
      checks++;
      if (p !== r[13:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 9x6: %h * %h = %h, expected %h", a, b, p, r[13:0]);
      end
    end
    if (n >= 1 && n <= RND) begin
      r = clmul_ref(a16, b16, 16);
      checks++;
      if (p16 !== r[30:0]) begin
        failures++; $display("FAIL 16x16: %h * %h = %h, expected %h", a16, b16, p16, r[30:0]);
      end
      r = clmul_ref(a8, b8, 8);
      checks++;
      if (p8 !== r[14:0]) begin
        failures++; $display("FAIL 8x8: %h * %h = %h, expected %h", a8, b8, p8, r[14:0]);
      end
    end
    if (n > EXH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
