// tb_peu: checks one polynomial evaluation unit. Random polynomials of K = 4 coefficients
// are fed from c_3 down to c_0, one per cycle, some with idle cycles in between; the share
// presented in the cycle of c_0 must equal f(x) evaluated term by term.
module tb_peu;
  import gf_ref_pkg::*;
  localparam int W = 64, XW = 8, K = 4;

  logic          clk = 0, rst_n = 0;
  logic [XW-1:0] x;
  logic          coef_valid = 0, first = 0;
  logic [W-1:0]  coef = '0, share;
  int checks = 0, failures = 0;

  peu #(.W(W), .XW(XW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t  c;
    elem_t exp;
    x = 8'h02;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      x = (p % 7 == 0) ? 8'hFF : XW'($urandom_range(1, 255));
      for (int i = 0; i < K; i++) c[i] = elem_t'({$urandom, $urandom});
      if (p == 1) for (int i = 0; i < K; i++) c[i] = '1;
      for (int i = K - 1; i >= 0; i--) begin
        @(negedge clk);
        coef_valid = 1; first = (i == K - 1); coef = c[i][W-1:0];
        if (i == 0) begin
          #1;
          exp = poly_eval(c, K, elem_t'(x), W);
          checks++;
          if (share !== exp[W-1:0]) begin
            failures++;
            $display("FAIL poly %0d x=%h: share %h expected %h", p, x, share, exp[W-1:0]);
          end
        end
        if (p % 5 == 0 && i == 2) begin
          @(negedge clk); coef_valid = 0;   // idle cycle inside a polynomial
        end
      end
      @(negedge clk); coef_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
