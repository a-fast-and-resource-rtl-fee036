// gf_reduce: reduction of a polynomial product modulo the field polynomial x^W + r(x).
//
// The input holds a polynomial of up to IN_W bits (at most 2W-1). Each bit at position i >= W
// stands for x^i = x^(i-W) * r(x), so it is folded back by XORing r(x) shifted by i-W. The
// bits are folded from the top down, so bits created by a fold are folded again. Because
// r(x) has low weight and low degree, the whole circuit is a fixed XOR network.
// Combinational.
module gf_reduce #(
  parameter int unsigned W    = 64,
  parameter int unsigned IN_W = 2*W-1
) (
  input  logic [IN_W-1:0] d,
  output logic [W-1:0]    q
);
  import css_pkg::*;
  localparam logic [127:0] R = gf_low_poly(W);
  localparam int unsigned RD = 8;  // all r(x) above have degree below 8

  logic [IN_W+RD-1:0] t;

  always_comb begin
    t = {{RD{1'b0}}, d};
    for (int i = IN_W - 1; i >= int'(W); i--) begin
      if (t[i]) begin
        t[i] = 1'b0;
        t[i-W +: RD] = t[i-W +: RD] ^ R[RD-1:0];
      end
    end
    q = t[W-1:0];
  end

  initial begin
    assert (R != 0) else $error("gf_reduce: unsupported word width %0d", W);
    assert (IN_W <= 2*W) else $error("gf_reduce: input wider than a product");
  end
endmodule
