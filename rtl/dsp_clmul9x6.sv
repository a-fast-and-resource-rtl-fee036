// dsp_clmul9x6: 9 x 6 bit carry-less (polynomial) multiplier made from one integer
// multiplier of the size of an FPGA DSP slice (25 x 18 bits).
//
// The operand bits are spread three bit positions apart: A = sum a_i 2^(3i) (25 bits),
// B = sum b_j 2^(3j) (16 bits). The integer product is then sum_k n_k 2^(3k), where n_k is the
// number of pairs i + j = k with a_i = b_j = 1. As n_k <= 6 < 8, no carry ever reaches the next
// group of three bits, and bit 3k of the product is the parity of n_k, which is exactly bit k
// of the polynomial product. All other product bits, those that carries affect, are skipped.
// Combinational. The technique (a 18x25 DSP multiplier used as a 9x6 polynomial multiplier by
// skipping carry-affected bits) follows the reference design; the bit spacing is worked out
// here.
module dsp_clmul9x6 (
  input  logic [8:0]  a,
  input  logic [5:0]  b,
  output logic [13:0] p
);
  logic [24:0] as;
  logic [17:0] bs;
  logic [42:0] prod;

  always_comb begin
    as = '0;
    bs = '0;
    for (int i = 0; i < 9; i++) as[3*i] = a[i];
    for (int j = 0; j < 6; j++) bs[3*j] = b[j];
  end

  assign prod = 43'(as) * 43'(bs);

  always_comb begin
    for (int k = 0; k < 14; k++) p[k] = prod[3*k];
  end
endmodule
