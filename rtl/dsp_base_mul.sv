// dsp_base_mul: W x W carry-less base multiplier (W <= 16) that puts most of the partial
// products into DSP-based 9 x 6 polynomial multipliers (dsp_clmul9x6).
//
// Operand a is cut into 9-bit pieces, operand b into as many whole 6-bit pieces as fit; each
// pair is one DSP multiplier, and the products are XORed at their offsets. The rows of b that
// do not fill a 6-bit piece are added as ordinary AND/XOR partial products in logic. For
// W = 16 this uses 4 DSPs (a: 9 + 7 bits, b: 6 + 6 bits, 4 rows in logic), for W = 8 one DSP.
// The split into DSP tiles and logic rows is this design's; the reference only says that a
// 16 x 16 base multiplier was formed from the 9 x 6 DSP multipliers. Combinational.
module dsp_base_mul #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  localparam int unsigned NA = (W + 8) / 9;   // 9-bit pieces of a
  localparam int unsigned NB = W / 6;         // whole 6-bit pieces of b
  localparam int unsigned PW = 2*W + 16;      // room for padded pieces

  logic [13:0] tp [NA][NB];

  for (genvar ia = 0; ia < NA; ia++) begin : g_a
    for (genvar ib = 0; ib < NB; ib++) begin : g_b
      logic [8:0] ac;
      assign ac = 9'(a >> (9*ia));
      dsp_clmul9x6 u_dsp (.a(ac), .b(b[6*ib +: 6]), .p(tp[ia][ib]));
    end
  end

  logic [PW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int ia = 0; ia < NA; ia++)
      for (int ib = 0; ib < NB; ib++)
        acc[9*ia + 6*ib +: 14] = acc[9*ia + 6*ib +: 14] ^ tp[ia][ib];
    for (int j = 6*NB; j < W; j++)
      if (b[j]) acc[j +: W] = acc[j +: W] ^ a;
    p = acc[2*W-2:0];
  end

  initial assert (W >= 6 && W <= 16) else $error("dsp_base_mul: W must be 6..16");
endmodule
