// karatsuba_mul: W x W carry-less polynomial multiplier using Karatsuba's algorithm.
//
// For W above BASE_W the operands are split into halves a = a1*x^h + a0, b = b1*x^h + b0 and
// the product is formed from three half-size products:
//   a*b = a1b1*x^2h + ((a1+a0)(b1+b0) + a1b1 + a0b0)*x^h + a0b0      (+ is XOR)
// Each half-size product is again a karatsuba_mul, so the recursion continues until BASE_W
// bits, where a schoolbook multiplier (clmul) is used. The default BASE_W of 16 is the
// sub-multiplier size at which the recursion stops in the reference design. W must be
// BASE_W times a power of two. With USE_DSP set, the base multipliers are dsp_base_mul, which
// do most of their work in DSP-based 9 x 6 polynomial multipliers (4 per 16 x 16 block);
// otherwise they are plain logic. The output is the unreduced 2W-1 bit product; combinational.
// Note on lint: when this module is linted on its own as the top, Verilator does not
// elaborate its self-instances and reports p_hi/p_lo/p_mid as undriven; they are driven by
// the u_hi/u_lo/u_mid instances, and the recursion elaborates and simulates normally when
// the module is instantiated (as in sru_subrec and the testbench).
module karatsuba_mul #(
  parameter int unsigned W      = 64,
  parameter int unsigned BASE_W = 16,
  parameter bit          USE_DSP = 1'b0
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  if (W <= BASE_W) begin : g_base
    if (USE_DSP) begin : g_dsp
      dsp_base_mul #(.W(W)) u_base (.a(a), .b(b), .p(p));
    end else begin : g_lut
      clmul #(.AW(W), .BW(W)) u_base (.a(a), .b(b), .p(p));
    end
  end else begin : g_split
    localparam int unsigned H = W / 2;
    logic [2*H-2:0] p_hi, p_lo, p_mid;
    logic [H-1:0]   a_s, b_s;

    assign a_s = a[W-1:H] ^ a[H-1:0];
    assign b_s = b[W-1:H] ^ b[H-1:0];

    karatsuba_mul #(.W(H), .BASE_W(BASE_W), .USE_DSP(USE_DSP)) u_hi  (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hi));
    karatsuba_mul #(.W(H), .BASE_W(BASE_W), .USE_DSP(USE_DSP)) u_lo  (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_lo));
    karatsuba_mul #(.W(H), .BASE_W(BASE_W), .USE_DSP(USE_DSP)) u_mid (.a(a_s),      .b(b_s),      .p(p_mid));

    always_comb begin
      p = '0;
      p[2*H-2:0]    = p_lo;
      p[2*W-2:2*H]  = p_hi;
      p[H +: 2*H-1] = p[H +: 2*H-1] ^ p_mid ^ p_hi ^ p_lo;
    end

    initial assert (W % 2 == 0) else $error("karatsuba_mul: W must be even above BASE_W");
  end
endmodule
