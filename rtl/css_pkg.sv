// css_pkg: types and constants shared by the computational secret sharing (CSS) core.
//
// The packet header travels beside the data through every buffer. It identifies a packet,
// numbers its fragments and says whether the sharing side must take a fresh AES key for it.
// Its layout (64 bits) is a choice of this design; the header fields themselves only serve
// fragmenting, identification and the new-key decision, as the architecture requires.
//
// gf_low_poly() gives the low part r(x) of the field polynomial x^W + r(x) for each supported
// word width. Low-weight irreducible polynomials keep the reduction a handful of fixed XORs;
// the particular polynomials are standard low-weight choices picked by this design.
package css_pkg;

  // Polynomial coefficients source of the share generation / reconstruction units.
  typedef enum logic {
    MODE_SHAMIR = 1'b0,  // perfect secret sharing: c0 = secret, higher coefficients random
    MODE_IDS    = 1'b1   // information dispersal: all k coefficients are secret words
  } ss_mode_e;

  typedef struct packed {
    logic [31:0] pkt_id;   // packet identification, also the AES-CTR nonce
    logic [15:0] frag;     // fragment number of the packet within a file
    logic [14:0] rsvd;
    logic        new_key;  // sharing side: load a fresh AES key for this packet
  } css_hdr_t;

  // r(x) of x^W + r(x):  8: x^8+x^4+x^3+x+1, 16: x^16+x^5+x^3+x+1, 32: x^32+x^7+x^3+x^2+1,
  // 64: x^64+x^4+x^3+x+1, 128: x^128+x^7+x^2+x+1.
  function automatic logic [127:0] gf_low_poly(input int unsigned w);
    case (w)
      8:       return 128'h1B;
      16:      return 128'h2B;
      32:      return 128'h8D;
      64:      return 128'h1B;
      128:     return 128'h87;
      default: return 128'h0;
    endcase
  endfunction

endpackage
