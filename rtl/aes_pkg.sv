// aes_pkg: AES-128 (FIPS-197) building blocks for the pipelined AES core.
//
// The S-box is not written out as a table: SBOX_TABLE is computed at elaboration from its
// definition, the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the
// affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The inverse is a^254.
// Byte order: byte 0 of a 128-bit state is bits [127:120]; byte 4c+r is row r, column c.
package aes_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = xtime(t);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] tbl;
    logic [7:0]    inv, sq, v;
    for (int x = 0; x < 256; x++) begin
      // a^254 = a^2 * a^4 * ... * a^128
      inv = 8'h01;
      sq  = 8'(x);
      for (int i = 1; i < 8; i++) begin
        sq  = gmul8(sq, sq);
        inv = gmul8(inv, sq);
      end
      if (x == 0) inv = 8'h00;
      v = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      tbl[x*8 +: 8] = v;
    end
    return tbl;
  endfunction

  localparam logic [2047:0] SBOX_TABLE = gen_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] b);
    return SBOX_TABLE[{b, 3'b000} +: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[i*8 +: 8] = sbox(s[i*8 +: 8]);
    return r;
  endfunction

  // byte index n (0 = most significant byte)
  function automatic logic [7:0] get_byte(input logic [127:0] s, input int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++)
        r[127 - 8*(4*c + rr) -: 8] = get_byte(s, 4*((c + rr) % 4) + rr);
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0]   a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2);
      a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // SubWord(RotWord(w)) ^ {rcon, 0, 0, 0}
  function automatic logic [31:0] key_core(input logic [31:0] w, input logic [7:0] rcon);
    logic [31:0] rw;
    rw = {w[23:0], w[31:24]};
    return {sbox(rw[31:24]) ^ rcon, sbox(rw[23:16]), sbox(rw[15:8]), sbox(rw[7:0])};
  endfunction

  // next round key from the previous one and the key_core word of its last column
  function automatic logic [127:0] next_round_key(input logic [127:0] k, input logic [31:0] t);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ t;
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0] ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [7:0] rcon(input int round);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < round; i++) r = xtime(r);
    return r;
  endfunction

endpackage
