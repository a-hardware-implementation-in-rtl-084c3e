// aes_pkg -- types, constants and GF(2^8) helper functions shared by the
// Rijndael (AES-128) encryption/decryption circuit.
//
// The 128-bit state is kept as one packed word. Byte i of the word sits at
// bits [127-8*i -: 8] and the state is filled column by column, so byte i is
// row (i mod 4), column (i div 4): the ordering of the AES standard. The
// 16-bit I/O channels move the word most significant half-word first.
//
// The S-box tables are not typed in: make_sbox() computes them at
// elaboration from the definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, then the affine map with constant 8'h63).
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [3:0]   key_idx_t;   // RAMSubKeys address, 0..10

  localparam int unsigned NR        = 10;  // rounds for a 128-bit key

  // Byte i (0..15) of a state word.
  function automatic logic [7:0] get_byte(block_t s, int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  // Multiply by x (i.e. {02}) in GF(2^8).
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    logic [7:0] x = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int k = 7; k >= 0; k--) begin
      r = gf_mul(r, r);
      if (k != 0) r = gf_mul(r, a);   // exponent 254 = 8'b1111_1110
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] a, int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  // Forward S-box value of one byte.
  function automatic logic [7:0] sbox_value(logic [7:0] a);
    logic [7:0] b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Whole 256-entry table; entry v at bits [8*v +: 8]. inverse=1 gives the
  // inverse S-box.
  function automatic logic [255:0][7:0] make_sbox(bit inverse);
    logic [255:0][7:0] t;
    for (int v = 0; v < 256; v++) begin
      logic [7:0] s = sbox_value(8'(v));
      if (inverse) t[s] = 8'(v);
      else         t[v] = s;
    end
    return t;
  endfunction

endpackage
