// aes_ref_pkg -- reference model of AES-128 used by the testbenches.
//
// Written independently of the RTL: the state is a 4x4 byte array, the
// S-box inverse is found by exhaustive search for the byte b with a*b = 1,
// the affine map is applied bit by bit from its matrix definition, and the
// column mixers use a generic GF(2^8) multiply. It also carries the
// published AES-128 test vectors the testbenches check against.
package aes_ref_pkg;

  typedef logic [7:0] st_t [4][4];   // [row][col]

  // FIPS-197 Appendix B and C.1 examples.
  localparam logic [127:0] KEY_B = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] PT_B  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] CT_B  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam logic [127:0] RK10_B = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
  localparam logic [127:0] KEY_C = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] PT_C  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] CT_C  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  function automatic st_t to_st(logic [127:0] w);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = w[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] w;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        w[127 - 8*(4*c + r) -: 8] = s[r][c];
    return w;
  endfunction

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = 16'h0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  // Tables filled on first use.
  logic [7:0] sb_tab [256];
  logic [7:0] isb_tab [256];
  bit         tabs_ready = 1'b0;

  function automatic void build_tables();
    logic [7:0] c = 8'h63;
    for (int a = 0; a < 256; a++) begin
      logic [7:0] inv = 8'h00, y;
      for (int b = 1; b < 256; b++) if (mul(8'(a), 8'(b)) == 8'h01) inv = 8'(b);
      for (int i = 0; i < 8; i++)
        y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
      sb_tab[a]  = y;
      isb_tab[y] = 8'(a);
    end
    tabs_ready = 1'b1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    if (!tabs_ready) build_tables();
    return sb_tab[a];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] a);
    if (!tabs_ready) build_tables();
    return isb_tab[a];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] w, bit inverse);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = inverse ? inv_sbox(w[8*i +: 8]) : sbox(w[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] w, bit inverse);
    st_t s = to_st(w), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inverse) o[r][(c + r) % 4] = s[r][c];
        else         o[r][c] = s[r][(c + r) % 4];
    return from_st(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] w, bit inverse);
    st_t s = to_st(w), o;
    logic [7:0] m [4] = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) o[r][c] ^= mul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(o);
  endfunction

  // Round keys 0..10 of the AES-128 key expansion, word by word.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
