// aes_inv_mix_column -- InvMixColumn: each column is multiplied in GF(2^8)
// by the circulant matrix with first row {0e 0b 0d 09}, the inverse of
// MixColumn.
//
// With x2 = {02}a, x4 = {04}a, x8 = {08}a (repeated xtime):
//   {09}a = x8^a, {0b}a = x8^x2^a, {0d}a = x8^x4^a, {0e}a = x8^x4^x2.
// This is the deeper of the two column mixers, on the decryption critical
// path. Combinational. The matrix is the AES standard's; the shared xtime
// chain is this design's choice.
module aes_inv_mix_column (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4], m9 [4], mb [4], md [4], me [4];
      for (int r = 0; r < 4; r++) begin
        logic [7:0] x2, x4, x8;
        a[r]  = d[127-8*(r+4*c) -: 8];
        x2    = xtime(a[r]);
        x4    = xtime(x2);
        x8    = xtime(x4);
        m9[r] = x8 ^ a[r];
        mb[r] = x8 ^ x2 ^ a[r];
        md[r] = x8 ^ x4 ^ a[r];
        me[r] = x8 ^ x4 ^ x2;
      end
      for (int r = 0; r < 4; r++)
        q[127-8*(r+4*c) -: 8] = me[r] ^ mb[(r+1)%4] ^ md[(r+2)%4] ^ m9[(r+3)%4];
    end
  end
endmodule
