// aes_mix_column -- MixColumn: each 4-byte column of the state is multiplied
// in GF(2^8) by the circulant matrix with first row {02 03 01 01}.
//
// Multiplication by {02} is xtime (shift plus conditional XOR of 8'h1b) and
// {03}a = {02}a ^ a, so each output byte is
//   b_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)   (row indices mod 4).
// Combinational. The matrix is the AES standard's; building it from xtime
// and XOR is this design's choice.
module aes_mix_column (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4];
      for (int r = 0; r < 4; r++) a[r] = d[127-8*(r+4*c) -: 8];
      for (int r = 0; r < 4; r++)
        q[127-8*(r+4*c) -: 8] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
                                ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
