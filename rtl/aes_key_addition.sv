// aes_key_addition -- KeyAddition: bitwise XOR of the 128-bit state with the
// 128-bit subkey of the current round. Combinational, as in the original
// architecture.
module aes_key_addition (
  input  aes_pkg::block_t d,
  input  aes_pkg::block_t sk,
  output aes_pkg::block_t q
);
  assign q = d ^ sk;
endmodule
