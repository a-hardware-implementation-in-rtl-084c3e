// aes_inv_substitution -- InvSubstitution: sixteen identical inverse S-boxes working in
// parallel, one per byte of the 128-bit state.
//
// Each byte of d goes through its own 256 x 8 table (aes_sbox with
// INVERSE=1). Combinational; no clock. Sixteen identical tables in parallel
// follow the original architecture.
module aes_inv_substitution (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  for (genvar i = 0; i < 16; i++) begin : g_box
    aes_sbox #(.INVERSE(1'b1)) u_sbox (.a(d[8*i +: 8]), .y(q[8*i +: 8]));
  end
endmodule
