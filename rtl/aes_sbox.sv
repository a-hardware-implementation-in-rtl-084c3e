// aes_sbox -- one Rijndael S-box, a 256 x 8-bit lookup table.
//
// Each S-box is a plain read-only table, the way an FPGA maps it onto a
// block ROM or LUTs. INVERSE=0 gives the S-box used by Substitution,
// INVERSE=1 the inverse S-box used by InvSubstitution. The table contents
// are computed at elaboration by aes_pkg::make_sbox() from the S-box
// definition instead of being listed. Purely combinational: y follows a.
// The 256 x 8 table per S-box follows the original architecture; computing
// the contents at elaboration is this design's choice.
module aes_sbox #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] a,
  output logic [7:0] y
);
  import aes_pkg::*;

  localparam logic [255:0][7:0] TABLE = make_sbox(INVERSE);

  assign y = TABLE[a];
endmodule
