// aes_block_reg -- one of the pipeline registers R1, R2, R3: a WIDTH-bit
// register with a load enable and a `full` flag.
//
// `load` captures d and sets full; `clear` marks the contents consumed
// (load wins if both are high). The flag lets MainFSM fill R2 with the next
// block and park a finished result in R3 while the cipher works on another
// block. The flag is this design's addition.
module aes_block_reg #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             clear,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             full
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      full <= 1'b0;
    end else if (load) begin
      q    <= d;
      full <= 1'b1;
    end else if (clear) begin
      full <= 1'b0;
    end
  end
endmodule
