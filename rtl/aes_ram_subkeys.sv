// aes_ram_subkeys -- RAMSubKeys: DEPTH x WIDTH single-port RAM (11 x 128 bit)
// holding the cipher key at location 0 and subkey i at location i.
//
// Synchronous write when we is high; the read data is registered, so rdata
// shows the word at addr one clock later, as in an FPGA block RAM. A write
// also returns the written word (write-first). Addresses at or above DEPTH
// are ignored on write and read as zero. Contents are not reset. The size
// follows the original architecture; the single port, the registered read
// and the key at location 0 are this design's choices.
module aes_ram_subkeys #(
  parameter int unsigned DEPTH = 11,
  parameter int unsigned WIDTH = 128
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (32'(addr) < DEPTH) begin
      if (we) begin
        mem[addr] <= wdata;
        rdata     <= wdata;
      end else begin
        rdata <= mem[addr];
      end
    end else begin
      rdata <= '0;
    end
  end
endmodule
