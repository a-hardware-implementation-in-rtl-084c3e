// aes_output_fsm -- OutputFSM: sends a 128-bit result over the 16-bit output
// channel.
//
// `load` (only while busy is low) copies `blk` into a shift register; busy
// then stays high while the 128/BUS words go out, most significant first,
// each with a valid/ready handshake (a word moves on an edge where
// dout_valid and dout_ready are both high). busy falls on the edge that
// moves the last word, so the next block can be loaded in the following
// cycle. The handshake is this design's choice.
module aes_output_fsm #(
  parameter int unsigned BUS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  aes_pkg::block_t blk,
  input  logic            load,
  output logic            busy,
  output logic [BUS-1:0]  dout,
  output logic            dout_valid,
  input  logic            dout_ready
);
  localparam int unsigned WORDS = 128 / BUS;
  aes_pkg::block_t          sreg;
  logic [$clog2(WORDS)-1:0] cnt;

  assign dout       = sreg[127 -: BUS];
  assign dout_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (!busy) begin
      if (load) begin
        sreg <= blk;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end else if (dout_ready) begin
      sreg <= {sreg[127-BUS:0], BUS'(0)};
      cnt  <= cnt + 1'b1;
      if (32'(cnt) == WORDS - 1) busy <= 1'b0;
    end
  end

  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);
endmodule
