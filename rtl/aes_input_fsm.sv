// aes_input_fsm -- InputFSM: loads data blocks over the 16-bit input channel.
//
// Words arrive with a valid/ready handshake (a word moves on a clock edge
// where din_valid and din_ready are both high), most significant half-word
// first. After 128/BUS words the assembled block is held on `blk` with
// blk_valid high, and no further word is accepted until MainFSM takes it
// with blk_take, so one block can wait here while R2 and the cipher are
// busy. The handshake itself is this design's choice.
module aes_input_fsm #(
  parameter int unsigned BUS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [BUS-1:0]  din,
  input  logic            din_valid,
  output logic            din_ready,
  output aes_pkg::block_t blk,
  output logic            blk_valid,
  input  logic            blk_take
);
  localparam int unsigned WORDS = 128 / BUS;
  logic [$clog2(WORDS)-1:0] cnt;

  assign din_ready = !blk_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk       <= '0;
      blk_valid <= 1'b0;
      cnt       <= '0;
    end else begin
      if (blk_take) blk_valid <= 1'b0;
      if (din_valid && din_ready) begin
        blk <= {blk[127-BUS:0], din};
        cnt <= cnt + 1'b1;
        if (32'(cnt) == WORDS - 1) begin
          blk_valid <= 1'b1;
          cnt       <= '0;
        end
      end
    end
  end

  a_take_only_full: assert property (@(posedge clk) disable iff (!rst_n) blk_take |-> blk_valid);
endmodule
