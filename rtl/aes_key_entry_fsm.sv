// aes_key_entry_fsm -- KeyEntryFSM: loads the external 128-bit key over the
// 16-bit KeyIn channel.
//
// Accepts words only while MainFSM holds `en` high (after NewKey), with a
// valid/ready handshake, most significant half-word first. After 128/BUS
// words the key is held on `key` with key_valid high until MainFSM copies
// it into R1 with key_take. The handshake is this design's choice.
module aes_key_entry_fsm #(
  parameter int unsigned BUS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [BUS-1:0]  din,
  input  logic            din_valid,
  output logic            din_ready,
  output aes_pkg::block_t key,
  output logic            key_valid,
  input  logic            key_take
);
  localparam int unsigned WORDS = 128 / BUS;
  logic [$clog2(WORDS)-1:0] cnt;

  assign din_ready = en && !key_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key       <= '0;
      key_valid <= 1'b0;
      cnt       <= '0;
    end else begin
      if (key_take) key_valid <= 1'b0;
      if (din_valid && din_ready) begin
        key <= {key[127-BUS:0], din};
        cnt <= cnt + 1'b1;
        if (32'(cnt) == WORDS - 1) begin
          key_valid <= 1'b1;
          cnt       <= '0;
        end
      end
    end
  end

  a_take_only_full: assert property (@(posedge clk) disable iff (!rst_n) key_take |-> key_valid);
endmodule
