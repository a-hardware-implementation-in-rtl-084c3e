// rijndael_top -- AES-128 (Rijndael with 128-bit block and key)
// encryption/decryption circuit with 16-bit key, input and output channels.
//
// Structure: KeyEntryFSM -> R1 -> KeyScheduleFSM <-> RAMSubKeys (11 x 128)
// supplies subkeys; InputFSM -> R2 -> EncryptionFSM / DecryptionFSM -> R3 ->
// OutputFSM carries the data; MainFSM controls all of them. R1-R3 let key
// entry, block input and block output overlap with the cipher.
//
// Use: pulse NewKey, then send the key as eight 16-bit words on KeyIn
// (valid/ready); KeyReady rises about 14 clocks after the last word. Pulse
// StartPipeline with Decrypt set for the mode of the run, send blocks as
// eight words each on Input, and collect results as eight words each on
// Output, most significant half-word first. Pulse FinishPipeline to stop
// starting blocks. The cipher takes 13 clocks per block, so with a
// continuous input stream a block leaves every 13 clocks: 128 bits / 13
// clocks, 739 Mbit/s at 75 MHz. Blocks come out in input order.
//
// The Decrypt input and the valid/ready handshakes are additions of this
// design; the block structure follows the original architecture.
module rijndael_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        NewKey,
  input  logic        StartPipeline,
  input  logic        FinishPipeline,
  input  logic        Decrypt,
  input  logic [15:0] KeyIn,
  input  logic        KeyInValid,
  output logic        KeyInReady,
  input  logic [15:0] Input,
  input  logic        InputValid,
  output logic        InputReady,
  output logic [15:0] Output,
  output logic        OutputValid,
  input  logic        OutputReady,
  output logic        KeyReady,
  output logic        Running,
  output logic        Stall
);
  import aes_pkg::*;

  // key path
  block_t   entry_key, r1_q, subkey, ram_wdata, ram_rdata;
  logic     key_entry_en, key_blk_valid, key_take, r1_full;
  logic     ks_start, ks_busy, ram_we;
  key_idx_t ram_addr, rd_addr;
  // data path
  block_t   in_blk, r2_q, enc_out, dec_out, r3_q;
  logic     in_blk_valid, in_take, r2_full, r2_clear;
  logic     enc_start, dec_start, enc_busy, dec_busy, enc_taken, dec_taken, enc_done, dec_done;
  key_idx_t enc_addr, dec_addr;
  logic     cur_dec, r3_load, r3_full, out_busy, out_load;

  aes_main_fsm u_main (
    .clk, .rst_n,
    .new_key(NewKey), .start_pipeline(StartPipeline), .finish_pipeline(FinishPipeline),
    .decrypt(Decrypt), .running(Running), .key_ready(KeyReady), .stall(Stall),
    .key_entry_en, .key_blk_valid, .key_take, .ks_start, .ks_busy,
    .in_blk_valid, .in_take, .r2_full, .r2_clear,
    .core_busy(enc_busy || dec_busy), .core_in_taken(enc_taken || dec_taken),
    .core_done(enc_done || dec_done), .core_start_enc(enc_start), .core_start_dec(dec_start),
    .cur_dec, .r3_full, .r3_load, .out_busy, .out_load
  );

  aes_key_entry_fsm u_key_entry (
    .clk, .rst_n, .en(key_entry_en), .din(KeyIn), .din_valid(KeyInValid), .din_ready(KeyInReady),
    .key(entry_key), .key_valid(key_blk_valid), .key_take
  );

  aes_block_reg u_r1 (.clk, .rst_n, .load(key_take), .clear(ks_start), .d(entry_key), .q(r1_q), .full(r1_full));

  assign rd_addr = cur_dec ? dec_addr : enc_addr;

  aes_key_schedule_fsm u_key_sched (
    .clk, .rst_n, .start(ks_start), .key(r1_q), .busy(ks_busy), .rd_addr, .subkey,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata
  );

  aes_ram_subkeys u_ram (.clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata(ram_rdata));

  aes_input_fsm u_input (
    .clk, .rst_n, .din(Input), .din_valid(InputValid), .din_ready(InputReady),
    .blk(in_blk), .blk_valid(in_blk_valid), .blk_take(in_take)
  );

  aes_block_reg u_r2 (.clk, .rst_n, .load(in_take), .clear(r2_clear), .d(in_blk), .q(r2_q), .full(r2_full));

  aes_encryption_fsm u_enc (
    .clk, .rst_n, .start(enc_start), .in(r2_q), .sk(subkey), .key_addr(enc_addr),
    .busy(enc_busy), .in_taken(enc_taken), .done(enc_done), .out_round(enc_out)
  );

  aes_decryption_fsm u_dec (
    .clk, .rst_n, .start(dec_start), .in(r2_q), .sk(subkey), .key_addr(dec_addr),
    .busy(dec_busy), .in_taken(dec_taken), .done(dec_done), .out_round(dec_out)
  );

  aes_block_reg u_r3 (
    .clk, .rst_n, .load(r3_load), .clear(out_load), .d(cur_dec ? dec_out : enc_out),
    .q(r3_q), .full(r3_full)
  );

  aes_output_fsm u_output (
    .clk, .rst_n, .blk(r3_q), .load(out_load), .busy(out_busy),
    .dout(Output), .dout_valid(OutputValid), .dout_ready(OutputReady)
  );

  a_r1_full_on_start: assert property (@(posedge clk) disable iff (!rst_n) ks_start |-> r1_full);
endmodule
