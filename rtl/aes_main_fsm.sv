// aes_main_fsm -- MainFSM: the top-level controller. It generates the control
// strobes for every other unit and runs the handshakes between them.
//
// Key path (NewKey): KeyEntryFSM is enabled; once it holds a full key and no
// block is inside the cipher, the key is copied into R1 (key_take), then
// KeyScheduleFSM is started (ks_start) and key_ready is low until it has
// written all subkeys. No block is started while a new key is being
// loaded or expanded; the previous key's subkeys are lost when the
// expansion starts.
//
// Block path: StartPipeline sets `running` and samples the Decrypt input as
// the mode of the run; FinishPipeline clears it, and blocks already started
// still complete and drain. Independently of `running`, a block finished by
// InputFSM moves into R2 whenever R2 is empty or is being released in that
// cycle (the cipher releases R2 with in_taken in its initial round). While
// running with a valid key, a full R2 starts the encryption or decryption
// unit as soon as it is idle. A finished result moves from the cipher's
// outRound register to R3 when R3 is empty or is handed to OutputFSM in the
// same cycle; otherwise it waits in outRound (`stall`) and no new block is
// started. With a fast enough input and output, back-to-back blocks start
// every 13 clocks, the cipher's own rate.
//
// The meaning of NewKey, StartPipeline and FinishPipeline and all strobe
// names are this design's; the original architecture gives only the three
// input names and that this unit controls the others.
module aes_main_fsm (
  input  logic clk,
  input  logic rst_n,
  // external control
  input  logic new_key,
  input  logic start_pipeline,
  input  logic finish_pipeline,
  input  logic decrypt,
  output logic running,
  output logic key_ready,
  output logic stall,
  // KeyEntryFSM, R1, KeyScheduleFSM
  output logic key_entry_en,
  input  logic key_blk_valid,
  output logic key_take,
  output logic ks_start,
  input  logic ks_busy,
  // InputFSM, R2
  input  logic in_blk_valid,
  output logic in_take,
  input  logic r2_full,
  output logic r2_clear,
  // EncryptionFSM / DecryptionFSM
  input  logic core_busy,
  input  logic core_in_taken,
  input  logic core_done,
  output logic core_start_enc,
  output logic core_start_dec,
  output logic cur_dec,
  // R3, OutputFSM
  input  logic r3_full,
  output logic r3_load,
  input  logic out_busy,
  output logic out_load
);
  typedef enum logic [1:0] {K_IDLE, K_ENTRY, K_START, K_SCHED} kstate_e;
  kstate_e kstate;
  logic    mode_dec, res_pending, have_result, r3_free, core_go;

  // key path
  assign key_entry_en = (kstate == K_ENTRY);
  assign key_take     = (kstate == K_ENTRY) && key_blk_valid && !core_busy;
  assign ks_start     = (kstate == K_START);

  // block path
  assign r2_clear    = core_in_taken;
  assign in_take     = in_blk_valid && (!r2_full || core_in_taken);
  assign out_load    = r3_full && !out_busy;
  assign r3_free     = !r3_full || out_load;
  assign have_result = core_done || res_pending;
  assign r3_load     = have_result && r3_free;
  assign stall       = have_result && !r3_free;
  assign core_go     = running && key_ready && (kstate == K_IDLE) && r2_full && !core_busy
                       && (!have_result || r3_load);
  assign core_start_enc = core_go && !mode_dec;
  assign core_start_dec = core_go &&  mode_dec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kstate      <= K_IDLE;
      key_ready   <= 1'b0;
      running     <= 1'b0;
      mode_dec    <= 1'b0;
      cur_dec     <= 1'b0;
      res_pending <= 1'b0;
    end else begin
      unique case (kstate)
        K_IDLE:  if (new_key) kstate <= K_ENTRY;
        K_ENTRY: if (key_take) kstate <= K_START;
        K_START: begin
          key_ready <= 1'b0;
          kstate    <= K_SCHED;
        end
        K_SCHED: if (!ks_busy) begin
          key_ready <= 1'b1;
          kstate    <= K_IDLE;
        end
        default: kstate <= K_IDLE;
      endcase

      if (start_pipeline) begin
        running  <= 1'b1;
        mode_dec <= decrypt;
      end else if (finish_pipeline) begin
        running <= 1'b0;
      end

      if (core_go) cur_dec <= mode_dec;
      res_pending <= have_result && !r3_load;
    end
  end

  a_r3_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) r3_load |-> r3_free);
  a_start_idle:      assert property (@(posedge clk) disable iff (!rst_n) core_go |-> !core_busy);
endmodule
