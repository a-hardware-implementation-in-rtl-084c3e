// tb_aes_main_fsm -- self-checking testbench for aes_main_fsm (MainFSM).
//
// The testbench drives the status inputs of the other units by hand and
// checks the strobes MainFSM answers with, scenario by scenario: key entry
// waiting for an idle cipher, key expansion and key_ready, loading R2
// (also in the cycle the cipher releases it), starting encryption and
// decryption only while running with a valid key, moving a result to R3,
// the stall while R3 and OutputFSM are occupied, FinishPipeline, and no
// block start while a new key is loaded.
module tb_aes_main_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic new_key, start_pipeline, finish_pipeline, decrypt, running, key_ready, stall;
  logic key_entry_en, key_blk_valid, key_take, ks_start, ks_busy;
  logic in_blk_valid, in_take, r2_full, r2_clear;
  logic core_busy, core_in_taken, core_done, core_start_enc, core_start_dec, cur_dec;
  logic r3_full, r3_load, out_busy, out_load;
  int checks = 0, failures = 0;

  aes_main_fsm dut (.*);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic load_key();
    new_key = 1'b1; tick(); new_key = 1'b0;
    expect_true(key_entry_en, "key entry enabled after NewKey");
    expect_true(!key_take, "no take without a key");
    key_blk_valid = 1'b1; core_busy = 1'b1; #1;
    expect_true(!key_take, "key waits while cipher busy");
    tick();
    core_busy = 1'b0; #1;
    expect_true(key_take, "key taken when cipher idle");
    tick(); key_blk_valid = 1'b0; #1;
    expect_true(ks_start && !key_entry_en, "key schedule started");
    tick(); ks_busy = 1'b1;
    for (int i = 0; i < 11; i++) begin
      #1 expect_true(!key_ready, "key not ready during expansion");
      tick();
    end
    ks_busy = 1'b0; tick();
    expect_true(key_ready, "key ready after expansion");
  endtask

  initial begin
    {new_key, start_pipeline, finish_pipeline, decrypt, key_blk_valid, ks_busy} = '0;
    {in_blk_valid, r2_full, core_busy, core_in_taken, core_done, r3_full, out_busy} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_true(!key_ready && !running && !key_entry_en, "reset state");

    // R2 loading
    in_blk_valid = 1'b1; #1 expect_true(in_take, "R2 loaded when empty");
    r2_full = 1'b1; #1 expect_true(!in_take, "R2 not loaded when full");
    core_in_taken = 1'b1; #1 expect_true(in_take && r2_clear, "R2 reloaded as the cipher releases it");
    core_in_taken = 1'b0; in_blk_valid = 1'b0;

    // no start before a key and before StartPipeline
    #1 expect_true(!core_start_enc && !core_start_dec, "no start without key or run");
    load_key();
    #1 expect_true(!core_start_enc, "no start before StartPipeline");
    start_pipeline = 1'b1; decrypt = 1'b0; tick(); start_pipeline = 1'b0;
    expect_true(running, "running after StartPipeline");
    expect_true(core_start_enc && !core_start_dec, "encryption started");
    core_busy = 1'b1; #1 expect_true(!core_start_enc, "no start while busy");
    tick();

    // result to empty R3
    core_busy = 1'b0; core_done = 1'b1; #1;
    expect_true(r3_load && !stall, "result moved to empty R3");
    expect_true(core_start_enc, "next block starts in the done cycle");
    tick(); core_done = 1'b0;

    // stall: R3 full and OutputFSM busy
    r3_full = 1'b1; out_busy = 1'b1; core_done = 1'b1; #1;
    expect_true(stall && !r3_load && !core_start_enc, "stall when R3 is occupied");
    tick(); core_done = 1'b0; #1;
    expect_true(stall && !core_start_enc, "result still waiting");
    tick();
    out_busy = 1'b0; #1;
    expect_true(out_load && r3_load && !stall, "R3 handed to output and refilled");
    expect_true(core_start_enc, "start resumes after stall");
    tick(); r3_full = 1'b1; out_busy = 1'b1; #1;
    expect_true(!stall, "stall cleared");

    // FinishPipeline, then a decryption run
    finish_pipeline = 1'b1; tick(); finish_pipeline = 1'b0;
    expect_true(!running && !core_start_enc && !core_start_dec, "stopped after FinishPipeline");
    start_pipeline = 1'b1; decrypt = 1'b1; tick(); start_pipeline = 1'b0; decrypt = 1'b0;
    expect_true(core_start_dec && !core_start_enc, "decryption started");
    tick();
    expect_true(cur_dec, "current block is a decryption");

    // NewKey blocks new starts until the key is ready again
    new_key = 1'b1; tick(); new_key = 1'b0;
    expect_true(!core_start_dec, "no start while a key is loaded");
    key_blk_valid = 1'b1; tick(); key_blk_valid = 1'b0;
    expect_true(ks_start && !core_start_dec, "no start while key expands");
    tick(); ks_busy = 1'b1; tick(); ks_busy = 1'b0; tick();
    expect_true(key_ready && core_start_dec, "start resumes with the new key");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
