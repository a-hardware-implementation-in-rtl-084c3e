// tb_rijndael_top -- end-to-end testbench for rijndael_top at its default
// (and only) configuration.
//
// Scenario:
//   1. NewKey, FIPS-197 Appendix B key sent over KeyIn.
//   2. Encryption run: the Appendix B plaintext then NBLK-1 random blocks,
//      streamed without gaps. The first blocks leave with OutputReady held
//      high, so consecutive cipher starts must be exactly 13 clocks apart;
//      later OutputReady toggles randomly, which backs results up into R3
//      and the cipher (Stall).
//   3. FinishPipeline, then a decryption run (mode switch) of all the
//      ciphertexts, which must give back the plaintexts.
//   4. While that run is still active, NewKey with the Appendix C.1 key,
//      then the C.1 ciphertext is decrypted; FinishPipeline, and an
//      encryption run of the C.1 plaintext.
// Every output block is compared with the reference model. The mechanisms
// (key load, encryption, decryption, mode switch, R2 refilled while the
// cipher runs, stall, 13-clock back-to-back blocks, key change while
// running) are counted, and one that never happened counts as a failure.
module tb_rijndael_top;
  import aes_ref_pkg::*;

  localparam int NBLK = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        NewKey, StartPipeline, FinishPipeline, Decrypt;
  logic [15:0] KeyIn, Input, Output;
  logic        KeyInValid, KeyInReady, InputValid, InputReady, OutputValid, OutputReady;
  logic        KeyReady, Running, Stall;

  rijndael_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  logic [127:0] in_q [$];    // blocks to send
  logic [127:0] exp_q [$];   // expected results, in order
  logic [127:0] got_q [$];   // received results
  bit  random_ready = 1'b0;

  // mechanism counters
  int n_keys = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_overlap = 0, n_stall = 0;
  int n_b2b = 0, n_key_running = 0;
  int last_start = -1;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // observation of internal events, for the mechanism counts and the rate check
  always @(posedge clk) if (rst_n) begin
    if (dut.enc_start || dut.dec_start) begin
      if (dut.enc_start) n_enc++; else n_dec++;
      if (last_start >= 0 && !random_ready && !Stall && cycle - last_start == 13) n_b2b++;
      if (last_start >= 0 && !random_ready && in_q.size() > 0)
        expect_true(cycle - last_start == 13, "back-to-back blocks 13 clocks apart");
      last_start = cycle;
    end
    if (dut.in_take && (dut.enc_busy || dut.dec_busy)) n_overlap++;
    if (Stall) n_stall++;
  end

  // input stream driver
  initial begin
    Input = '0; InputValid = 1'b0;
    forever begin
      @(posedge clk); #1;
      if (in_q.size() > 0) begin
        logic [127:0] b;
        b = in_q[0];
        for (int w = 0; w < 8; w++) begin
          Input = b[127 - 16*w -: 16];
          InputValid = 1'b1;
          do @(posedge clk); while (!InputReady);
          #1;
        end
        InputValid = 1'b0;
        void'(in_q.pop_front());
      end
    end
  end

  // output stream receiver
  initial begin
    logic [127:0] b;
    int w = 0;
    OutputReady = 1'b1;
    forever begin
      @(posedge clk);
      if (OutputValid && OutputReady) begin
        b[127 - 16*w -: 16] = Output;
        w++;
        if (w == 8) begin
          got_q.push_back(b);
          w = 0;
        end
      end
      #1 OutputReady = random_ready ? ($urandom_range(0, 3) == 0) : 1'b1;
    end
  end

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic load_key(logic [127:0] key);
    if (Running) n_key_running++;
    NewKey = 1'b1; tick(); NewKey = 1'b0;
    for (int w = 0; w < 8; w++) begin
      KeyIn = key[127 - 16*w -: 16];
      KeyInValid = 1'b1;
      do @(posedge clk); while (!KeyInReady);
      #1;
    end
    KeyInValid = 1'b0;
    while (!KeyReady) tick();
    n_keys++;
  endtask

  task automatic start_run(bit dec);
    if (n_enc + n_dec > 0) n_switch++;
    last_start = -1;   // the rate check starts afresh with each run
    Decrypt = dec; StartPipeline = 1'b1; tick(); StartPipeline = 1'b0;
  endtask

  task automatic finish_run();
    FinishPipeline = 1'b1; tick(); FinishPipeline = 1'b0;
  endtask

  task automatic wait_results(int n);
    while (got_q.size() < n) tick();
  endtask

  task automatic compare(string what);
    expect_true(got_q.size() == exp_q.size(), {what, ": block count"});
    while (got_q.size() > 0 && exp_q.size() > 0) begin
      logic [127:0] g, e;
      g = got_q.pop_front();
      e = exp_q.pop_front();
      checks++;
      if (g !== e) begin
        failures++;
        $display("FAIL %s: got %h expected %h", what, g, e);
      end
    end
  endtask

  initial begin
    logic [127:0] pts [NBLK];
    logic [127:0] cts [NBLK];
    NewKey = 0; StartPipeline = 0; FinishPipeline = 0; Decrypt = 0;
    KeyIn = '0; KeyInValid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1-2: key B, encryption run
    load_key(KEY_B);
    pts[0] = PT_B;
    for (int i = 1; i < NBLK; i++) pts[i] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < NBLK; i++) begin
      cts[i] = encrypt(KEY_B, pts[i]);
      exp_q.push_back(cts[i]);
    end
    expect_true(cts[0] == CT_B, "reference model gives the published ciphertext");
    start_run(1'b0);
    for (int i = 0; i < NBLK; i++) in_q.push_back(pts[i]);
    wait_results(NBLK / 2);
    random_ready = 1'b1;
    wait_results(NBLK);
    random_ready = 1'b0;
    compare("encryption run");
    finish_run();

    // 3: decryption run
    start_run(1'b1);
    for (int i = 0; i < NBLK; i++) begin
      in_q.push_back(cts[i]);
      exp_q.push_back(pts[i]);
    end
    wait_results(NBLK);
    compare("decryption run");

    // 4: new key while running, C.1 decryption, then encryption
    load_key(KEY_C);
    in_q.push_back(CT_C); exp_q.push_back(PT_C);
    wait_results(1);
    compare("decryption with new key");
    finish_run();
    start_run(1'b0);
    in_q.push_back(PT_C); exp_q.push_back(CT_C);
    wait_results(1);
    compare("encryption with new key");
    finish_run();
    repeat (5) tick();
    expect_true(!Running, "stopped after FinishPipeline");

    $display("mechanisms: keys=%0d enc=%0d dec=%0d mode_switches=%0d r2_overlap=%0d stall_cycles=%0d back_to_back_13=%0d key_while_running=%0d",
             n_keys, n_enc, n_dec, n_switch, n_overlap, n_stall, n_b2b, n_key_running);
    expect_true(n_keys >= 2, "key loaded");
    expect_true(n_enc > 0, "encryption happened");
    expect_true(n_dec > 0, "decryption happened");
    expect_true(n_switch >= 2, "mode switch happened");
    expect_true(n_overlap > 0, "R2 refilled while the cipher ran");
    expect_true(n_stall > 0, "stall happened");
    expect_true(n_b2b > 0, "13-clock back-to-back blocks happened");
    expect_true(n_key_running > 0, "key change while running happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
