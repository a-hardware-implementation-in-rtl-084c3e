// tb_aes_decryption_fsm -- self-checking testbench for aes_decryption_fsm.
//
// A one-clock-latency subkey memory (like RAMSubKeys) is filled with round
// keys from the reference key expansion. Blocks are run back to back: the
// next start is given in the cycle done pulses. Each result is compared with
// the reference decryption; the FIPS-197 Appendix B and C.1 vectors come first,
// then random keys and blocks. Timing checks: in_taken two cycles after
// start, done 13 cycles after start. The input is scrambled right after
// in_taken to show it is not used later.
module tb_aes_decryption_fsm;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, in_taken, done;
  logic [127:0] in, sk, out_round;
  logic [3:0]   key_addr;
  logic [127:0] rk [11];
  int checks = 0, failures = 0;
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) sk <= rk[key_addr];

  aes_decryption_fsm dut (.clk, .rst_n, .start, .in, .sk, .key_addr, .busy, .in_taken, .done, .out_round);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Runs one block; the task is entered right after a clock edge.
  task automatic run(logic [127:0] key, logic [127:0] blk, logic [127:0] expected);
    int t0;
    expand(key, rk);
    in = blk;
    start = 1'b1;
    @(posedge clk); t0 = cycle; #1;
    start = 1'b0;
    expect_true(busy, "busy after start");
    @(posedge clk); #1;
    expect_true(in_taken, "in_taken two cycles after start");
    @(posedge clk); #1;
    in = {$urandom, $urandom, $urandom, $urandom};
    while (!done) begin
      expect_true(!in_taken, "in_taken only once");
      @(posedge clk); #1;
    end
    expect_true(cycle - t0 == 13 - 1 + 1, "13 clocks per block");
    expect_true(!busy, "idle when done");
    checks++;
    if (out_round !== expected) begin
      failures++;
      $display("FAIL key=%h in=%h got %h expected %h", key, blk, out_round, expected);
    end
  endtask

  initial begin
    start = 1'b0; in = '0;
    for (int k = 0; k < 11; k++) rk[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(KEY_B, CT_B, PT_B);
    run(KEY_C, CT_C, PT_C);
    for (int n = 0; n < 40; n++) begin
      logic [127:0] key, blk;
      key = {$urandom, $urandom, $urandom, $urandom};
      blk = {$urandom, $urandom, $urandom, $urandom};
      run(key, blk, decrypt(key, blk));
    end
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
