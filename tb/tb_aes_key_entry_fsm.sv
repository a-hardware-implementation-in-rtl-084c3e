// tb_aes_key_entry_fsm -- self-checking testbench for aes_key_entry_fsm (KeyEntryFSM).
//
// A producer sends random 128-bit blocks as eight 16-bit words, most
// significant first, with random gaps in din_valid. The consumer takes each
// assembled block after a random delay. Checks: the assembled value, that
// the valid flag rises exactly on the eighth word, that no word is
// accepted while a full block waits, and the handshake counts.
module tb_aes_key_entry_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]  din;
  logic         din_valid, din_ready;
  logic [127:0] key;
  logic         key_valid, key_take;
  logic en;
  int checks = 0, failures = 0;

  aes_key_entry_fsm dut (.clk, .rst_n, .en, .din, .din_valid, .din_ready, .key, .key_valid, .key_take);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    din = '0; din_valid = 1'b0; key_take = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b0; repeat (3) @(posedge clk); #1; checks++; if (din_ready) begin failures++; $display("FAIL ready while disabled"); end en = 1'b1;
    for (int n = 0; n < 60; n++) begin
      logic [127:0] exp_b;
      exp_b = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 8; w++) begin
        while ($urandom_range(0, 3) == 0) @(posedge clk);
        #1;
        expect_true(!key_valid, "not valid before last word");
        expect_true(din_ready, "ready while filling");
        din = exp_b[127 - 16*w -: 16];
        din_valid = 1'b1;
        @(posedge clk); #1;
        din_valid = 1'b0;
      end
      expect_true(key_valid, "valid after eighth word");
      expect_true(key === exp_b, "assembled block");
      din = 16'hdead; din_valid = 1'b1;
      repeat ($urandom_range(1, 4)) begin
        expect_true(!din_ready, "stalls while full");
        @(posedge clk); #1;
      end
      expect_true(key === exp_b, "block held while full");
      din_valid = 1'b0;
      key_take = 1'b1;
      @(posedge clk); #1;
      key_take = 1'b0;
      expect_true(!key_valid, "released after take");
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
