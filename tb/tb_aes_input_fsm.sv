// tb_aes_input_fsm -- self-checking testbench for aes_input_fsm (InputFSM).
//
// A producer sends random 128-bit blocks as eight 16-bit words, most
// significant first, with random gaps in din_valid. The consumer takes each
// assembled block after a random delay. Checks: the assembled value, that
// the valid flag rises exactly on the eighth word, that no word is
// accepted while a full block waits, and the handshake counts.
module tb_aes_input_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]  din;
  logic         din_valid, din_ready;
  logic [127:0] blk;
  logic         blk_valid, blk_take;
  
  int checks = 0, failures = 0;

  aes_input_fsm dut (.clk, .rst_n,  .din, .din_valid, .din_ready, .blk, .blk_valid, .blk_take);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    din = '0; din_valid = 1'b0; blk_take = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    
    for (int n = 0; n < 60; n++) begin
      logic [127:0] exp_b;
      exp_b = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 8; w++) begin
        while ($urandom_range(0, 3) == 0) @(posedge clk);
        #1;
        expect_true(!blk_valid, "not valid before last word");
        expect_true(din_ready, "ready while filling");
        din = exp_b[127 - 16*w -: 16];
        din_valid = 1'b1;
        @(posedge clk); #1;
        din_valid = 1'b0;
      end
      expect_true(blk_valid, "valid after eighth word");
      expect_true(blk === exp_b, "assembled block");
      din = 16'hdead; din_valid = 1'b1;
      repeat ($urandom_range(1, 4)) begin
        expect_true(!din_ready, "stalls while full");
        @(posedge clk); #1;
      end
      expect_true(blk === exp_b, "block held while full");
      din_valid = 1'b0;
      blk_take = 1'b1;
      @(posedge clk); #1;
      blk_take = 1'b0;
      expect_true(!blk_valid, "released after take");
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
