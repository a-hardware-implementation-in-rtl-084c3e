// tb_aes_output_fsm -- self-checking testbench for aes_output_fsm (OutputFSM).
//
// Loads random blocks and receives them with random gaps in dout_ready.
// Checks the eight words, most significant first, that busy covers exactly
// the transfer, and that a word is held while dout_ready is low.
module tb_aes_output_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] blk;
  logic         load, busy, dout_valid, dout_ready;
  logic [15:0]  dout;
  int checks = 0, failures = 0;

  aes_output_fsm dut (.clk, .rst_n, .blk, .load, .busy, .dout, .dout_valid, .dout_ready);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    blk = '0; load = 1'b0; dout_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      logic [127:0] exp_b;
      exp_b = {$urandom, $urandom, $urandom, $urandom};
      expect_true(!busy && !dout_valid, "idle before load");
      blk = exp_b; load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      blk = '1;
      for (int w = 0; w < 8; w++) begin
        dout_ready = 1'b0;
        while ($urandom_range(0, 2) == 0) begin
          expect_true(dout_valid && dout === exp_b[127 - 16*w -: 16], "word held while not ready");
          @(posedge clk); #1;
        end
        expect_true(dout_valid, "valid during transfer");
        expect_true(dout === exp_b[127 - 16*w -: 16], $sformatf("word %0d", w));
        dout_ready = 1'b1;
        @(posedge clk); #1;
      end
      dout_ready = 1'b0;
      expect_true(!busy, "busy ends after eighth word");
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
