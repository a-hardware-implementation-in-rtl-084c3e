// tb_aes_block_reg -- self-checking testbench for aes_block_reg (R1-R3).
//
// Random load/clear sequences are compared with a cycle-level model of a
// register with a full flag: load captures and sets full, clear alone
// resets full, load wins over clear, and q holds otherwise.
module tb_aes_block_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load, clear, full;
  logic [127:0] d, q;
  logic [127:0] m_q;
  logic         m_full;
  int checks = 0, failures = 0;

  aes_block_reg dut (.clk, .rst_n, .load, .clear, .d, .q, .full);

  initial begin
    load = 1'b0; clear = 1'b0; d = '0;
    m_q = '0; m_full = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (full !== 1'b0) begin failures++; $display("FAIL full after reset"); end
    for (int n = 0; n < 500; n++) begin
      load  = ($urandom_range(0, 2) == 0);
      clear = ($urandom_range(0, 2) == 0);
      d     = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (load) begin m_q = d; m_full = 1'b1; end
      else if (clear) m_full = 1'b0;
      #1;
      checks++;
      if (q !== m_q || full !== m_full) begin
        failures++;
        $display("FAIL step %0d: q=%h full=%b expected %h %b", n, q, full, m_q, m_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
