// tb_aes_key_addition -- self-checking testbench for aes_key_addition.
//
// Checks the FIPS-197 Appendix B initial round (input xor cipher key) and
// random pairs, whose expected value is formed bit by bit in a loop.
module tb_aes_key_addition;
  import aes_ref_pkg::*;

  logic [127:0] d, sk, q, exp_q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aes_key_addition dut (.d, .sk, .q);

  task automatic check();
    #1;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL d=%h sk=%h q=%h expected %h", d, sk, q, exp_q);
    end
  endtask

  initial begin
    d = PT_B; sk = KEY_B; exp_q = 128'h193de3bea0f4e22b9ac68d2ae9f84808; check();
    for (int n = 0; n < 200; n++) begin
      d  = {$urandom, $urandom, $urandom, $urandom};
      sk = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) exp_q[b] = (d[b] != sk[b]);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
