// tb_aes_inv_substitution -- self-checking testbench for aes_inv_substitution (InvSubstitution).
//
// Applies the published FIPS-197 example value and 200 random states and
// compares q with the reference model in aes_ref_pkg. A watchdog ends the
// run after a fixed number of clock periods.
module tb_aes_inv_substitution;
  import aes_ref_pkg::*;

  logic [127:0] d, q, exp_q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aes_inv_substitution dut (.d, .q);

  task automatic check(string what);
    #1;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: d=%h q=%h expected %h", what, d, q, exp_q);
    end
  endtask

  initial begin
    d = 128'hd42711aee0bf98f1b8b45de51e415230; exp_q = 128'h193de3bea0f4e22b9ac68d2ae9f84808; check("FIPS-197 example");
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      exp_q = sub_bytes(d, 1);
      check("random");
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
