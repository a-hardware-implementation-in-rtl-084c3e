// tb_aes_inv_mix_column -- self-checking testbench for aes_inv_mix_column (InvMixColumn).
//
// Applies the published FIPS-197 example value and 200 random states and
// compares q with the reference model in aes_ref_pkg. A watchdog ends the
// run after a fixed number of clock periods.
module tb_aes_inv_mix_column;
  import aes_ref_pkg::*;

  logic [127:0] d, q, exp_q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aes_inv_mix_column dut (.d, .q);

  task automatic check(string what);
    #1;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: d=%h q=%h expected %h", what, d, q, exp_q);
    end
  endtask

  initial begin
    d = 128'h046681e5e0cb199a48f8d37a2806264c; exp_q = 128'hd4bf5d30e0b452aeb84111f11e2798e5; check("FIPS-197 example");
    for (int n = 0; n < 200; n++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      exp_q = mix_columns(d, 1);
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
