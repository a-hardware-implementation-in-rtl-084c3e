// tb_aes_sbox -- self-checking testbench for aes_sbox.
//
// Sweeps all 256 inputs through a forward (INVERSE=0) and an inverse
// (INVERSE=1) instance, compares with the reference tables, spot-checks
// published entries (S(00)=63, S(53)=ed, S(ff)=16) and checks that the
// inverse table undoes the forward one.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] a, y, yi, yy;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aes_sbox #(.INVERSE(1'b0)) dut_fwd (.a(a), .y(y));
  aes_sbox #(.INVERSE(1'b1)) dut_inv (.a(a), .y(yi));
  aes_sbox #(.INVERSE(1'b1)) dut_back (.a(y), .y(yy));

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h got %h expected %h", what, a, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      expect_eq(y, sbox(a), "forward");
      expect_eq(yi, inv_sbox(a), "inverse");
      expect_eq(yy, a, "round trip");
      if (v == 8'h00) expect_eq(y, 8'h63, "S(00)");
      if (v == 8'h53) expect_eq(y, 8'hed, "S(53)");
      if (v == 8'hff) expect_eq(y, 8'h16, "S(ff)");
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
