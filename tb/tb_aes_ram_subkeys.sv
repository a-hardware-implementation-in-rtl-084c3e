// tb_aes_ram_subkeys -- self-checking testbench for aes_ram_subkeys.
//
// Writes random words to all 11 locations, reads them back in random order
// checking the one-clock read latency, checks that a write returns the
// written word, overwrites some locations and reads all again against a
// shadow copy kept by the testbench.
module tb_aes_ram_subkeys;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   addr;
  logic         we;
  logic [127:0] wdata, rdata;
  logic [127:0] shadow [11];
  int checks = 0, failures = 0;

  aes_ram_subkeys dut (.clk, .addr, .we, .wdata, .rdata);

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(int a, logic [127:0] v);
    addr = 4'(a); we = 1'b1; wdata = v;
    @(posedge clk); #1;
    expect_eq(rdata, v, "write-first read data");
    shadow[a] = v;
    we = 1'b0;
  endtask

  task automatic read(int a);
    addr = 4'(a);
    @(posedge clk); #1;
    expect_eq(rdata, shadow[a], $sformatf("read %0d", a));
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int a = 0; a < 11; a++) write(a, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 50; n++) read($urandom_range(0, 10));
    for (int n = 0; n < 20; n++) write($urandom_range(0, 10), {$urandom, $urandom, $urandom, $urandom});
    for (int a = 10; a >= 0; a--) read(a);
    addr = 4'd12; @(posedge clk); #1;
    expect_eq(rdata, '0, "out-of-range read");
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
