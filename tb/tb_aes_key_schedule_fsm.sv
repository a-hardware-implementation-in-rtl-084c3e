// tb_aes_key_schedule_fsm -- self-checking testbench for aes_key_schedule_fsm.
//
// The testbench plays the subkey RAM (one clock read latency). For each key
// (FIPS-197 Appendix B key, whose round key 10 is published, then random
// keys) it checks that exactly 11 writes happen, to addresses 0..10 in that
// order and in 11 consecutive cycles, with the reference round keys; then it
// reads every location back through rd_addr/subkey.
module tb_aes_key_schedule_fsm;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, ram_we;
  logic [127:0] key, subkey, ram_wdata, ram_rdata;
  logic [3:0]   rd_addr, ram_addr;
  logic [127:0] mem [16];
  int checks = 0, failures = 0;
  int writes, next_addr;
  logic [127:0] rk [11];

  aes_key_schedule_fsm dut (.clk, .rst_n, .start, .key, .busy, .rd_addr, .subkey,
                            .ram_addr, .ram_we, .ram_wdata, .ram_rdata);

  always @(posedge clk) begin
    if (ram_we) begin
      mem[ram_addr] <= ram_wdata;
      ram_rdata     <= ram_wdata;
    end else begin
      ram_rdata <= mem[ram_addr];
    end
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [127:0] k);
    expand(k, rk);
    key = k;
    start = 1'b1;
    writes = 0;
    @(posedge clk); #1;
    start = 1'b0;
    key = {$urandom, $urandom, $urandom, $urandom};   // key only needed at start
    while (busy) begin
      expect_true(ram_we, "write every busy cycle");
      expect_true(32'(ram_addr) == writes, "write address in order");
      expect_true(ram_wdata === rk[writes % 11], $sformatf("round key %0d", writes));
      writes++;
      @(posedge clk); #1;
    end
    expect_true(writes == 11, "eleven writes");
    expect_true(!ram_we, "no write when idle");
    for (int i = 0; i < 11; i++) begin
      rd_addr = 4'(i);
      #1 expect_true(ram_addr == rd_addr, "read address passes through");
      @(posedge clk); #1;
      expect_true(subkey === rk[i], $sformatf("read back %0d", i));
    end
  endtask

  initial begin
    start = 1'b0; key = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(KEY_B);
    expect_true(mem[10] === RK10_B, "published round key 10");
    for (int n = 0; n < 20; n++) run({$urandom, $urandom, $urandom, $urandom});
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
