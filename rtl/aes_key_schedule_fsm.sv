// aes_key_schedule_fsm -- KeyScheduleFSM: expands the 128-bit cipher key into
// the ten AES-128 subkeys and stores the key and subkeys in RAMSubKeys; the
// cipher's subkey reads also pass through this block.
//
// Expansion, one subkey per clock: with the previous subkey as words
// w0..w3 (w0 in bits [127:96]),
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// with rcon = 01, 02, 04, ... (doubled in GF(2^8) each step). SubWord uses
// four forward S-boxes of its own.
//
// Timing: a start pulse (key must be stable on `key`) makes busy rise for
// NR+1 = 11 cycles; in each, one word is written: the key itself to
// location 0, then subkey i to location i. While busy the RAM port belongs
// to the expansion; otherwise rd_addr drives it and `subkey` shows the RAM
// output one clock after rd_addr. The single shared RAM port and the
// one-subkey-per-clock rate are choices of this design.
module aes_key_schedule_fsm #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  aes_pkg::block_t   key,
  output logic              busy,
  input  aes_pkg::key_idx_t rd_addr,
  output aes_pkg::block_t   subkey,
  output aes_pkg::key_idx_t ram_addr,
  output logic              ram_we,
  output aes_pkg::block_t   ram_wdata,
  input  aes_pkg::block_t   ram_rdata
);
  import aes_pkg::*;

  block_t     cur, nxt;
  key_idx_t   idx;
  logic [7:0] rcon;
  logic [31:0] rot, sub, t;

  assign rot = {cur[23:0], cur[31:24]};   // RotWord of w3
  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.a(rot[8*b +: 8]), .y(sub[8*b +: 8]));
  end
  assign t = sub ^ {rcon, 24'h0};

  always_comb begin
    nxt[127:96] = cur[127:96] ^ t;
    nxt[95:64]  = cur[95:64]  ^ nxt[127:96];
    nxt[63:32]  = cur[63:32]  ^ nxt[95:64];
    nxt[31:0]   = cur[31:0]   ^ nxt[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      idx  <= '0;
      rcon <= 8'h01;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cur  <= key;
        idx  <= '0;
        rcon <= 8'h01;
      end
    end else begin
      cur  <= nxt;
      rcon <= xtime(rcon);
      idx  <= idx + 1'b1;
      if (idx == key_idx_t'(NR)) busy <= 1'b0;
    end
  end

  assign ram_we    = busy;
  assign ram_addr  = busy ? idx : rd_addr;
  assign ram_wdata = cur;
  assign subkey    = ram_rdata;
endmodule
