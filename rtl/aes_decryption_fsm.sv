// aes_decryption_fsm -- DecryptionFSM: iterative AES-128 decryption, one
// round per clock through a single round datapath.
//
// Datapath, in order: InvShiftRow -> InvSubstitution, a 2:1 mux (sel1)
// choosing that result or the input block `in`, KeyAddition with subkey
// `sk`, then a 2:1 mux (sel2) that either passes the sum or its InvMixColumn,
// into the outRound register, which feeds back to InvShiftRow.
// Per round:
//   initial round    sel1=0 sel2=0   outRound = in ^ k10
//   iterations 1..9  sel1=1 sel2=1   with InvMixColumn (after KeyAddition)
//   final round 10   sel1=1 sel2=0   no InvMixColumn, key k0
// The subkeys are therefore read in reverse order, key_addr 10 down to 0,
// from a RAM with one clock of read latency.
//
// Timing is the same as aes_encryption_fsm: start sampled when idle, one
// fetch cycle, 11 round cycles, done pulses in the next cycle (where start is
// accepted again): 13 clocks per block. The path through KeyAddition,
// InvMixColumn, the muxes, InvShiftRow and InvSubstitution is the longest
// in the circuit.
module aes_decryption_fsm #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  aes_pkg::block_t  in,
  input  aes_pkg::block_t  sk,
  output aes_pkg::key_idx_t key_addr,
  output logic             busy,
  output logic             in_taken,
  output logic             done,
  output aes_pkg::block_t  out_round
);
  import aes_pkg::*;

  typedef enum logic [1:0] {IDLE, FETCH, ROUND} state_e;
  state_e    state;
  key_idx_t  rnd;
  logic      sel1, sel2;
  block_t    ishift_q, isub_q, mux1_q, ka_q, imix_q, next_out_round;

  aes_inv_shift_row    u_ishift (.d(out_round), .q(ishift_q));
  aes_inv_substitution u_isub   (.d(ishift_q),  .q(isub_q));
  assign mux1_q = sel1 ? isub_q : in;
  aes_key_addition     u_ka     (.d(mux1_q), .sk(sk), .q(ka_q));
  aes_inv_mix_column   u_imix   (.d(ka_q), .q(imix_q));
  assign next_out_round = sel2 ? imix_q : ka_q;

  assign sel1     = (rnd != '0);
  assign sel2     = (rnd != '0) && (rnd != key_idx_t'(NR));
  assign busy     = (state != IDLE);
  assign in_taken = (state == ROUND) && (rnd == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      rnd       <= '0;
      key_addr  <= '0;
      done      <= 1'b0;
      out_round <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          key_addr <= key_idx_t'(NR);
          rnd      <= '0;
          state    <= FETCH;
        end
        FETCH: begin
          key_addr <= key_idx_t'(NR - 1);
          state    <= ROUND;
        end
        ROUND: begin
          out_round <= next_out_round;
          if (rnd == key_idx_t'(NR)) begin
            done  <= 1'b1;
            rnd   <= '0;
            state <= IDLE;
          end else begin
            rnd <= rnd + 1'b1;
            if (rnd < key_idx_t'(NR - 1)) key_addr <= key_idx_t'(NR - 2) - rnd;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n) rnd <= key_idx_t'(NR));
endmodule
