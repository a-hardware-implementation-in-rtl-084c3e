// aes_encryption_fsm -- EncryptionFSM: iterative AES-128 encryption, one
// round per clock through a single round datapath.
//
// Datapath, in order: Substitution -> ShiftRow -> MixColumn, with a 2:1 mux
// (sel2) that can bypass MixColumn, then a 2:1 mux (sel1) that picks either
// that result or the input block `in`, then KeyAddition with subkey `sk`,
// into the outRound register, which feeds back to Substitution.
// Per round:
//   initial round    sel1=0 sel2=0   outRound = in ^ k0
//   iterations 1..9  sel1=1 sel2=0   full round with MixColumn
//   final round 10   sel1=1 sel2=1   MixColumn bypassed
//
// Subkeys come from a RAM with one clock of read latency, addressed by
// key_addr (0 up to 10). Timing: start is sampled in the idle state; one
// cycle fetches subkey 0; the 11 round cycles follow; done pulses in the
// next cycle, with the ciphertext in out_round, which holds it until the
// following block's initial round. start is accepted again in that same
// cycle, so one block takes 13 clocks. in_taken pulses in the initial-round
// cycle, after which `in` is no longer used. The start/busy/done handshake
// and the fetch cycle are this design's choices.
module aes_encryption_fsm #(
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
  block_t    sub_q, shift_q, mix_q, mux2_q, mux1_q, next_out_round;

  aes_substitution u_sub   (.d(out_round), .q(sub_q));
  aes_shift_row    u_shift (.d(sub_q),     .q(shift_q));
  aes_mix_column   u_mix   (.d(shift_q),   .q(mix_q));
  assign mux2_q = sel2 ? shift_q : mix_q;
  assign mux1_q = sel1 ? mux2_q  : in;
  aes_key_addition u_ka    (.d(mux1_q), .sk(sk), .q(next_out_round));

  assign sel1     = (rnd != '0);
  assign sel2     = (rnd == key_idx_t'(NR));
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
          key_addr <= '0;
          rnd      <= '0;
          state    <= FETCH;
        end
        FETCH: begin
          key_addr <= key_idx_t'(1);
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
            if (rnd < key_idx_t'(NR - 1)) key_addr <= rnd + key_idx_t'(2);
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // While idle the round counter rests at 0 so the selects show the initial round.
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n) rnd <= key_idx_t'(NR));
endmodule
