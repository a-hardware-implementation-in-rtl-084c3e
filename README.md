# Iterative AES-128 encryption/decryption core with 16-bit I/O

This is a compact Rijndael (AES) circuit for a 128-bit block and a 128-bit
key. It uses one round datapath per direction and runs it once per clock,
so it does not unroll the ten rounds. A block takes 13 clocks. The core
encrypts and decrypts. Key, data and results travel over 16-bit channels.
Three pipeline registers let the next block load and the previous result
drain while the cipher works. At the 75 MHz clock this architecture was
built for on a Virtex-II FPGA, the rate is 128 bits / 13 clocks × 75 MHz ≈
739 Mbit/s.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). There are no
vendor primitives. The S-box tables are computed at elaboration, not listed
as constants.

## Block structure

```
            KeyIn(16)                              RAMSubKeys 11 x 128
               |                                         ^ |
         KeyEntryFSM -> R1 -> KeyScheduleFSM <-----------+ |   (one shared port)
                                     | subkey  <-----------+
Input(16) -> InputFSM -> R2 -> EncryptionFSM / DecryptionFSM -> R3 -> OutputFSM -> Output(16)

MainFSM (NewKey, StartPipeline, FinishPipeline, Decrypt): strobes for all of the above
```

| unit | module | role |
|---|---|---|
| EncryptionFSM | `aes_encryption_fsm` | one encryption round per clock, with its own round counter and selects |
| DecryptionFSM | `aes_decryption_fsm` | one decryption round per clock |
| KeyScheduleFSM | `aes_key_schedule_fsm` | expands the key, one subkey per clock, into the RAM; carries the cipher's subkey reads |
| RAMSubKeys | `aes_ram_subkeys` | 11 × 128 bit: the key at address 0, subkey *i* at address *i* |
| InputFSM, KeyEntryFSM | `aes_input_fsm`, `aes_key_entry_fsm` | pack eight 16-bit words into a 128-bit word |
| OutputFSM | `aes_output_fsm` | unpacks a 128-bit result into eight words |
| R1, R2, R3 | `aes_block_reg` | 128-bit registers with a *full* flag |
| MainFSM | `aes_main_fsm` | key loading, start/stop, moves blocks between the units |
| round operations | `aes_substitution`, `aes_inv_substitution` (16 × `aes_sbox`), `aes_shift_row`, `aes_inv_shift_row`, `aes_mix_column`, `aes_inv_mix_column`, `aes_key_addition` | combinational |
| top | `rijndael_top` | wires it all together |

Shared types and the GF(2^8) helper functions are in `aes_pkg`.

## The round datapaths

Each cipher unit is a loop: the combinational round logic feeds a 128-bit
register, `outRound`, and that register feeds the round logic again. Two
2:1 multiplexers choose what one pass through the loop does. `sel1` picks
the external input block (0) or the fed-back state (1). `sel2` bypasses or
uses the column mixer.

**Encryption.** The loop runs in this order:
`outRound → Substitution → ShiftRow → [MixColumn | bypass] (sel2) → [in | that] (sel1) → KeyAddition(k_r) → outRound`.

**Decryption.** This is not a mirror image of encryption. The loop runs in this order:
`outRound → InvShiftRow → InvSubstitution → [in | that] (sel1) → KeyAddition(k) → [bypass | InvMixColumn] (sel2) → outRound`.
InvMixColumn comes *after* the key addition. This is the standard order of
the inverse cipher with unmodified round keys. So decryption uses the same
subkeys as encryption, read in reverse order, and needs no
InvMixColumn-transformed key set. The cost is the longest path in the
design: KeyAddition, InvMixColumn, a mux, InvShiftRow, InvSubstitution and a
mux, all between two register stages.

| unit | round | sel1 | sel2 | subkey |
|---|---|---|---|---|
| encryption | initial | 0 | 0 | k0 |
| | iterations 1–9 | 1 | 0 | k1 … k9 |
| | final | 1 | 1 (MixColumn bypassed) | k10 |
| decryption | initial | 0 | 0 | k10 |
| | iterations 1–9 | 1 | 1 (InvMixColumn used) | k9 … k1 |
| | final | 1 | 0 | k0 |

The multiplexer inputs are numbered as in the table: sel = 0 picks the
first input named in each bracket above.

### Cycle timing of one block

The subkey RAM has a registered read, as an FPGA block RAM does. So a
subkey must be addressed one clock before the round that uses it:

| clock | state | what happens |
|---|---|---|
| t | idle | `start` sampled; key address set to k0 (k10 for decryption) |
| t+1 | fetch | RAM reads the first subkey |
| t+2 | round 0 | initial round; `in_taken` pulses, so R2 may be refilled |
| t+3 … t+12 | rounds 1–10 | one round per clock; the next subkey is addressed each clock |
| t+13 | idle | `done` pulses; `outRound` holds the result; a new `start` is accepted |

So consecutive blocks start 13 clocks apart. The result stays in `outRound`
until the following block's initial round overwrites it, two clocks after
the next start. MainFSM copies it into R3 in the `done` cycle, or later if
R3 is still occupied.

## Key loading and the subkey memory

1. Pulse `NewKey`. MainFSM enables KeyEntryFSM, which then accepts eight
   words on `KeyIn`.
2. When the key is complete and no block is inside the cipher, MainFSM
   copies it into R1. One clock later it starts KeyScheduleFSM.
3. KeyScheduleFSM writes the key to address 0. It then writes subkeys 1 to
   10, one per clock, in 11 consecutive clocks. Each subkey comes from the
   previous one (words w0..w3):
   `t = SubWord(RotWord(w3)) ^ {rcon,24'h0}`, `w0' = w0^t`, `w1' = w1^w0'`,
   `w2' = w2^w1'`, `w3' = w3^w2'`, with rcon = 01, 02, 04, …, doubled in
   GF(2^8) each step. SubWord uses four S-boxes of its own.
4. `KeyReady` rises one clock after the expansion ends.

The RAM has a single port. During expansion the port belongs to
KeyScheduleFSM. At all other times the address comes from the running cipher
unit, and the read data goes straight to that unit's KeyAddition. No block
starts between `NewKey` and `KeyReady`. Blocks already in flight finish
with the old key first.

## Control: MainFSM and the I/O channels

All three 16-bit channels use a valid/ready handshake. A word moves on a
rising edge where both are high. Each 128-bit value moves as eight words,
most significant half-word first. Byte *i* of a 128-bit word is bits
`[127-8i -: 8]`, and the AES state is filled column by column. This matches
the byte order of the FIPS-197 test vectors, so those vectors apply
unchanged.

* `StartPipeline` samples `Decrypt` as the mode of the run and sets
  `Running`. `FinishPipeline` clears `Running`. Blocks already started still
  complete and leave.
* InputFSM assembles a block and holds it. MainFSM moves it to R2 when R2 is
  empty, or in the very clock the cipher releases R2 (`in_taken`). So the
  next block is normally waiting in R2 before the cipher finishes the
  current one. A third block can wait inside InputFSM.
* While running with a valid key, a full R2 starts the selected cipher unit
  as soon as that unit is idle.
* A result moves to R3 if R3 is empty, or if R3 is handed to OutputFSM in
  the same clock. Otherwise it waits in `outRound`. `Stall` is high during
  that wait, and no new block starts.
* OutputFSM sends R3's content as eight words and frees itself on the last
  word.

Blocks leave in the order they entered. With words offered on every clock
and `OutputReady` held high, the cipher is the bottleneck, so a result
leaves every 13 clocks. Input and output need 8 clocks per block each.

### Top-level ports (`rijndael_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `NewKey` | in | 1 | pulse: load a new key |
| `KeyIn`, `KeyInValid` / `KeyInReady` | in / out | 16, 1 / 1 | key words |
| `StartPipeline`, `FinishPipeline` | in | 1 | pulses: start / stop processing blocks |
| `Decrypt` | in | 1 | mode of the run, sampled with `StartPipeline` |
| `Input`, `InputValid` / `InputReady` | in / out | 16, 1 / 1 | data words |
| `Output`, `OutputValid` / `OutputReady` | out / in | 16, 1 / 1 | result words |
| `KeyReady`, `Running`, `Stall` | out | 1 | status |

## What is taken from the architecture and what was chosen here

These parts follow the original architecture description:
* the unit list and the connections;
* the 16-bit channels and the 11 × 128 subkey memory;
* both round datapaths, with the mux numbering and the sel1/sel2 values;
* one initial round, nine iterations and one final round;
* 13 clocks per block;
* 16 parallel S-boxes per substitution, each a 256 × 8 table;
* ShiftRow as pure wiring.

These are choices of this design:
* **Interfaces.** The valid/ready handshake on every channel, and the
  start/busy/done/in_taken strobes between the units.
* **Control signals.** The `Decrypt` input. The architecture shows no mode
  input, but it has both cipher units. The exact meaning of `NewKey`,
  `StartPipeline` and `FinishPipeline`.
* **Subkey memory.** The key sits at address 0. The RAM has one port and a
  registered read. The fetch cycle uses this read latency to make up the 13
  clocks.
* **Key schedule.** One subkey per clock.
* **Registers.** The *full* flags on R1–R3, and the stall behaviour.
* **Standard content.** The algorithm definition supplies the S-box
  contents, the ShiftRow offsets, the MixColumn matrices and the key
  expansion. These are standard AES.

Known differences from the reported FPGA build:
* The reported implementation used 37 block ROMs. This RTL has 36 S-box
  tables: 16 forward and 16 inverse in the two cipher units, plus 4 in the
  key schedule. How they map to ROMs is up to the synthesis tool.
* The reported 75 MHz clock and 84 % device use (4,325 slices on an
  XC2V1000-4) have not been reproduced. They depend on the FPGA tools.
* The planned CBC, CFB and OCB modes of operation are not part of this
  design.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends with
a line `TB_RESULT checks=N failures=M`. The reference model `tb/aes_ref_pkg.sv`
is written independently of the RTL: the S-box comes from an exhaustive
inverse search plus the bitwise affine matrix, and the column mixers use a
generic GF multiply. Its results are tied to the published FIPS-197
Appendix B and C.1 vectors.

* Round operations: the FIPS-197 Appendix B round-1 intermediate values,
  then 200 random states. The S-box testbench sweeps all 256 entries of
  both tables.
* `tb_aes_encryption_fsm`, `tb_aes_decryption_fsm`: both published vectors
  and 40 random key/block pairs, run back to back. They check `in_taken`
  at start+2 and the 13-clock spacing.
* `tb_aes_key_schedule_fsm`: the order and content of the 11 writes, the
  published round key 10, and readback.
* `tb_rijndael_top`: end-to-end, with the top at its defaults. It loads
  the Appendix B key and encrypts 24 blocks, the first half back to back
  with the 13-clock spacing checked. During the second half the output
  handshake is throttled, which forces stalls. It then decrypts all 24
  blocks back, and it loads the C.1 key while a run is active. Finally it
  decrypts and encrypts the C.1 vectors. It counts each mechanism (key
  load, encryption, decryption, mode switch, R2 refill during a block,
  stall, 13-clock back-to-back, key change while running). A mechanism that
  never occurs is a failure.

To simulate with Verilator (version 5), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_rijndael_top.sv --top-module tb_rijndael_top
./obj_dir/Vtb_rijndael_top
```

Replace `tb_rijndael_top` with any other testbench name to run that one.
The whole end-to-end run takes well under a second.

## Changing it

* `NR` (default 10, in `aes_pkg`) sets the round count of the cipher units
  and the key schedule. Only 10 matches a 128-bit key. The key schedule
  does not implement the 192- and 256-bit variants.
* `BUS` on the I/O units sets the channel width. It must divide 128. The
  top uses 16.
* To remove the fetch cycle (12 clocks per block), give the subkey RAM a
  combinational read. Then move the key address in the cipher units one
  clock earlier.
