# 16-stage pipelined DES engine

This is a DES (Data Encryption Standard) encryption and decryption engine. It
handles one 64-bit block on every clock. The sixteen DES rounds are unrolled
into a sixteen-stage pipeline with one register per round. The key schedule is
reduced to fixed wiring, and the round keys are carried down the pipeline next
to their block. Because of this, every block may have its own key and its own
direction (encrypt or decrypt). A result leaves the pipeline 16 clock cycles
after its block went in, and one result leaves on every clock after that. At
166 MHz this gives 64 bit × 166 MHz = 10.62 Gbit/s.

The engine is the encryption part of a low-latency link for trading data:

    network → optical module → Ethernet MAC → TCP/IP offload → DES engine → TCP/IP offload → PCIe → host

The RTL here is the DES engine only. The MAC, the TCP/IP offload engine and the
PCIe endpoint are vendor cores in that system, and are not part of this RTL.
The engine's block stream (`din`/`dout` plus their strobes) is where they
connect.

## Files

| file | contents |
|---|---|
| `rtl/des_pkg.sv` | the DES tables (IP, IP⁻¹, E, P, PC-1, PC-2, rotation schedule, S1–S8), the stage struct, and permutation functions that are pure wiring |
| `rtl/des_sbox.sv` | one S-box, `BOX` = 1..8 |
| `rtl/des_f.sv` | the round function f(R,K) = P(S(E(R) ⊕ K)) |
| `rtl/des_round.sv` | one pipeline stage: f, an XOR and the stage register |
| `rtl/des_subkey.sv` | all sixteen round keys as wiring, the decrypt reversal, and the key delay chains |
| `rtl/des_top.sv` | the engine: IP, 16 × `des_round`, swap, IP⁻¹ |
| `tb/des_ref_pkg.sv` | a loop-based software DES that the testbenches compare against |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_des_128k` (the throughput workload) |

## Interface of `des_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | active-low asynchronous reset. It clears only the valid flags. |
| `lorun` | in | 1 | 1 = encrypt, 0 = decrypt. It is sampled with each block. |
| `in_valid` | in | 1 | `din` and `key` hold a block |
| `key` | in | 64 | DES key, standard bit 1 = bit 63. The parity bits (8, 16, …, 64) are ignored. |
| `din` | in | 64 | plaintext or ciphertext, standard bit 1 = bit 63 |
| `out_valid` | out | 1 | `dout` holds a result |
| `dout` | out | 64 | the result |

The engine has no back-pressure, so it never stalls. A block sampled at the
rising edge that ends cycle *n* shows up on `dout`, with `out_valid` high, in
cycle *n*+16. An assertion in `des_top` (`a_latency`) checks this. The engine
has no parameters because DES fixes every size. `des_pkg::ROUNDS` = 16 is the
pipeline depth.

## How the pipeline is built

**Rounds.** The initial permutation IP is wiring. It splits the block into
L0 and R0. Stage *i* computes Lᵢ = Rᵢ₋₁ and Rᵢ = Lᵢ₋₁ ⊕ f(Rᵢ₋₁, Kᵢ), then
registers the result. A stage holds only the XOR, the f function and the
register. The critical path of a stage is a 48-bit XOR, one S-box and a 32-bit
XOR. After stage 16 the halves are swapped to R16 L16, and IP⁻¹ gives the
output. The swap and IP⁻¹ are wiring after the last register. The halves travel
in `des_pkg::des_stage_t {valid, l, r}`.

**S-boxes.** Each S-box is a constant 64-entry table. It is indexed by
{b1, b6, b2..b5}, so the outer bits select the row and the inner bits select
the column. The table is read combinationally, with no ROM and no clock, and
synthesis turns it into a logic expression for each output bit. The aim is
speed: an S-box written as logic expressions is faster than one stored in a
ROM, at some cost in area.

**Key schedule as wiring.** The key schedule is the part that is easiest to
misread. PC-1, the sixteen left rotations of C and D and PC-2 only move bits.
So every bit of every round key is one fixed bit of the 64-bit key.
`des_pkg::subkey_src(round, j)` works out that bit at elaboration time:

1. PC-2 picks bit *c* of C‖D.
2. After a total left rotation of *s* places (the sum of the rotation schedule
   up to this round), bit *p* of a 28-bit half holds its original bit
   ((*p*−1+*s*) mod 28)+1.
3. PC-1 names the key bit that original bit came from.

`des_subkey` uses this as 16 × 48 plain assigns. All sixteen keys appear at
once and cost no logic.

**Carrying keys down the pipeline.** Round *i*+1 works on a block *i* clocks
after that block entered. So round key `k[i]` goes through a chain of *i*
registers. `k[0]` is not delayed, and `k[15]` goes through 15 registers. In all
this is 120 × 48 = 5760 flip-flops. For decryption the keys are reversed
(K16 first) before the chains. The direction therefore travels with the block,
and `lorun` and `key` may change on every clock. A cheaper way would be to
carry the 56 key bits along the pipeline and wire each round key out of them at
its stage. That would give the same results with 840 flip-flops. This design
keeps the structure of "generate all round keys once, then register them".

## Departures and open points

- The DES tables are not written out in the source description of this design.
  They are taken from the DES standard (FIPS 46-3). Published known-answer
  vectors check them.
- The valid strobe, the reset scope (valid flags only, with no reset on the
  data registers) and the per-block mode are choices of this implementation.
  The design itself names only an enable ("encrypt") signal, `rst_n` and the
  `LorUn` mode.
- The original description says the key-schedule circuit is "mainly realized
  by latches". This RTL uses no latches: the schedule is wiring and the
  storage is edge-triggered registers.
- The original system keeps received data "in memory" before it is encrypted.
  That buffer is not described, so it is not built. Blocks enter `des_top`
  directly.
- 128 KB (16384 blocks) takes 16400 cycles, which is 98.8 µs at 166 MHz. The
  reported hardware time for the same job is 0.00013 s. The difference is
  presumably system overhead outside the engine. The reported rate of
  10.62 Gbit/s is exactly 64 bits × 166 MHz. In one place that rate is written
  as "GB/s", which is read here as Gbit/s.
- Nothing here checks timing closure at 166 MHz. That needs FPGA place and
  route.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_des_sbox` checks that every row of every box is a permutation of 0..15.
  It also checks spot entries of the published tables.
- `tb_des_f` checks the round function on the well-known worked example
  (R0 = F0AAF0AA, K1 = 1B02EFFC7072, f = 234AA9BB) and on 2000 random pairs
  against the reference model.
- `tb_des_round` checks stage behaviour, the valid flag and asynchronous reset
  over 1000 random clocks.
- `tb_des_subkey` uses a new random key and mode on every clock. It checks all
  sixteen delayed outputs against the reference model's iterated rotations,
  and also checks K1 and K16 of key 133457799BBCDFF1.
- `tb_des_top` (end to end, default configuration) covers:
  - ten published known-answer vectors, both ways (key 0, block 0 →
    8CA64DE9C1B123A7);
  - a counter fed as both key and plaintext, in each mode;
  - back-to-back traffic with the mode switched at random;
  - random bubbles in `in_valid`;
  - a reset with blocks in flight.

  A scoreboard checks every output and its 16-cycle latency. The testbench
  also counts encryptions, decryptions, mode switches, bubbles, full-pipeline
  runs and dropped blocks, and fails if any of them never happened.
- `tb_des_128k` streams 128 KiB (16384 blocks) under one key, encrypts and
  then decrypts it, and checks every block. It also checks that each pass
  takes 16384 + 16 cycles.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/des_pkg.sv tb/des_ref_pkg.sv rtl/des_sbox.sv rtl/des_f.sv \
        rtl/des_round.sv rtl/des_subkey.sv rtl/des_top.sv tb/tb_des_top.sv \
        --top-module tb_des_top -o sim
    ./obj_dir/sim

Each testbench takes well under a second.

The reference model in `tb/des_ref_pkg.sv` reuses the tables from `des_pkg`.
The known-answer vectors are what guard against a wrong table entry. If you
change a table, run `tb_des_top`.
