# Temporal IDEA: a block cipher whose key also has a time dimension

This is synthesizable SystemVerilog for an IDEA encryption engine in which
time acts as a second part of the key. A brute-force attacker who searches a
128-bit key space is limited mainly by how fast each guess can be tested. This
engine makes each guess depend on the timing too. While a block is being
processed, the 128-bit key turns left by one bit on every clock. Between two
rounds, the engine waits for a number of clocks that four bits of the turning
key decide. When the wait ends, it takes the next round's sub-keys from
wherever the key has turned to. The sub-keys a block sees therefore depend
both on the key and on the exact clock at which each set was taken. A
receiver holding the right key gets them back only by waiting the same
number of clocks.

The cipher itself is unchanged IDEA: 64-bit blocks, eight rounds plus an
output transformation, and arithmetic modulo 2^16, modulo 2^16+1 and XOR.
Only the way the 52 sub-keys are produced is different. If the engine is fed
the standard IDEA sub-keys, it reproduces the published IDEA test vector.
The testbench `tb_idea_pipeline` checks exactly that.

## How one block moves through the engine

```
            +-------------------- kgtc (key generator / time controller) -------------------+
 key_in --> | key register (turns 1 bit/clock) -> time bits {k120,k73,k57,k35} -> counter == |
            +-----------+-------------------------------------------------+-----------------+
                        | key_pick[s] + top 96 key bits                    | stage_open[s]
                        v                                                  v
 data_in -> [in reg] -> round 1 -> [reg 1] -> round 2 -> [reg 2] ... round 8 -> [reg 8] -> output transform -> [out reg] -> data_out
                        ^ sub-key slice s1..s6                                          ^ s49..s52
                        +-------------- 52-word sub-key bank (idea_pipeline) -----------+
```

There are nine stages: round 1 to round 8, then the output transformation.
For every stage, with the counter restarting at 0, the controller does this:

| counter value | what happens |
|---|---|
| 0 | The time value `T` is read from key bits 120, 73, 57 and 35 (bit 120 is the MSB). |
| `T` | The key has now turned `T` bits. Its top 96 bits become the stage's six sub-keys (`K1` = bits 127..112). The output stage uses the top 64 bits. |
| `T`+1 | The round registers its first half (steps 1 to 4). |
| `T`+2 | The round result is ready. The register behind the stage opens, the counter restarts, and the next stage begins. |

A stage lasts `T + 3` clocks, and the key turns by the same number of bits
during it. With four time bits, `T` ranges from 0 to 15. A stage therefore
takes 3 to 18 clocks, which is 12 to 72 ns with the 4 ns clock of the worked
example. A whole block takes 27 to 162 clocks. Between blocks the key stays
where the last block left it, so the next block gets new sub-keys. The key
turns only while a block is being processed, so the schedule depends only on
the key and on how many blocks came before.

Two consequences:

- The time value is a function of the key. A legitimate user always gets the
  same short wait. A key guessed wrongly gives different waits and different
  sub-keys.
- The all-ones and all-zeros keys turn into themselves. Every stage then
  gets the same sub-keys, and such keys gain nothing from the time dimension.

## Decryption

IDEA decrypts with the same round hardware and a transformed key set. The
first decryption round needs the inverses of the *last* encryption sub-keys,
`s49..s52`, together with `s47` and `s48`. In this scheme those sub-keys
exist only at the end of the timed schedule. The engine therefore decrypts a
block in three phases:

1. **Replay.** The controller runs exactly the same timed schedule as the
   sender did for this block, with the same waits and the same key turns. It
   writes each picked set into the sub-key bank and moves no data.
2. **Invert.** `idea_key_inverter` builds the 52 decryption sub-keys. It uses
   one sequential `idea_mul_inv`, which computes x^65535 mod 65537 in 16
   clocks. The inverter takes 306 clocks. The new set is loaded into the bank
   in one clock, following this table:

   | decryption stage | K1 | K2 | K3 | K4 | K5 | K6 |
   |---|---|---|---|---|---|---|
   | round 1 | inv s49 | -s50 | -s51 | inv s52 | s47 | s48 |
   | round r = 2..8 | inv s(55-6r) | -s(57-6r) | -s(56-6r) | inv s(58-6r) | s(53-6r) | s(54-6r) |
   | output | inv s1 | -s2 | -s3 | inv s4 | | |

   Here inv is the inverse modulo 65537 and `-` is negation modulo 65536.
3. **Run.** The block passes through the nine stages, two clocks each.

Decryption latency is the schedule length plus 326 clocks. A receiver that
loads the same key and decrypts the blocks in the order they were encrypted
recovers the plaintext. A receiver that is one block out of step does not.

## The round and its arithmetic

`idea_round` implements the fourteen IDEA steps. `(*)` is multiplication
modulo 65537, in which the word 0 stands for 65536. `(+)` is addition
modulo 65536.

```
s1 = X1 (*) K1   s2 = X2 (+) K2   s3 = X3 (+) K3   s4 = X4 (*) K4     <- registered
s5 = s1^s3   s6 = s2^s4   s7 = s5 (*) K5   s8 = s6 (+) s7   s9 = s8 (*) K6   s10 = s7 (+) s9
Y  = (s1^s9, s3^s9, s2^s10, s4^s10)
```

IDEA swaps the two middle words between rounds. In the output order above,
that swap has already been applied, so rounds connect straight through. The
output transformation then takes the middle words crossed,
`(X1 (*) K1, X3 (+) K2, X2 (+) K3, X4 (*) K4)`, which undoes the swap after
round 8.

`idea_mul_mod` forms the 17x17-bit product and reduces it with
2^16 = -1 (mod 65537): the result is the low half minus the high half, plus
65537 if that difference is negative.

Each round registers its first half. Its result is therefore valid on the
second clock edge after its sub-keys are written, and this is the two-count
allowance the controller waits for.

## Files

| file | role |
|---|---|
| `rtl/idea_pkg.sv` | widths and packed types. Index 0 is the most significant word, so `X1 = block[0]` and `s1 = keys[0]` |
| `rtl/temporal_idea.sv` | top: mode control, handshake, connects the three parts below |
| `rtl/kgtc.sv` | key generator and time controller |
| `rtl/idea_pipeline.sv` | input register, 8 rounds, output transformation, gated stage registers, sub-key bank |
| `rtl/idea_round.sv` | one two-clock round |
| `rtl/idea_output_transform.sv` | final transformation |
| `rtl/idea_mul_mod.sv` | multiplier modulo 2^16+1 |
| `rtl/idea_key_inverter.sv` | encryption to decryption sub-keys |
| `rtl/idea_mul_inv.sv` | inverse modulo 2^16+1 |

## Using the top module `temporal_idea`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load`, `key_in` | in | 1, 128 | load a key (only while `ready`) |
| `start`, `decrypt`, `data_in` | in | 1, 1, 64 | begin one block in the chosen mode (only while `ready`; ignored otherwise) |
| `ready` | out | 1 | idle |
| `out_valid`, `data_out` | out | 1, 64 | one-clock pulse with the result; `data_out` holds until the next result |
| `time_value` | out | `NT` | time value of the stage in progress |

Latency is counted from the clock edge that accepts `start` to `out_valid`.
For encryption it is the sum over the nine stages of `T + 3`. For decryption
it is the same sum plus 326.

Parameters:

- `NT` (default 4) is the number of time bits.
- `TIME_POS` (default `'{120, 73, 57, 35}`) gives their key positions, most
  significant first.

Sender and receiver must agree on both. The counter width follows from them,
`clog2(2^NT + 2)`. With `NT = 10`, for example, each stage can wait up to
1023 clocks. When you override `TIME_POS` with a different `NT`, pass a
typed `localparam int unsigned P [NT]`; Verilator rejects a bare
assignment-pattern literal of a different length.

## How closely this follows the scheme, and where it departs

Taken from the scheme:

- the one-bit key rotation per clock;
- four time bits at positions 120, 73, 57 and 35;
- the counter compared with the time value;
- the 96 key bits taken as a round's sub-keys when the counter matches;
- the register behind the round opened two counts later, with the counter
  then reset;
- the time bits read again from the turned key for each stage;
- eight unrolled rounds separated by controller-opened registers;
- the IDEA round steps;
- the decryption sub-key table.

Choices made here, where the scheme leaves the point open:

- **The first stage also waits.** Every stage, including round 1 and the
  output transformation, waits for its time value before taking sub-keys. An
  alternative reading gives round 1 the untouched key with no wait and opens
  each register exactly at the time value, without the two extra counts.
  This design follows the version that includes the two counts, because the
  scheme sizes its counter for it: 15 + 2 = 17.
- **The output transformation** is treated as a ninth stage that waits like a
  round and takes the top 64 key bits.
- **Other time-bit positions.** A second example of the scheme uses
  positions 126, 79, 39 and 12. That is a `TIME_POS` setting here, and it is
  tested.
- **One block at a time.** The rounds are unrolled and separated by
  registers, but a single time controller opens those registers in turn. So
  only one block is in flight, and throughput is one block per schedule, not
  one per stage.
- **Decryption replays and then inverts**, as described above. It does not
  pick decryption keys while the data moves. The scheme only says that key
  inversion is added and that the same timed key turning drives decryption.
- **Zero encoding and output transformation.** The zero-means-2^16 encoding,
  the exact output-transformation operations and the fourth entry of the
  third row of the decryption table (`inv s40`) follow standard IDEA.
- **Left to the implementation:** handshake, reset, the split of the round
  into two clocks, the sub-key bank with its bulk-load port, and the
  shared-inverter key inversion.

The reported FPGA results, about 3,100 ALUTs and 3,400 registers on a
Stratix III at about 30 MHz, are not reproduced. Generic synthesis of this
RTL gives about 3,000 flip-flop bits and 36 17x17-bit modulo multipliers:
32 in the rounds, 2 in the output stage and 2 in the inverter. The 4 ns clock
used in the timing examples is far faster than the reported 30 MHz. Only the
clock counts are checked here, not the nanoseconds.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. Expected values
come from `tb/idea_ref_pkg.sv`, an independent integer model of IDEA. It
computes inverses with Euclid's algorithm, and it contains the standard
25-bit-rotation key schedule and a clock-by-clock model of the temporal
schedule.

| testbench | what it checks |
|---|---|
| `tb_idea_mul_mod` | all corner pairs (0 = 2^16, 1, 2^16-1, 2^15) and 5,000 random pairs |
| `tb_idea_round` | 1,000 random rounds; the result only follows the input after a clock edge |
| `tb_idea_output_transform` | 2,000 random vectors |
| `tb_idea_mul_inv` | corner and random inverses, x (*) inv x = 1, and the 16-clock latency |
| `tb_idea_key_inverter` | the full 52-word table for 21 key sets, and the 306-clock latency |
| `tb_idea_pipeline` | the IDEA test vector (key 0001..0008, plaintext 0000 0001 0002 0003, ciphertext 11FB ED2B 0198 6DE5) and its decryption; random staged runs, including junk written to a stage's sub-keys after it has opened, which must not reach the result |
| `tb_kgtc` | three configurations side by side (positions 120/73/57/35, positions 126/79/39/12, ten bits); checks the clock of every pick and every opening, the picked bits, the time values, the schedule length and the key left for the next block; waits of 0 and of the maximum both occur |
| `tb_temporal_idea` | the top at default parameters with a 4 ns clock: streams of blocks under three keys are encrypted and decrypted, with exact latencies. It requires these events to occur: zero and maximum waits, a repeated plaintext giving a new ciphertext, `start`/`key_load` while busy being ignored, and an out-of-step receiver failing |
| `tb_temporal_idea_configs` | the top with positions 126/79/39/12 and with ten time bits, encrypting and decrypting |

To run one with Verilator 5, pass `-Wno-fatal`. The packed types use
ascending ranges, `[0:n]`, so that index 0 is the first IDEA word, and
Verilator warns about every ascending range:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/idea_pkg.sv tb/idea_ref_pkg.sv tb/tb_temporal_idea.sv \
    --top-module tb_temporal_idea -o sim
./obj_dir/sim
```

Replace `tb_temporal_idea` with any other testbench name. All of them finish
in well under a second. The modules also contain concurrent assertions,
which `--assert` enables:

- at most one stage is picked or opened per clock;
- every opening comes exactly two clocks after its pick;
- the controller state agrees with what is running.
