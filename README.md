# Iterative and pipelined DES in SystemVerilog

The Data Encryption Standard (DES, FIPS 46-3) enciphers a 64-bit block under a
64-bit key in sixteen identical Feistel rounds. This RTL implements DES twice,
as two engines that trade area for speed:

- an **iterative engine** that reuses one round circuit sixteen times, one
  round per clock, and so delivers one block every 16 clocks;
- an **unrolled, pipelined engine** that lays out all sixteen rounds in a row
  and cuts them into register stages. With the default two stages it takes a
  new block every clock and returns each result two clocks later.

Both engines encrypt and decrypt, chosen per block by a `decrypt` input. Both
take the full 64-bit key and ignore its eight parity bits (bits 8, 16, ..., 64).
`des_top` holds the two engines side by side with separate ports.

## The algorithm as built

The initial permutation IP splits the block into halves L(0) and R(0). Round i
computes

    L(i) = R(i-1)
    R(i) = L(i-1) xor F(R(i-1), K(i))

and after round 16 the final permutation FP (the inverse of IP) is applied to
{R(16), L(16)}. The two halves are swapped here, as the standard requires. The
round function F expands R to 48 bits (E) and xors it with the subkey. It then
sends each 6-bit slice through one of eight S-boxes (6 bits in, 4 out) and
permutes the 32 resulting bits (P).

The key schedule drops the parity bits and permutes the key into two 28-bit
halves C and D (PC1). Before each round both halves rotate left by 1 or 2
places: 1 in rounds 1, 2, 9 and 16, 2 in the others. PC2 then picks 48 bits of
C|D as that round's subkey. Decryption is the same circuit with the subkeys
used in reverse order, K(16) first.

All the tables (IP, FP, E, P, PC1, PC2, the shift schedule and the S-boxes) are
those of FIPS 46-3 and live in `rtl/des_pkg.sv`. Each permutation table lists,
for each output bit, the input bit it takes. Bits are numbered 1..64 from the
most significant end, so bit n of a W-bit vector is index `W-n`. A key or a
block written as a hexadecimal number therefore means what it means in the
standard's test vectors.

## Iterative engine (`des_nonpipelined`)

Three blocks, wired as follows:

    start, decrypt, key, din                          F(R, K)   (des_f)
            |                                          ^     |
            v                 R(i-1), K(i)             |     | F
     +---------------+  --------------------------------+     |
     |   des_ctrl    |  <-------------------------------------+
     | FSM, IP, FP,  |
     | L/R registers |  key, key number i, decrypt   +----------------+
     |               |  ---------------------------> |  des_key_sched |
     |               |  <--------------------------- |                |
     +---------------+            K(i)               +----------------+
            |
            v  busy, done, dout

- **`des_ctrl`** is a two-state FSM (IDLE, ROUND) with a 4-bit round counter.
  It holds L and R, applies IP on the way in and FP on the way out, and each
  clock forms the next L and R from F's answer.
- **`des_key_sched`** is combinational. Given the key and the key number i
  (0..15 for rounds 1..16) it rotates C and D by the total shift of rounds
  1..i+1 in one step and applies PC2. In decryption it returns subkey 16-i
  instead.
- **`des_f`** is the round function, built from eight `des_sbox` instances.

Timing, counting the cycle in which `start` is high as cycle 0:

| cycle  | what happens                                                      |
|--------|-------------------------------------------------------------------|
| 0      | `start` sampled while `busy` is low; round 1 runs on IP(`din`)    |
| 1..15  | rounds 2..16, `busy` high; key, data and mode inputs are ignored  |
| 16     | `done` high for one cycle, `dout` valid and held until the next result |

A new `start` is accepted in the cycle `done` is high, so back-to-back blocks
finish every 16 clocks. A `start` raised while `busy` is high is ignored. Key,
data and mode need to be valid only in the start cycle.

## Pipelined engine (`des_pipelined`)

Sixteen `des_round` instances and sixteen `des_key_stage` instances form a
chain. `STAGES` register stages (default 2, any divisor of 16) cut it into
groups of `16/STAGES` rounds. Stage 1 applies IP to the data and PC1 to the
key. FP is applied to the last stage's register. Each register holds a
`des_stage_t` (from `des_pkg`), which carries:

- the valid bit;
- the mode bit;
- L and R;
- the 56-bit C|D state of the key schedule.

Because every block carries its own key state and mode, consecutive blocks may
use different keys and mix encryption and decryption freely. A block presented
with `in_valid` in cycle t leaves with `out_valid` in cycle t+`STAGES`. There is
no back-pressure: the engine accepts a block every clock.

### Running the key schedule backwards

The pipeline cannot simply index subkeys as the iterative engine does, since
each stage sees only the C|D state handed to it. Encryption rotates left by the
round's shift, exactly as in the standard. Decryption rotates **right**
instead and walks the schedule backwards. This works because the shifts of all
sixteen rounds add up to 28, a full turn of each half, so C16|D16 = C0|D0.
Decryption round 1 therefore needs no rotation and gets K(16) = PC2(C0|D0)
straight away. Round j > 1 then rotates right by the shift of encryption round
18-j, undoing encryption's rounds 16, 15, ... in turn. The right shifts for
decryption rounds 1..16 are

    0 1 2 2 2 2 2 2 1 2 2 2 2 2 2 1

which `des_pkg::dec_shift` produces. After the sixteenth stage a decrypting
block's C|D ends one place left of where it started (27 right rotations in
all); nothing uses that value.

### Critical path

With two stages, each register-to-register path runs through eight rounds, each
an E-xor-S-box-P-xor. Eight rounds per stage was chosen to meet the two-clock
result time. `STAGES = 16` gives one round per stage and the shortest clock
period, at the cost of a 16-clock latency and about 120 flip-flops per stage.

## Interfaces

`des_top` (parameter `PIPE_STAGES`, default 2). All signals are synchronous to
`clk`. `rst_n` is an asynchronous, active-low reset that clears the FSM,
`done` and every pipeline valid bit.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `np_start` | in | 1 | start a block on the iterative engine |
| `np_decrypt` | in | 1 | 1 = decrypt |
| `np_key`, `np_din` | in | 64 | key (parity bits ignored), data |
| `np_busy` | out | 1 | rounds 2..16 in progress |
| `np_done` | out | 1 | one-cycle pulse, `np_dout` valid |
| `np_dout` | out | 64 | result |
| `pl_in_valid` | in | 1 | block presented this cycle |
| `pl_decrypt` | in | 1 | 1 = decrypt |
| `pl_key`, `pl_din` | in | 64 | key, data |
| `pl_out_valid` | out | 1 | `pl_dout` valid |
| `pl_dout` | out | 64 | result, `PIPE_STAGES` cycles after its input |

## Files

| file | contents |
|------|----------|
| `rtl/des_pkg.sv` | tables, `des_stage_t`, permutation, S-box and rotation functions |
| `rtl/des_ip.sv`, `rtl/des_fp.sv` | initial and final permutations (wiring only) |
| `rtl/des_sbox.sv` | one S-box, `BOX` = 1..8 |
| `rtl/des_f.sv` | round function F |
| `rtl/des_round.sv` | one Feistel round |
| `rtl/des_key_sched.sv` | indexed key scheduler (iterative engine) |
| `rtl/des_key_stage.sv` | one step of the cascaded key schedule, `ROUND` = 1..16 (pipeline) |
| `rtl/des_ctrl.sv` | FSM controller of the iterative engine |
| `rtl/des_nonpipelined.sv` | iterative engine |
| `rtl/des_pipelined.sv` | pipelined engine, `STAGES` |
| `rtl/des_top.sv` | both engines |

After coarse synthesis (yosys), the pipelined engine has about 190 flip-flops
and 128 S-box ROMs of 64x4 bits. The iterative engine has about 200 flip-flops
and 8 S-box ROMs. The permutations cost nothing.

## Verification

`tb/des_ref_pkg.sv` is a behavioural DES model written separately from the
RTL. It keeps bits in 1-based arrays, applies every table with a loop,
generates the key schedule one rotation at a time and reverses the subkey list
to decrypt. It is itself checked against three published known-answer vectors:

| key | plaintext | ciphertext |
|-----|-----------|------------|
| 133457799BBCDFF1 | 0123456789ABCDEF | 85E813540F0AB405 |
| 0123456789ABCDEF | 4E6F772069732074 | 3FA40E8A984D4815 |
| 0E329232EA6D0D73 | 8787878787878787 | 0000000000000000 |

Each module has a self-checking testbench `tb/tb_<module>.sv`. The leaf blocks
are tested exhaustively or with random inputs, plus the intermediate values of
the standard's worked example (IP, K1, K16, F and round 1 for the first vector).
`tb_des_ctrl` tests the controller alone against behavioural stand-ins for the
key scheduler and F, and checks the key-number sequence it issues. The two
engine testbenches also check the cycle counts: 16 clocks per iterative block,
including back-to-back, and exactly `STAGES` clocks through the pipeline.
`tb_des_pipelined` runs the 2-, 16- and 1-stage versions on the same random
stream of mixed keys and modes.

`tb_des_top` runs both engines at their default sizes. Ciphertexts from the
pipeline are decrypted again on the iterative engine, so the two engines check
each other. The test fails unless each mechanism below happened at least once:

- back-to-back pipeline input;
- a mode switch between pipeline blocks;
- a key change between pipeline blocks;
- an iterative encryption and an iterative decryption;
- a start ignored while busy;
- a back-to-back iterative start;
- a cross-engine round trip.

`tb_des_single_block` encrypts data 123 under key 456 (decimal) on both engines
and decrypts it back. Its ciphertext is D50C6A466AF98A72.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/des_pkg.sv tb/des_ref_pkg.sv tb/tb_des_top.sv --top-module tb_des_top
    ./obj_dir/Vtb_des_top

Replace `tb_des_top` with any other testbench name. Each runs in well under a
second.

## Where this design makes its own choices

The overall structure comes from the original design:

- the controller / key scheduler / F split of the iterative engine and the
  signals between them;
- 16 clocks per block on the iterative engine and 2 clocks per result on the
  pipelined one;
- a cascaded key schedule that rotates right to decrypt.

The following are this design's own:

- **Pipeline cut.** The two-clock figure is met with two register stages of
  eight rounds each. The original gives no stage boundaries.
- **One engine for both directions.** The original builds encryption and
  decryption as separate designs. Here a mode bit is carried with each block,
  and the iterative controller also sends it to the key scheduler.
- **Handshake and reset.** The start/busy/done protocol, round 1 on the
  accepting edge, and the asynchronous active-low reset.
- **Indexed key scheduler.** The iterative engine rotates C|D by the
  cumulative shift in one step and selects subkey 16-i to decrypt. It does not
  step a chain of single rotations. The result is the same.
- **Standard tables.** The S-boxes and permutations are those of FIPS 46-3.
  The original's simulation shows, for key 456 and data 123, a ciphertext
  (4807479423527963335 decimal) that standard DES does not give. This design
  matches the published vectors instead and gives D50C6A466AF98A72.
- **No key parity check.** The parity bits are accepted and ignored.

Verilator reports one warning, SYNCASYNCNET on `rst_n`. It arises because the
controller's assertions are disabled during reset while the flip-flops use
`rst_n` asynchronously. It is harmless.
