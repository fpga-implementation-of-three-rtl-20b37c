# RC4, CAST5 and SHA-1 engines for IPSec, in SystemVerilog

Three cipher engines of the kinds IPSec uses, one per class of primitive:
the RC4 stream cipher, the CAST5 (CAST-128) block cipher and the SHA-1 hash.
Each engine implements only the loop of its algorithm, the part executed over
and over for every byte or block, and each uses the loop architecture that
suits the algorithm's data dependences:

| engine | what the loop body needs | architecture | work per pass | clocks per pass |
|---|---|---|---|---|
| RC4   | 3 dependent reads and 2 writes of a 256-byte table | iterative, the whole step in one clock | 8 bits | 1 |
| CAST5 | 16 independent-per-block Feistel rounds | pipeline that is only 1/8 full, resources reused 8 times | 64 bits | 8 |
| SHA-1 | 80 rounds chained through the state | iterative, 4 rounds unrolled per clock | 512 bits | 22 |

Throughput is `bits per pass x f_clk / clocks per pass`. For reference,
an FPGA realisation of this architecture (Virtex-II class) has been reported
at about 19 MHz for RC4 (155 Mbit/s), 100 MHz for CAST5 (800 Mbit/s) and
39 MHz for SHA-1 (900 Mbit/s). Those clock rates were not reproduced here.
The RTL fixes the clocks per pass, and `tb_ipsec_throughput` measures them
under continuous load: 8.0 bits per clock for RC4 and for CAST5, and 23.3
for SHA-1.

The three engines share nothing. `ipsec_crypto_top` places them side by side,
each with its own clock, its own active-low synchronous reset and its own
ports.

## What is outside the engines

* **CAST5 key schedule.** The 16 subkey pairs (`Km`, 32 bits; `Kr`, 5 bits)
  are computed elsewhere and written into the subkey memory.
* **CAST5 S-box constants.** The four 256 x 32 tables S1..S4 of the cipher
  are written once after power-up through a load port. They play the role of
  initialised block ROMs. The RTL does not contain the standard constants.
* **SHA-1 padding and HMAC.** The SHA-1 engine takes blocks that are already
  padded (append `1`, zeros, then the 64-bit bit length). HMAC, if wanted, is
  built by the host from two hash runs.
* **Bus interface.** Each engine's data ports are brought out as they are.
  No PCI or other host bus is included.

## RC4: one keystream byte per clock

RC4 cannot be parallelised: each table access needs the value read before it.
The design therefore keeps the 256-byte state `S` in flip-flops
(`rc4_sbox_array`). Three combinational read ports and two write ports let
one clock perform a whole step:

```
i' = i + 1;   a = S[i'];   j' = j + a;   b = S[j'];   t = a + b
K  = (t == j') ? a : (t == i') ? b : S[t]      // S after the swap
S[i'] <= b;   S[j'] <= a                        // swap, at the clock edge
out <= in ^ K
```

The swap is written only at the clock edge. The third read therefore sees
the table as it was before the swap, and the two swapped entries are
forwarded by comparing `t` with `j'` and `i'`. The critical path is the
chain of three 256-to-1 byte multiplexers with two 8-bit adders between
them. That path sets the clock.

Key setup reuses the same datapath. After `start`, one clock fills `S` with
the identity. Then 256 clocks each do `j += S[i] + key[i mod len]` and swap.
The key lives in `rc4_key_ram`, 16 bytes with a registered read. Its address
runs one clock ahead of the step that uses the byte. `ready` rises 258 clocks
after the clock that sampled `start`. After that, every clock with `in_valid`
yields `out_valid`/`out_data` on the next clock. The same operation encrypts
and decrypts.

## CAST5: the partially empty pipeline

This is the least obvious part of the design. A classic fully unrolled
pipeline of 16 rounds would need 16 copies of each S-box lookup, that is 32
dual-ported ROMs, plus 22 adders and 21 subtracters (type 1, 2 and 3 round
functions each use a different mix of `+`, `-` and `^`). The design instead
accepts a block only every `N_SHARE = 8` clocks and reuses each round unit
for 8 consecutive rounds:

```
           phase 0..7                phase 0..7
in --> [unit 0: rounds 1..8] --> [unit 1: rounds 9..16] --> out
        (one round per clock)     (one round per clock)
```

* There are `STAGES = 16 / N_SHARE` units (2 by default). Unit `s` holds
  one block and in clock `phase` applies round `s*N_SHARE + phase` of that
  block's sequence.
* One free-running phase counter drives all units in lock step. At
  `phase = N_SHARE-1` every block moves on to the next unit, the last unit's
  result is registered as `out_block`, and unit 0 loads the new input. This
  is the only clock in which `in_ready` is high.
* In every clock each unit makes exactly one lookup in each of S1..S4. Each
  S-box is therefore one memory with `STAGES` read ports (`cast5_sbox_rom`,
  dual-ported by default): four memories in total instead of 32. The subkey
  memory has one read port per unit in the same way.
* Each round unit (`cast5_round`) is combinational. It computes
  `I = (Km op R) <<< Kr`, looks up the four bytes of `I`, combines them
  with the type's operators, and returns `(R, L ^ f)`.

The round number, not the unit, selects the subkey and the function type.
For decryption (`in_decrypt`) the sequence runs from round N down to round 1,
and each round keeps its own type. For keys of 80 bits or less CAST5 uses 12
rounds (`in_short`). Sequence slots 12..15 then leave the block unchanged,
so the block still leaves after the same 16 clocks. Mode bits travel with
each block, so consecutive blocks may use different modes.

Timing: a block accepted at clock edge `E` appears with `out_valid` at edge
`E+16`. With input always offered, one block is accepted every 8 clocks.
Blocks must be independent (ECB-like use or interleaved streams). A feedback
mode such as CBC would have to wait for each result, giving one block per 16
clocks.

The sharing factor is a parameter. `N_SHARE = 16` gives a single iterative
unit with one-port memories. `N_SHARE = 4` gives four units and 4-port
memories, at twice the throughput.

## SHA-1: four rounds per clock

SHA-1 feeds each round's result into the next, so blocks cannot overlap in a
pipeline. `sha1_core` instead unrolls the loop: `sha1_round4` performs
`UNROLL = 4` rounds as one combinational block. This is cheaper than four
round delays because in round `t` only the term `ROTL5(A) + f_t(B,C,D)`
depends on the previous round's result. The E operands of four consecutive
rounds are the incoming E, D, C and ROTL30(B). So the sums `E + W_t + K_t`
of all four rounds are formed at the block's input, in parallel, and each
further unrolled round adds about one adder and an `f` to the critical path.
`sha1_msg_schedule` keeps a 16-word window of `W` and produces four new
words per clock to keep pace.

A block takes 22 clocks. One clock accepts it (`blk_valid && blk_ready`),
loading the window and A..E. Twenty clocks run the 80 rounds. One clock adds
A..E into H0..H4 and pulses `digest_valid`, and `blk_ready` is high again in
that same cycle. `blk_first` starts a new message from the standard initial
value. Otherwise the block continues from the current H. Round-group
boundaries (multiples of 4) never straddle the 20-round changes of `f_t` and
`K_t`.

## Interfaces at a glance

All signals are synchronous to the engine's clock. Resets are active-low and
synchronous.

* `rc4_core`: `key_we/key_waddr/key_wdata`, `key_len` (1..16 bytes),
  `start` -> `ready`; then `in_valid/in_data` -> `out_valid/out_data`, one
  clock later.
* `cast5_core`: `sk_we/sk_waddr/sk_wdata` (entry i-1 = round i),
  `sb_we/sb_sel/sb_waddr/sb_wdata` (sel 0..3 = S1..S4);
  `in_valid/in_ready/in_block/in_decrypt/in_short` ->
  `out_valid/out_block`. The block is `{L, R}` with L in bits 63:32. The
  output is `{R_N, L_N}`.
* `sha1_core`: `blk_valid/blk_ready/blk_data/blk_first` ->
  `digest_valid/digest`. `W_0` is bits 511:480. `H0` is the top word of the
  digest.

## How far it can be trusted, and where it departs

Verified in simulation:

* RC4 against published test vectors ("Key"/"Plaintext",
  "Wiki"/"pedia", "Secret"/"Attack at dawn") and against a reference model,
  for random keys of 1 to 16 bytes.
* SHA-1 against the standard digests of "abc", the empty string and the
  448-bit two-block message, and against a reference model for random
  messages.
* CAST5 against a reference model of the round sequence, in all four modes,
  plus encrypt-then-decrypt round trips. The tests use random S-boxes and
  subkeys. No published CAST5 test vector was checked, because that needs
  the standard tables and key schedule, which are outside the RTL.
* Clock counts: 1 byte/clock for RC4, 8 clocks/block with 16-clock latency
  for CAST5, 22 clocks/block for SHA-1.

This design's own choices:

* The S-box and subkey memories read combinationally, so that one round fits
  in one clock. FPGA block ROMs read synchronously. Mapping onto them would
  need the address registered one clock ahead, or two clocks per round.
* As written, each CAST5 round unit has four adders and four subtracters:
  one of each for combining `Km` with `R`, and three of each for combining
  the S-box outputs, selected by round type. Two units give 8 adders and 8
  subtracters, plus 4 S-box memories; a fully unrolled 16-round pipeline
  would need 22, 21 and 32 respectively.
* The RC4 register array is written as a plain array, not as bit slices.
* All handshakes, the split of SHA-1's 22 clocks into 1 + 20 + 1, the
  key-length input of RC4 and the load ports are this design's own.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/cast5_pkg.sv rtl/sha1_pkg.sv \
  tb/cast5_ref_pkg.sv tb/sha1_ref_pkg.sv tb/rc4_ref_pkg.sv \
  tb/tb_ipsec_crypto_top.sv --top-module tb_ipsec_crypto_top -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` to run a single block:
`tb_rc4_core`, `tb_rc4_sbox_array`, `tb_rc4_key_ram`, `tb_cast5_core`,
`tb_cast5_round`, `tb_cast5_sbox_rom`, `tb_cast5_subkey_mem`,
`tb_sha1_core`, `tb_sha1_round4`, `tb_sha1_msg_schedule`.
`tb_ipsec_crypto_top` runs all three engines at once at their default sizes.
`tb_ipsec_throughput` keeps each engine busy back to back and prints the
throughput at the reported clock rates.
It also prints how often each mechanism occurred: key setups, input gaps,
each CAST5 mode, back-to-back blocks, waits for `in_ready`, new and chained
SHA-1 messages.

The reference models are in `tb/*_ref_pkg.sv`. They are straightforward
software versions of each algorithm, without the hardware's unrolling or
sharing.

## Files

| file | contents |
|---|---|
| `rtl/ipsec_crypto_top.sv` | the three engines side by side |
| `rtl/rc4_core.sv`, `rc4_sbox_array.sv`, `rc4_key_ram.sv` | RC4 engine, state register array, key memory |
| `rtl/cast5_pkg.sv`, `cast5_core.sv`, `cast5_round.sv`, `cast5_sbox_rom.sv`, `cast5_subkey_mem.sv` | CAST5 types, shared pipeline, round, S-box and subkey memories |
| `rtl/sha1_pkg.sv`, `sha1_core.sv`, `sha1_round4.sv`, `sha1_msg_schedule.sv` | SHA-1 constants, controller, 4-round block, message schedule |
| `tb/` | one self-checking testbench per module, plus the reference models |
