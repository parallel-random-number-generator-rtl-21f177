# Parallel LFSR random number generator

This RTL fills a block of RAM with pseudo-random 32-bit numbers and produces fifteen of them per clock. The numbers come from a 32-bit Galois linear feedback shift register (LFSR). A plain LFSR is sequential: each number is the next state of the previous one. This design breaks that chain so that many outputs can be computed at once. Output number `k` of a run is **one** LFSR step applied to its own seed:

```
rnd[k] = step(seed + k * 314159265)      (arithmetic modulo 2^32)
```

Here `314159265` is the first nine digits of pi, used as a seed stride. Each output depends only on `seed` and `k`, so fifteen lanes compute `k = base .. base+14` in the same clock. A sequential software reference that uses the same seeding produces the same list of numbers.

A run copies the numbers into an external true dual-port block RAM through both of its ports at once. A host can then read them back.

How far to trust the numbers: the seeding trick makes neighbouring outputs related. `rnd[k]` and `rnd[k+1]` are single LFSR steps of seeds that differ by a constant, so the sequence has visible structure. It is not the maximal-length LFSR sequence, and it is not suitable for cryptography. Use it where a fast and reproducible stream is enough, such as test-pattern generation or undemanding Monte Carlo work.

## The LFSR step

`galois_lfsr_step` shifts the 32-bit state right by one place. If the bit shifted out was 1, it XORs the toggle mask `0x80200003` into the result. The mask has bits 31, 21, 1 and 0 set, which is the feedback polynomial x^32 + x^22 + x^2 + x + 1. Another way to see it: the LSB rotates into the MSB, and when that bit is 1 the bits at the polynomial positions are inverted. Iterated, this polynomial visits all 2^32 − 1 non-zero states. Here it is applied only once per output. The all-zero state maps to itself, so a lane whose seed is 0 outputs 0.

Reference vector: for seed 3429426846, the first four outputs are 1714713423, 4021373852, 2028872688 and 2188049475.

## Datapath

```
 seed,n ──► prng_gen_ctrl ──group_seed──► prng_lane_bank (15 × adder + LFSR step)
                │  base, lane_we                     │ rnd[0..14]
                └─────────────────────────► rng_buffer (16000 × 32 array) ──rd_a/rd_b──► dinA/dinB
                                                     ▲ idx_a/idx_b
 startAddr, readRqst ──► bram_port_ctrl ─────────────┘──► weA/weB, addrA/addrB
```

- **`prng_gen_ctrl`** latches `seed` and `n` when a run starts. On each clock it gives the lane bank `group_seed = seed + base*314159265`, then advances that register by `15*314159265`. No multiplier is needed. It enables the array writes of the lanes whose index `base+i` is below `n`. After the last group it raises `done` (the `prngDone` output). `done` stays high until the next run.
- **`prng_lane_bank`** has fifteen lanes. Lane `i` adds the constant `i*314159265` to the group seed and applies one LFSR step.
- **`rng_buffer`** is the 16000-word register array that collects a run. It has fifteen write ports, one per lane, and two read ports, one per RAM port. It is big: 512 kbit of flip-flops. On an FPGA it would normally be mapped to distributed RAM or reorganised. Here it is a plain array.
- **`bram_port_ctrl`** copies the array into the block RAM and then runs the read-back. Port A handles entries `0 .. n/2−1` and port B entries `n/2 .. n−1`. Here `n/2` rounds down, so for odd `n` port B has one entry more and port A sits idle for the last clock. Entry `i` goes to RAM address `startAddr + i`, modulo 2^14.
- **`prng_top`** ties these together and brings out the RAM ports. `enA`/`enB` follow `prngDone`, and the write enables are high only during the copy.

## A run, clock by clock

A run is started by `activate` at clock edge 0. `activate` only counts while `busy` is low. `seed`, `n` and `startAddr` are sampled with it.

| phase | clock edges | outputs |
|---|---|---|
| generate | 1 .. G, with G = ceil(n/15) | `busy` high |
| set-up | G+1 | `prngDone` high, `busy` high |
| copy | G+2 .. G+1+ceil(n/2) | `weA`/`weB` active, `busy` high |
| read-back | after that, one pair per clock with `readRqst` | `readReady` high |

So a run of n numbers keeps `busy` high for `ceil(n/15) + 1 + ceil(n/2)` clocks. At 100 MHz:

| n | generate | generate + copy |
|---|---|---|
| 1 | 10 ns | 30 ns |
| 10 | 10 ns | 70 ns |
| 100 | 70 ns | 580 ns |
| 1000 | 670 ns | 5.68 µs |
| 10000 | 6.67 µs | 56.7 µs |
| 16000 | 10.67 µs | 90.68 µs |

The seed has no effect on timing. The copy takes most of the time because the RAM takes only two words per clock while the lanes produce fifteen.

**Read-back.** While `readReady` is high, each clock with `readRqst` high reads the next pair. Port A reads from the first half of the run and port B from the second. One clock later `readValid[1:0]` ({B, A}) flags `readA`/`readB`. These are the RAM outputs, and the RAM is assumed to have one clock of read latency. At the same time `checkA`/`checkB` carry the same entries taken from the internal array, so the host can compare the two copies. For odd `n` the last pair has only `readValid[1]` set. After the last pair `readReady` falls. A new `activate` is accepted at any time outside `busy`, including in the middle of a read-back, which it abandons.

**Edge cases.** A count above 16000 is limited to 16000. With `n = 0`, `prngDone` is high right after the `activate` edge, nothing is written and `busy` never rises. `rst` is synchronous and active high.

## Parameters

| parameter | default | where |
|---|---|---|
| `LANES` | 15 | lanes per clock |
| `MAX_N` | 16000 | array depth: 64 kB of 32-bit words, counted as 64×10^3 bytes |
| `ADDR_W` | 14 | block RAM address width |
| `SEED_STRIDE` | 314159265 | seed distance between consecutive outputs |
| `TAP_MASK` | 0x80200003 | LFSR toggle mask |

The shared constants are in `rtl/prng_pkg.sv`. `galois_lfsr_step` takes `WIDTH` and `TAPS`, so other maximal-length polynomials can be used. The testbench checks a 16-bit instance with mask `0xB400` (x^16 + x^14 + x^13 + x^11 + 1) for its full period of 65535.

## Where this design makes its own choices

- **Address width 14.** The original block diagram labels the RAM address and `startAddr` 10 bits wide. That cannot reach the 16000-word capacity the same design is sized and timed for. This design uses 14 bits so that a full 16000-word run fits.
- **Interface additions.** `activate`, `readReady` and `readValid` were added. The `readRqst` protocol and the meaning of `checkA`/`checkB` (array words aligned with the RAM output) are also this design's own.
- **Timing details.** Address and data go to the RAM combinationally from the counters, with one set-up clock before the copy. This makes the cycle counts above exact.
- **Other choices.** The count limit, the `n = 0` behaviour, the write gating on port A for odd `n` and the synchronous reset are this design's own.
- **Block RAM.** The block RAM itself is not part of the RTL. It is a vendor macro connected at the `clkX/enX/weX/addrX/dinX/doutX` ports. `tb/bram_tdp_model.sv` is a behavioural stand-in with 2^ADDR_W words, read-first, one clock of latency.
- **Host.** The host processor that consumes the numbers is not included.

## Files

`rtl/`: `prng_pkg.sv`, `galois_lfsr_step.sv`, `prng_lane_bank.sv`, `prng_gen_ctrl.sv`, `rng_buffer.sv`, `bram_port_ctrl.sv`, `prng_top.sv` (top).

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), the reference model `tb_prng_ref_pkg.sv` and the RAM model `bram_tdp_model.sv`. The reference model writes the LFSR step in the rotate-and-invert form, independently of the RTL. Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_prng_top` runs the whole design at its default size. It uses the reference four-number example, n = 1, 10, 100, 1000, 10000 and 16000 with two seeds, 1000 numbers from seed 5462994, `n = 0`, an over-limit count, odd counts and wrapping start addresses. For each run it checks:
- the cycle counts against the timing table;
- every RAM word;
- every read-back pair.

It also confirms that each mechanism above happened at least once. It takes well under a second.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/prng_pkg.sv tb/tb_prng_ref_pkg.sv tb/tb_prng_top.sv \
    --top-module tb_prng_top -o sim
./obj_dir/sim
```

To run a block's own testbench, swap in its `tb/tb_<module>.sv` and top-module name. Lint a module with `verilator --lint-only -Wall -Irtl rtl/prng_pkg.sv rtl/<module>.sv`. The only warnings are package constants that a given module does not use.

The top has two concurrent assertions: the RAM is written only after generation is done, and the two ports never write the same address in the same clock.
