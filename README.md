# BFV client encryption engine: N = 4096, 109-bit modulus, three RNS layers

This RTL implements the client-side core of BFV homomorphic encryption for a small
(IoT-class) device. It computes the two halves of a *zero encryption*

    c1 = [P1 * u + e2]_q        c0 = [P0 * u + e1]_q

and the product at the heart of decryption

    mq = [c0 + c1 * s]_q

for polynomials of degree N = 4096 in Z_q[x]/(x^N + 1). The modulus q has 109 bits and is
held in residue-number-system (RNS) form as three primes of 36, 36 and 37 bits. Adding the
encoded message to c0, and the final scale-and-round of decryption, are left to the host.

Polynomial products are computed in the NTT domain: transform u (or c1) once, multiply it
coefficient by coefficient with a key that is already in NTT form, transform back, and add
the error (or c0). So the whole engine is built around one thing: fast and cheap in-place
NTTs of 4096 coefficients.

The architecture follows the 28 nm chip described in "A 10.33 μJ/encryption Homomorphic
Encryption Engine in 28nm CMOS with 4096-degree 109-bit Polynomials for Resource-Constrained
IoT Clients". That covers the layers, the memory list, the two 13-stage datapaths per layer,
the butterfly schedules, the swap-based memory layout and the cycle counts. The section
"Choices made in this RTL" lists what was filled in here.

## Structure

```
he_engine
├── he_ctrl                    global sequencer; one control word per cycle, shared by all layers
├── sram_sp  (2048 x 80)       error polynomial, shared by all layers
└── he_layer  x3               one per RNS prime, all three in lockstep
    ├── poly_buffer  NTTB      2 x sram_dp (1024 x 80)
    ├── poly_buffer  INTTB     2 x sram_dp (1024 x 80)
    ├── sram_sp      KEY       2048 x 80 (P1, P0 or NTT(s))
    ├── twiddle_rom  x4        4096 x 40: forward and inverse table, one of each per datapath
    └── bf_datapath  x2        mod_add, mod_sub, barrett_mult and the op-select muxes
```

A coefficient is carried in a 40-bit field, and a memory word of 80 bits holds two of them.
Each layer therefore stores a whole polynomial (4096 coefficients) in 2048 words. Each layer
has 4 dual-port SRAMs, 1 single-port SRAM and 4 ROMs. Across the three layers that makes
12 x 10 kB + 3 x 20 kB + 20 kB (error) = 200 kB of SRAM and 12 x 20 kB = 240 kB of ROM.

The layers differ only in their prime, its Barrett constant, N^-1 and the ROM contents. They
receive the same control word (`lctrl_t`, defined in `he_pkg`) every cycle.

## What a command does

| command       | passes, in order                                                                  | cycles |
|---------------|-----------------------------------------------------------------------------------|--------|
| `CMD_ENC_C1`  | NTT(NTTB) · INTTB = NTTB∘KEY · INTT(INTTB) · INTTB ×= N⁻¹ · INTTB += ERR          | 30773  |
| `CMD_ENC_C0`  | INTTB = NTTB∘KEY · INTT(INTTB) · INTTB ×= N⁻¹ · INTTB += ERR                      | 18470  |
| `CMD_DEC`     | NTT(NTTB) · NTTB = NTTB∘KEY · INTT(NTTB) · NTTB ×= N⁻¹ · INTTB = NTTB + INTTB      | 30773  |

Pass lengths: NTT or INTT butterflies take 12 x 1024 + 15 = 12303 cycles, a dyadic product or
scaling 2048 + 11 = 2059, and an addition 2048 + 1 = 2049. Passes run back to back, so a full
encryption takes 49243 cycles and a decryption 30773.

A typical session:

1. Load u into NTTB, P1 (NTT form) into KEY and e2 into ERR. Run `CMD_ENC_C1`. Read c1 from INTTB.
2. Load P0 and e1. NTT(u) is still in NTTB. Run `CMD_ENC_C0`. Read c0 from INTTB.
3. To decrypt, load c1 into NTTB, NTT(s) into KEY and c0 into INTTB. Run `CMD_DEC`. Read mq from INTTB.

## The in-place NTT and the swap

This is the least obvious part of the design. Each 80-bit word holds the two coefficients
that one butterfly combines. Each layer has two datapaths, so each cycle it reads a *pair* of
words, does two butterflies and writes the pair back **to the same two addresses**. Before the
write, a swap stage regroups the four results so that each word again holds two coefficients
that meet in the *next* stage. For words (a,b) and (c,d), the butterflies give (A,B) and
(C,D), and the words written back are (A,C) and (B,D). No coefficient ever moves to another
address pair, and every access is one full-word read or write.

**Address bits track index bits.** Call the 12-bit coefficient index i. In forward stage s
(s = 0..11) the butterfly partners differ in bit b = 11 − s. Track which index bit each of
the 11 word-address bits stands for:

- In natural layout, word w holds coefficients w (low half) and w + 2048 (high half). The
  slot bit is index bit 11 and address bit p is index bit p.
- In stage s the slot bit is index bit 11 − s. Address bit 10 − s stands for the next
  stage's bit, 10 − s. So stage s reads the word pair whose addresses differ only in bit
  P = 10 − s.
- After the swap, address bit P stands for index bit 11 − s and the slot holds bit 10 − s.
- The last stage (s = 11) writes back without a swap. The result layout is word
  w = {X[2w+1], X[2w]}, with X in the bit-reversed order of a textbook in-place NTT.

The inverse transform mirrors this. Stage s pairs index bit s, and the word pair differs in
address bit P = s. It starts from the NTT layout and ends in the natural layout. So an NTT
followed by an INTT returns to where it started, and an NTT-form key must be stored in the
NTT layout.

**Twiddle factors.** Because the address tells which index bits a word holds, the twiddle
index is the textbook one. In forward stage s it is `2^s + (w >> (11 − s))`. In inverse stage
s it is `2^(11−s) + (w >> s)`. The ROMs hold psi^brv(k) and psi^−brv(k), where psi is a
primitive 8192-th root of unity mod q, so the transform is negacyclic (mod x^4096 + 1). The
inverse ends with a separate pass that multiplies by N^-1. That pass is why an INTT takes
12303 + 2059 = 14362 cycles.

**Banking.** A buffer is two 1024-word SRAMs. Word w lives in bank `^w` (the parity of its
address) at bank address `w[10:1]`. The two words of a pair differ in exactly one address
bit, so they always sit in different banks. Each bank therefore sees one read and one write
per cycle. Assertions in `poly_buffer` check this.

**No drain between stages.** The counter that enumerates pairs counts the 10 non-pair
address bits upwards. The words written in the last 15 cycles of a stage therefore have
their upper bits set, while the first words read by the next stage have them clear. No word
is read while its write-back is still in the pipeline, so a stage can start the cycle after
the previous one issued its last read. That is how 12 stages fit in 12 x 1024 + 15 cycles.
`tb_he_ctrl` checks this for every read of every pass.

## The datapath

`bf_datapath` has one ADD unit, one SUB unit and one pipelined Barrett multiplier. The op
select chooses how they are chained:

| op       | result                     | order                              | latency |
|----------|----------------------------|------------------------------------|---------|
| `DP_CT`  | x = a + b·w, y = a − b·w   | MULT (10 cycles), then ADD/SUB (1)  | 13      |
| `DP_GS`  | x = a + b, y = (a − b)·w   | ADD/SUB (1), then MULT (10)         | 13      |
| `DP_MUL` | x = a·w                    | MULT only                           | 10      |
| `DP_ADD` | x = a + b                  | ADD only, combinational             | 0       |

Each butterfly latency is an input register, 11 compute cycles and an output register. The
swap register in the layer and the SRAM read bring the butterfly write-back to 15 cycles
after the read. In product and addition passes, each datapath takes one coefficient of the
word, so one word moves per cycle.

`barrett_mult` uses mu = floor(2^(2k)/q) with k the bit length of q. The quotient estimate is
at most two too small, so two conditional subtractions finish the reduction. The work is
spread as: product, mu-product, quotient, q-product, subtraction, two corrections and three
balancing registers.

## Data formats and host port

- Coefficient-form polynomials (u, c1, c0, e1, e2, results) use word w = {x[w+2048], x[w]},
  low half in bits 39:0.
- NTT-form keys (P1, P0, NTT(s)) use word w = {X[2w+1], X[2w]}, where X is the output array of
  an in-place negacyclic Cooley-Tukey NTT (natural-order input, bit-reversed-order output)
  with the twiddle table described above. `tb_he_engine` contains such a reference NTT
  (`ref_ntt`).
- Error coefficients are signed 40-bit two's complement values, one copy for all layers. Each
  layer adds q to negative ones.
- The primes and roots are in `he_pkg`: q0 = 0xFFFFEE001, q1 = 0xFFFFC4001 and
  q2 = 0x1FFFFE0001, each ≡ 1 mod 8192.

The host port is a valid/ready word port. Each accepted beat reads or writes one 80-bit word.
`h_mem` selects NTTB, INTTB, KEY or ERR and `h_layer` selects the layer. Read data comes back
one cycle later with `h_rvalid`. The port is only ready while the engine is idle. Commands use
`cmd_valid`/`cmd_ready`. `busy` is high for exactly the cycle counts above, and `done` pulses
once at the end.

## Choices made in this RTL

These points were not specified by the source design and were chosen here:

- **Prime values and roots of unity.** Only the prime sizes (36, 36, 37 bits) were given.
- **Host interface.** The chip moves data through 28 pads with its own handshake, which is
  not described. This RTL exposes an 80-bit word port instead, and has no pad logic.
- **Memory roles during decryption.** c1 goes in NTTB, NTT(s) in KEY and c0 in INTTB. The
  product is written back into NTTB so that c0 survives until the final addition.
- **Error encoding** (signed, shared by all layers), **bank interleaving**, **address order**,
  **ROM table order** and the **split of pipeline stages**. The stage split was chosen so that
  every pass length equals the published cycle count exactly.
- **Dual-port SRAMs** are modelled as one read plus one write port, returning old data on a
  same-address collision. The SRAMs and ROMs are plain arrays, not foundry macros. The ROM
  contents are computed at elaboration from q and psi, so there are no data files.
- **Reset.** Only controller state is reset (asynchronous, active low). Memories are not
  reset.

Not implemented: message encoding, modulus switching, scale-and-round, and sampling of u, e1
and e2. In the source design these run on the host, and u and the errors arrive as inputs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench          | what it checks                                                                                             |
|--------------------|------------------------------------------------------------------------------------------------------------|
| `tb_he_engine`     | Full size, default parameters. Random ternary u and s, uniform keys, signed errors. Every coefficient of NTT(u), c1, c0 and mq on all three layers against a schoolbook negacyclic product, plus command cycle counts (30773, 18470, 30773) and host refusal while busy. Counts each mechanism (forward/inverse passes, scaling, products, both additions, swapped and unswapped write-backs, stage overlap, negative errors, back-pressure) and fails if one never occurs. |
| `tb_he_ctrl`       | Pass sequence and lengths. A coefficient-index model of every butterfly read/write: partner pairs, one read per word per stage, no read during an in-flight write, twiddle indices, final layouts. |
| `tb_he_layer`      | Product, N^-1 scaling, error addition, buffer addition, one CT stage with swap and one GS stage without, driven directly through the control word. |
| `tb_bf_datapath`   | All four ops with random and edge operands at their latencies.                                             |
| `tb_barrett_mult`  | 6000 products over the three primes, 10-cycle latency.                                                     |
| `tb_mod_add`, `tb_mod_sub` | Random and edge operands over the three primes.                                                    |
| `tb_twiddle_rom`   | Entries against square-and-multiply powers; forward·inverse = 1; psi^4096 = −1.                           |
| `tb_poly_buffer`, `tb_sram_dp`, `tb_sram_sp` | Pair access through both ports, latency, hold and collision behaviour.                |

Running a testbench with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl rtl/he_pkg.sv tb/tb_he_engine.sv \
          --top-module tb_he_engine -j 8
./obj_dir/Vtb_he_engine
```

The full-size end-to-end test simulates about 100k cycles plus host traffic and finishes in
seconds; building it takes about a minute.

Lint: `verilator --lint-only -Wall -Irtl rtl/he_pkg.sv rtl/he_engine.sv`. The remaining
warnings concern unused high bits of intermediate products, and the reset used both
asynchronously and in the `disable iff` of an assertion.

## Changing it

- The primes live in `he_pkg` (`Q_TAB`, `PSI_TAB`, `QB_TAB`). Any q ≡ 1 mod 2N below 2^39 with
  a primitive 2N-th root psi works. Barrett constants, N^-1 and ROM tables follow
  automatically.
- Pass latencies are `LAT_BF`, `LAT_MUL` and `LAT_ADD` in `he_pkg`. They must match the
  register stages in `bf_datapath`, `barrett_mult` and `he_layer`.
- N is fixed at 4096 by the address arithmetic (11-bit word addresses, 12 stages). `he_pkg`
  derives the widths from `N`, but a different N has not been tested.
