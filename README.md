# Polynomial multipliers for Saber

Saber, a lattice-based key encapsulation scheme, spends most of its time
multiplying polynomials of 256 coefficients in the ring
Z_q[x]/(x^256 + 1), with q = 2^13. In every such product one operand is
"secret" and has tiny coefficients in -4..+4, while the other is "public"
and has 13-bit coefficients. The designs here exploit that asymmetry:
multiplying by a number in -4..4 needs no multiplier, only a choice among
the precomputed values 0, a, 2a, 3a, 4a and a sign.

This RTL has three multiplier architectures, one of them in two sizes. All
follow the schoolbook algorithm. They trade area for speed and are meant as
alternatives for the multiplier of a Saber processor:

| unit | idea | compute cycles | cycles per command, measured |
|---|---|---|---|
| High Speed I, 256 MACs (`hs1_multiplier`, `UNROLL=1`) | one shared multiple generator feeds 256 MACs, each only a multiplexer and an adder | 256 | 278 (multiply) + 53 (store) |
| High Speed I, 512 MACs (`UNROLL=2`) | same, two public coefficients per cycle | 128 | 150 + 53 |
| High Speed II (`hs2_multiplier`) | 128 DSP multipliers, each computing four coefficient products per cycle | 128 + 3 pipeline | 153 + 53 |
| Lightweight (`lw_multiplier`) | 4 MACs; the accumulator stays in memory and is read and written every cycle | 16,384 | 18,513 (result already in memory) |

The architecture follows the paper "Optimized Polynomial Multiplier
Architectures for Post-Quantum KEM Saber". Everything about interfaces,
memory layouts, control sequencing and pipelining was not specified there
and is this implementation's own; the section "Departures and open points"
lists those choices.

## Arithmetic

The product c = a * s in Z_{2^13}[x]/(x^256 + 1) is built the schoolbook
way: for i = 0..255, add a_i * (s * x^i) to an accumulator. Multiplying by x
modulo x^256 + 1 is a *negacyclic shift*: every coefficient moves up one
place and the one that falls off the top comes back at position 0 negated.
All sums are taken modulo 2^13, so adders simply drop carries above bit 12.

Secret coefficients are stored in 4 bits as sign and magnitude: bit 3 is the
sign and bits 2:0 the magnitude 0..4. Negating a coefficient during a shift
then only flips bit 3.

## Memory formats

All units talk to a memory of 64-bit words. It has one read port, which
returns data one cycle after the request, and one write port.

* **Secret polynomial**: 16 words. Word w holds coefficients 16w..16w+15,
  with coefficient 16w+t in bits 4t+3..4t.
* **Public polynomial**: 52 words. The coefficients are packed back to back,
  so coefficient k occupies bits 13k..13k+12 of the 3328-bit stream, and
  word w is stream bits 64w..64w+63. Most words hold a coefficient that is
  split across a word boundary.
* **Result of the high-speed units**: written by `OP_STORE` in the same
  packed 52-word format.
* **Result of the lightweight unit**: 64 words, with word r holding
  coefficients 4r..4r+3 in 16-bit lanes. Each value sits in the low 13 bits
  of its lane and the top 3 bits are zero.

Saber also multiplies by polynomials with 10-bit coefficients (modulus
2^10). Supply these zero-extended to 13 bits. The low 10 bits of each
result coefficient are then the product modulo 2^10.

## Command interface (all three multipliers)

| port | meaning |
|---|---|
| `start`, `op` | one-cycle strobe while idle; `op` is `OP_MUL` (acc = a*s), `OP_MAC` (acc += a*s) or `OP_STORE` |
| `sec_base`, `pub_base`, `res_base` | word addresses of the secret, public and result areas, sampled with `start` |
| `busy`, `done` | `busy` from the cycle after `start` until `done`, a one-cycle pulse |
| `rd_en/rd_addr/rd_data`, `wr_en/wr_addr/wr_data` | memory ports; read data is expected one cycle after `rd_en` |

The high-speed units keep their accumulator in registers. `OP_MAC` adds
further products to it, which is how Saber computes inner products of
polynomial vectors. `OP_STORE` then writes the accumulator out, one word
per cycle. The lightweight unit accumulates directly into the result area.
On that unit `OP_STORE` finishes at once.

## High Speed I: centralized multiples

This unit holds the whole secret polynomial in a 256 x 4-bit register
(`secret_shift_buffer`) and the whole accumulator in 256 x 13-bit registers.
Each cycle it takes the next public coefficient a_i from the public buffer,
and `multiple_gen` computes 0, a_i, 2a_i, 3a_i = a_i + 2a_i and 4a_i once.
Each of the 256 MACs (`coeff_mac`) takes the multiple named by the magnitude
of its secret coefficient and adds it to its accumulator coefficient, or
subtracts it if the sign is negative. The secret register then shifts
negacyclically. After 256 cycles the accumulator holds the product.

All MACs share the one computation that depends only on public data. The
secret-dependent selection stays inside each MAC, and every step takes the
same time whatever the data.

With `UNROLL=2` the unit takes two public coefficients per cycle. Each
accumulator coefficient then has two MACs in a chain: the second sees the
secret register as if it had already shifted one place. The register shifts
by two per cycle, and 128 cycles finish the product.

The public buffer (`pub_coeff_stream`, 3 words) reads one word at a time
while the computation runs. It extracts coefficients through an offset
multiplexer over its two lowest words. After the secret has loaded
(17 cycles), the computation waits only 3 cycles for the first public words.

## High Speed II: four products per DSP

This is the least obvious part of the design (`dsp_quad_mult`). The unit
performs two schoolbook iterations per cycle. With the secret register
holding s' = s * x^i, it must add a_i*s'[j] + a_{i+1}*s'[j-1] to every
acc[j]. That is 512 products per cycle, and 128 DSP multipliers compute
them, four each.

**Packing.** Unit k takes the secret pair s0 = s'[2k], s1 = s'[2k+1] and the
public pair a0 = a_i, a1 = a_{i+1}. Using 15-bit lanes, let
A = a0 + a1*2^15 and S = |s0| + |s1|*2^15. Then

    A*S = a0|s0| + (a0|s1| + a1|s0|) * 2^15 + a1|s1| * 2^30

The three lanes give exactly what the accumulator needs:

* a0*s0 goes to acc[2k];
* the middle sum goes to acc[2k+1];
* a1*s1 goes to acc[2k+2]. For unit 127 this wraps to acc[0] with a minus
  sign.

Every even accumulator coefficient therefore receives two products each
cycle, so it is updated by a three-way adder.

**Signs.** The DSP multiplies magnitudes only. If s0 and s1 differ in sign,
a0 is replaced by -a0 mod 2^13 before packing. After unpacking, the middle
lane is negated if s0 < 0, and both outer lanes are negated if s1 < 0. This
gives the right signed products in all four sign cases.

**Lane overflow.** a0*|s0| < 2^15 always fits in its lane. The middle sum
can reach 16 bits and carry one into the third lane. The lowest bit of
a1*|s1| must equal a1[0] AND |s1|[0]. If the third lane's lowest bit
differs, one is subtracted from that lane.

**Fitting the DSP.** A is 28 bits and S is 18 bits, but the DSP multiplies
26 x 17 unsigned. Write A = a + a'*2^26 and S = s + s'*2^17, where a' has
2 bits and s' has 1 bit. The DSP computes a*s plus an addend C. A small LUT
multiplier supplies C = (a'*s) << 26 + (a*s') << 17, built from a 4-way and
a 2-way selection with shifts and adds. The term a'*s'*2^43 only affects bits
above the kept 43 and is dropped.

**Pipeline.** `dsp_mul_add` has input registers and a product register.
`dsp_quad_mult` adds an output register, so products reach the accumulator
3 cycles after issue. A multiplication takes 128 issue cycles plus 3 drain
cycles, which is 131 cycles.

## Lightweight: accumulator in memory

This unit (`lw_multiplier`) holds only one secret block of 16 coefficients,
the block below it, two public words and a 2-stage pipeline (383 flip-flop
bits after synthesis). It never buffers the accumulator.

**Schedule.** The result is built in 16 passes. Pass c owns the result
coefficients 16c..16c+15, which are memory words res_base+4c .. +4c+3. The
secret window U holds (s*x^i)[16c..16c+15], and a second block L holds the
16 coefficients below it.

For each public coefficient a_i the unit spends 4 cycles. In cycle g the
4 MACs add a_i * U[4g..4g+3] into one result word: it is read in stage 1
and written back in stage 2 of the next cycle. The pipeline reads and
writes one accumulator word in every cycle.

After the 4th cycle U and L shift up together (U[0] takes L[15]), which
multiplies the window by x. Every 16 public coefficients L runs empty and
the next lower secret block is read into it. A block "below block 0" is
block 15, 14, ... read with all signs flipped, which is how the negacyclic
wrap appears. Pass 0 therefore starts with blocks 0 and 15.

**Pauses.** Each secret or public word read takes the single read port, so
the MAC work pauses for it. Per pass that is 1 + 16 secret reads and 52
public reads. In total: 16,384 MAC cycles + 832 public reads + 272 secret
reads + waiting, which comes to 18,513 cycles. With `OP_MUL`, the first visit
to each result word ignores the old memory contents, so the result area
need not be cleared.

## Top level

`saber_poly_mult_top` holds four units side by side: High Speed I with
256 MACs, High Speed I with 512 MACs, High Speed II and the lightweight
unit. Each unit (`saber_mult_unit`) is a multiplier plus a 256-word
`saber_mem` and has its own `host_req_t` / `host_rsp_t` port pair
(`hs1_256_*`, `hs1_512_*`, `hs2_*`, `lw_*`).

While a unit is idle, the host reads and writes its memory through that
port, with read data one cycle after `rd_en`. While the unit is busy, the
multiplier owns the memory. A unit accepts a command with `start` and
signals the end with `done`.

The one top parameter is `MEM_DEPTH`, which is 256 words per unit. The
types and constants live in `saber_pkg`.

## Files

| file | content |
|---|---|
| `rtl/saber_pkg.sv` | constants, `op_e`, `arch_e`, host port structs |
| `rtl/multiple_gen.sv` | shared 0..4 x a generator |
| `rtl/coeff_mac.sv` | select-and-add MAC |
| `rtl/secret_shift_buffer.sv` | 256-coefficient secret register with negacyclic shift |
| `rtl/pub_coeff_stream.sv` | public coefficient unpacker (2 or 3 word window) |
| `rtl/hs1_multiplier.sv` | High Speed I |
| `rtl/dsp_mul_add.sv`, `rtl/dsp_quad_mult.sv`, `rtl/hs2_multiplier.sv` | High Speed II |
| `rtl/lw_multiplier.sv` | lightweight multiplier |
| `rtl/saber_mem.sv`, `rtl/saber_mult_unit.sv`, `rtl/saber_poly_mult_top.sv` | memory, unit wrapper, top |
| `tb/tb_saber_pkg.sv` | reference product and packing helpers for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the full top-level test at default parameters, run from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -y rtl -y tb +libext+.sv rtl/saber_pkg.sv tb/tb_saber_pkg.sv \
      tb/tb_saber_poly_mult_top.sv --top-module tb_saber_poly_mult_top -o sim
    ./obj_dir/sim

Substitute any other `tb_<module>` in both places. All testbenches run in
under a second.

The reference product in `tb_saber_pkg::ref_mul` is computed straight from
the definition. The multiplier testbenches use random operands plus an
all-extreme case (every a = 8191, every s = ±4), and they check OP_MUL,
OP_MAC and OP_STORE results coefficient by coefficient.

The cycle-count checks cover:

* 256/UNROLL compute cycles for High Speed I;
* 131 cycles for High Speed II;
* exactly 16,384 MAC cycles for the lightweight unit, with at most 19,471
  cycles in total.

The top-level test also counts the design's distinctive events and fails
if any never occurs: secret wrap, waiting for public data, the DSP lane
overflow fix, the DSP drain, lightweight pauses, negated secret blocks,
first-touch clearing and accumulation.

## Departures and open points

* **Public buffer of the high-speed units.** The high-speed architecture
  comes from earlier work, which used a 676-bit public buffer loaded 13 words
  at a time. Here the buffer is a 3-word streaming window that reads while
  computing. The function is the same, but area and load timing differ.
* **Lightweight schedule and cycle count.** The order of loads and pauses is
  not taken from any specification. This implementation measures
  18,513 cycles against the 19,471 quoted for the original. The 4-per-word
  accumulator layout is also this design's choice.
* **Overflow fix placement.** The overflow fix is applied to the a1*s1
  lane, because that is where the carry lands. A block diagram of the
  original technique places it on the middle-sum output instead. The middle
  sum needs only 13 bits and is unaffected either way.
* **Throughput.** No part of the design overlaps the secret load or the
  store with computation. The high-speed units spend 17 cycles loading the
  secret before each multiplication. The 512-MAC unit takes 150 + 53 cycles
  including all memory traffic. The original reports 213 cycles for the
  same work.
* **Not built: lightweight variants with 8 or 16 MACs.** These need more
  than 64 bits of accumulator traffic per cycle, and the scheme for that is
  not worked out, so they are not built. The unit's MAC count is fixed at 4.
* **Not built: surrounding Saber processor.** The hashing, sampling and
  the full KEM outside the multiplier are outside this RTL.
* **Timing on an FPGA.** The reported 250 MHz (high speed) and 100 MHz
  (lightweight) were not verified. `dsp_mul_add` is plain RTL meant to be
  mapped onto a DSP slice by synthesis.
* **Lint.** Verilator reports that `rst_n` is used both as an asynchronous
  reset and in assertion `disable iff` clauses (SYNCASYNCNET). It also
  reports a few result bits that are unused by design, such as the upper
  lanes of the DSP product. Neither affects the circuit.
