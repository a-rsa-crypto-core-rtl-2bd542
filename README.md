# Scalable Montgomery RSA core with power-analysis countermeasures

This is a hardware RSA engine that computes C = M^E mod N for any modulus
length from a few bits up to 4096 bits. It uses the same datapath for every
length and has no length-dependent hardware, so the one core serves 1024-,
2048- and 4096-bit keys. All modular products are done by a word-serial,
pipelined Montgomery multiplier. Two of them run side by side: one
multiplies and one squares. Three measures keep the power trace from
revealing the key:

* **Constant work per key bit (SPA).** Both multipliers run for every key
  bit, whether it is 0 or 1. The operand registers are rewritten even when
  their value must stay the same. Each multiplication writes its result
  either by index addressing or by shifting, chosen at random.
* **Exponent blinding (DPA).** The key used is E' = E + r·φ(N), with a fresh
  16-bit random r for each exponentiation. Since M^φ(N) ≡ 1, the result does
  not change, but the sequence of operations changes from run to run.
* **No data-dependent final subtraction.** The multiplier scans one extra
  kernel cycle of bits. Its outputs therefore stay below 2N and can be fed
  straight back, with no conditional subtraction.

The multiplier also does Montgomery multiplication over GF(2^n), with the
carries turned off. So the same core can raise binary polynomials to a power
modulo a field polynomial.

At the default size (32-bit words, 64 processing units) one 4096-bit
multiplication takes 8,583 clocks. A full 4096-bit exponentiation, with the
n+16 bits of the blinded key, takes 35.3 million clocks, or 353 ms at 100 MHz.

## The Montgomery multiplier (`mont_mul`)

It computes S = X·Y·2^-L mod N with L = n + P, where P is the number of
processing units (PUs).

**Processing units (`mm_pu`).** PU j takes one bit x of X. The words of the
partial sum S, of Y and of N stream through it, least significant first, one
word per clock. Per word it computes

    (ca, S) = ca + x·Y + S
    (cb, S) = cb + odd·N + S

Textbook Montgomery shifts S right by one bit after every bit of X. Here
each PU instead passes Y and N on to the next PU shifted left by one bit.
The top bit of each word is held in a one-bit register and becomes the low
bit of the next word. PU j therefore works on Y·2^j and N·2^j. Its "odd"
decision is bit j of the partial sum, at word j/W and position j mod W.
While that word passes, odd comes straight from the first adder; after that
it comes from a register. Adjacent PUs are only one clock apart, so a
P-unit pipeline handles P bits of X in one pass over the words. This pass
is called a kernel cycle.

**Kernel cycles and the queue (`mm_queue`).** After the last PU the sum has
grown by 2^P. Its low P/W words are zero and are dropped; the rest go back
to PU 0 for the next P bits of X. For short operands PU 0 is already free
when the first word comes back: the word passes straight through and a
kernel cycle lasts P + P/W clocks. For long operands PU 0 is still busy
with the current kernel cycle: the words wait in a FIFO, and a kernel cycle
lasts EW = ceil((n+P+2)/W) clocks, one per word. At the defaults the
crossover is at n = 2048 bits, and the FIFO holds 67 words.

**Extra kernel cycle.** ceil((n+P)/P) kernel cycles scan L = n + P bits.
For inputs below 2N, scanning P extra bits keeps the output below 2N, which
is why there is no final subtraction. Registers are one word wider than
4096 bits (129 words) because such a result may need bit n.

**Flexible output (`mm_flex_out`).** The last kernel cycle needs only
((n-1) mod P)+1 PUs. The result is taken from PU sel = (n-1) mod P through a
P-to-1 multiplexer instead of waiting for the words to pass the remaining
PUs. At that point the sum still has to be divided by 2^(sel+1). The stage
keeps a window of P/W+1 words and outputs the W bits that start at bit
sel+1.

**Latency.** From the start edge to the done pulse:

    (ker-1)·T + ((n-1) mod P) + P/W + floor(n/W) + 1 + 4   clocks,
    ker = ceil((n+P)/P),  T = max(EW, P + P/W).

The result streams out as floor(n/W)+1 words during the last kernel cycle.
By then every operand word has been read for the last time, so the result
can overwrite an operand in place.

**GF(2^n).** With `field` = 1 both adders become XOR and the carries are
cleared. The result is then a·b·x^-L mod N(x) for polynomials of degree
below n-1 (N has n bits).

## Exponentiation kernel (`rsa_core`)

The kernel uses the right-to-left binary method. The Z register starts as 1
and the P register as M. For each key bit, Z = Z·P if the bit is 1, and
then P = P·P. The two multipliers work in lockstep, reading the same word
index at the same time.

| step  | multiply unit            | square unit            |
|-------|--------------------------|------------------------|
| FETCH | registers loaded over the bus; Z holds r2 = 2^(2L) mod N, P holds M | |
| PRE   | Z = MM(1, Z) = 2^L mod N | P = MM(P, r2) = M·2^L  |
| EXE   | Z = MM(P, Z), or Z rewritten with itself if the bit is 0 | P = MM(P, P) |
| POST  | Z = MM(1, Z) leaves the Montgomery domain | idle |

A short DET step between EXE steps fetches the next key bit. Every 32 bits
it first asks the blinding unit (`key_blind`) for the next word of
E + r·φ(N). The kernel always scans n+16 key bits, so an exponentiation
always takes n+18 multiplications. The host precomputes r2 = 2^(2(n+P)) mod N
and loads it.

**Registers (`bal_reg`).** Z and P can each be updated in one of two ways:

* Index mode: result word m goes to word m.
* Shift mode: the active part shifts down one word per write, and the new
  word enters at the top.

A random bit picks the mode before every multiplication. Reads use logical
indexes and are translated, so the multipliers never see the difference.
When the key bit is 0, Z goes through the same writes with its own old
words (recirculation). A kept Z and an updated Z therefore do the same work.

**Random numbers (`prng16`).** This is a 16-bit maximal-length LFSR,
x^16+x^14+x^13+x^11+1, that the host can seed. It supplies:

* r, at start, held for the whole run;
* two mode bits for every multiplication, bit 0 for Z and bit 1 for P.

## Bus interface (`ahb2rsa`, the top)

This is an AHB slave with a registered address phase. It has no wait states
and always answers OKAY. The bus width equals the word size W, and W must be
at least 16. The word address is {region[2:0], index[IW-1:0]}, where
IW = log2(NMAX/W), which is 7 by default. The byte address is the word
address × 4.

| region | word | name   | access                                         |
|--------|------|--------|------------------------------------------------|
| 0      | 0    | MODE   | r/w, bits [12:0] = n                           |
| 0      | 1    | START  | w, bit 0 = 1 starts a run                      |
| 0      | 2    | STATUS | r, bit 0 busy, bit 1 result valid              |
| 0      | 3    | SEED   | w, PRNG seed (bits 15:0; 0 is mapped to 1)     |
| 0      | 4    | FIELD  | r/w, bit 0: 0 = GF(p), 1 = GF(2^n)             |
| 1..5   | i    | N, M, E, PHI, R2 | w, word i = bits [W·i +: W]          |
| 6      | i    | C      | r, result word i                               |

Writes to N, M, E, PHI and R2, and to MODE and FIELD, are ignored while the
core is busy. Write φ(N) as 0 to switch blinding off: r·0 adds nothing.

Usage:
1. Write MODE, FIELD, SEED, N, M, E, PHI and R2.
2. Write START.
3. Poll STATUS until bit 1 is set.
4. Read C.

## Where this design departs from its source description

* **Partial sums are in plain binary form.** The multiplier was described
  with carry-save partial sums that are converted before the queue. Here
  each PU uses two carry-propagate W-bit adders, as in the word-level
  algorithm. The adders are longer, but no conversion adder is needed before
  the queue or the output.
* **Registers and flow.**
  * The key and φ(N) are loaded whole over the bus, and the bus map above
    is this design's own.
  * A PRNG seed register and a field-select register have been added.
  * Operand registers are one word wider than n bits.
* **The largest modulus is 4096 bits.** The source also mentions lengths up
  to 4168; the registers here follow the 4096-bit size.
* **Own details.** The PRNG polynomial, the PRNG's use for the register-mode
  bits, the shift direction of the balanced registers, all handshakes and
  the reset values are this design's choices.
* **Speed.** Cycle counts are a little above the published multiplier
  timing table, because of the extra kernel cycle and the extra word. The
  whole-exponentiation times come out close to the published 12.7 / 47.8 /
  355 ms: 12.1 / 47.1 / 353 ms at 100 MHz.
* **Not built.** An ECC core on the same bus is only named, and no ECC
  point arithmetic is built. Only the GF(2^n) multiplier mode exists.

## Files

`rtl/`: `rsa_pkg` (constants, enums), `mm_pu`, `mm_queue`, `mm_flex_out`,
`mont_mul`, `bal_reg`, `prng16`, `key_blind`, `rsa_core`, `ahb2rsa` (top).

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_mm_pu`, `tb_mm_queue`, `tb_mm_flex_out`, `tb_bal_reg`, `tb_prng16`,
  `tb_key_blind`: unit tests against wide-integer models.
* `tb_mont_mul` (via `mm_harness`): random products at two sizes. It checks
  that out < 2N and out·2^L ≡ X·Y (mod N), both in GF(p) and in GF(2^n), and
  checks the latency formula. Both queue paths are used.
* `tb_rsa_core`: the 2773 = 47·59 textbook key, a Mersenne-product key with
  its true φ, random keys, and a GF(2^n) exponentiation, with exact cycle
  counts.
* `tb_ahb2rsa`: the same kind of runs through the bus at W=16, P=32,
  NMAX=1024. It counts that every mechanism occurred: key bits 0 and 1,
  both register modes, queued and passed-through words, blinding with
  r ≠ 0, both fields, inner and last output PU, and an ignored busy write.
* `tb_ahb2rsa_full`: one 4096-bit encryption at the default size, with
  N = (2^3217−1)(2^607−1)(2^127−1)(2^107−1)(2^31−1)(2^7−1) and E = 65537.
  It takes about 35 M clocks, about 1.5 minutes in Verilator.
* `tb_rsa_workloads`: 1024- and 2048-bit encryptions at the default size,
  also with Mersenne-product moduli. It checks every multiplication time
  (1,158 and 2,278 clocks) and the total time (12.1 and 47.1 ms at
  100 MHz).
* `tb_bn_pkg`: the reference arithmetic. It uses only shifts, adds and
  compares, so it shares no algorithm with the hardware.

Simulate with, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/rsa_pkg.sv tb/tb_bn_pkg.sv \
        rtl/*.sv tb/tb_ahb2rsa.sv --top-module tb_ahb2rsa -Mdir obj
    obj/Vtb_ahb2rsa

All modules take W, P and NMAX parameters. W and P must be powers of two,
with P a multiple of W.
