# MOWG(29,11,17) stream cipher with Montgomery field multipliers

This is a word-oriented stream cipher of the Welch–Gong (WG) family. An
11-stage LFSR of 29-bit words over GF(2^29) feeds a nonlinear permutation, the
WG permutation. The design takes 17 bits of that permutation every clock as
key stream, which is why it is called *multiple-output* WG: MOWG(29, 11, 17)
means field GF(2^29), 11 LFSR stages, 17 output bits per clock.

The design rests on three ideas:

* **Signal reuse in the transform.** `X^r2 + X^r4` is computed as a single
  product, `X^(2^20) * (X^r1 + X^(2^10-1))`, which reuses the `X^r1` product.
* **No inverters on the critical path.** The LFSR stores the *complement* of
  the WG state, so the transform needs no input inverter. The output "+1" is
  moved onto the short `X` path, away from the multiplier chains.
* **Montgomery multipliers.** Every field multiplier is a bit-level Montgomery
  multiplier (AND rows, XOR rows and a wired shift). No multiplier uses a
  normal basis.

In simulation, the key stream matches, word for word, an independent model of
the plain (uncomplemented) WG(29,11) cipher.

## Block diagram

```
                 mowg_top
 key[127:0] ─┐  ┌───────────────────────────────────────────────────────────┐
 iv[127:0]  ─┴─►│ word select (one-hot) ─ iv1[28:0] ─►┐                       │
                │                                    ▼                       │
                │  mowg_cipher   ┌──────────── mowg_lfsr ─────────────┐      │
                │   mowg_fsm ─op─►  MUX: load  ~iv1                   │      │
                │   (11-bit      │       init  lin ^ WGperm           │      │
                │    one-hot +   │       run   lin                    │      │
                │    2-bit cnt)  │  s[10] s[9] ... s[1] s[0]  (29 b)  │      │
                │                │  lin = s10^s9^s6^s3^s1^γ·s0^C      │      │
                │                └──────┬─────────────────────────────┘      │
                │                       │ X = s[10]                          │
                │                 mowg_transform ── WGperm[28:0] ─► (init fb)│
                │                       │ [16:0]                             │
 plain[16:0] ──►│──────────────────────(+)──► reg ──► cipher[16:0], valid    │
                │                                                            │
 mul_* ────────►│ mont_mul_serial (stand-alone bit-serial multiplier)        │
                └───────────────────────────────────────────────────────────┘
```

## Field arithmetic: the Montgomery domain

Elements of GF(2^29) are polynomials of degree < 29 modulo

    f(x) = x^29+x^28+x^24+x^21+x^20+x^19+x^18+x^17+x^14+x^12+x^11+x^10+x^7+x^6+x^4+x+1

This is the field polynomial of the WG(29,11) cipher. `F_POLY` in `mowg_pkg`
holds it without the x^29 term, as `29'h113e5cd3`.

A Montgomery multiplier does not compute `a·b mod f`. It computes
`MM(a,b) = a·b·x^-29 mod f`. To make a chain of such multipliers compute
ordinary field products, every value in the design is kept in the
**Montgomery domain**: an element `a` is stored as `A = a·x^29 mod f`. Then
`MM(A,B) = (a·b)·x^29`, which is again in the domain. The rest of the field
arithmetic follows from this choice:

| Operation | Normal-basis view | In this design |
|---|---|---|
| addition | XOR | XOR |
| the element 1 | all ones | `ONE = x^29 mod f = F_POLY` (its bits are 1 where `F_POLY` has a 1) |
| "complement" (+1) | 29 NOT gates | XOR with `ONE`, i.e. NOT gates on 16 bits |
| `X^(2^N)` (">>N") | cyclic rotation | fixed XOR network (`gf_frob`) |
| product | normal-basis multiplier | `mont_mul` |

Squaring is linear over GF(2), so N squarings form a constant 29×29 bit
matrix. `gf_frob` computes column `j` of that matrix at elaboration time: it
applies N Montgomery squarings to the unit vector `e_j`, using the constant
functions in `mowg_pkg`. The hardware is one XOR tree per output bit.

Values never leave the Montgomery domain. Load words, the LFSR state, the
WGperm and the key stream are all Montgomery-domain bit patterns. To relate
the design to a textbook WG in the polynomial basis, multiply by `x^-29` (see
`from_mont` in `tb/mowg_ref_pkg.sv`).

### The multiplier element

One pass of the bit-level algorithm (r(x) = x^29) is:

    c = c + a_i·b          (AND row + XOR row)
    c = c + c_0·f          (AND row + XOR row)
    c = c / x              (wiring: bit 29 of the sum equals c_0 and becomes the MSB)

Because the x^29 term of `f` never needs storing, every register and bus is
29 bits wide.

* `mont_mul` cascades 29 elements into a combinational multiplier, so the
  transform can give one result per clock.
* `mont_mul_serial` time-shares one AND/XOR row over two clocks per bit,
  selected by `ctr`: step 3 with `B` and `a_i`, then steps 4–5 with `F` and
  `C(0)`. A "Cin or C" multiplexer lets an external `Cin` start the
  accumulation. It computes `(cin + a·b)·x^-29 mod f`. `done` rises
  `2·29 + 1` clocks after the clock that accepts `start`.

## The transform (`mowg_transform`)

The input is the complemented LFSR word `X = B(t+10) = A(t+10) + 1`. With
`r1 = 2^10+1`, `r2 = 2^20+2^10+1`, `r3 = 2^20−2^10+1` and
`r4 = 2^20+2^10−1`, the transform computes:

```
X^r1        = X · X^(2^10)
Y           = X^(2^10 − 1)                       (gf_pow_2k1)
X^r2 + X^r4 = X^(2^20) · (X^r1 + Y)              (reuses X^r1)
X^r3        = X · Y^(2^10)
WGperm      = (X + 1) + X^r1 + (X^r2 + X^r4) + X^r3
```

Since `X = A + 1`, the result equals `q(A+1) + 1` with
`q(y) = y + y^r1 + y^r2 + y^r3 + y^r4`. That is the WG permutation of the
uncomplemented word `A`.

`gf_pow_2k1` builds `Y` with the addition chain 1, 2, 4, 5, 10: four
multipliers and squaring networks of 1, 2, 1 and 5 squarings. The transform
therefore holds seven Montgomery multipliers:

* three in the main dataflow;
* four in the power chain.

The LFSR holds one more, with a constant operand (γ).

The longest path is five multipliers deep: the four multipliers of the power
chain in series, then the `X^r2 + X^r4` or `X^r3` multiplier.

All 29 WGperm bits are the initialization feedback. Bits `[16:0]` are the key
stream.

## The complemented LFSR (`mowg_lfsr`)

The plain WG recurrence is

    A(t+11) = A(t+10) + A(t+9) + A(t+6) + A(t+3) + A(t+1) + γ·A(t)   [+ WGperm(A(t+10)) during init]

Here γ = x^464730077. The tap set is `TAPS` in `mowg_pkg` and the exponent
is `GAMMA_EXP`. The
register stores `B = A + 1` instead. Substituting gives

    B(t+11) = Σ_taps B(t+j) + γ·B(t) + C,      C = γ + (n_taps + 1)·1

With the five taps above, `C = γ`. For an even number of taps it would be
`γ + 1`. `C` is derived from the `T` parameter, so other tap sets stay
correct.

The input multiplexer is driven by the FSM's `{op1, op0}`:

| op1 op0 | phase | LFSR input |
|---|---|---|
| 0 0 | load | `init_vec + 1` (the input inverter) |
| 0 1 | key initialization | `lin + WGperm` |
| 1 0 | run | `lin` |

`s[10]` receives the new word and `s[0]` is the oldest. The state has no reset
because the 11 load clocks overwrite every stage.

## Control and timing (`mowg_fsm`)

The FSM has four parts:

* **Reset register.** A 1-bit register delays the release of `rst_n`, which is
  synchronous and active low, by one clock. Its output is `active`.
* **11-bit one-hot counter.** It starts at `(1,0,…,0)` and rotates once per
  clock.
* **2-bit counter.** It advances each time the one-hot counter leaves bit 10.
* **Phase decode.** `op1 = b0 & b1` and `op0 = b0 ^ b1`.

Both counters stop in the run phase. This uses a synchronous enable rather
than a gated clock.

| clocks after `active` | count | op1 op0 | what happens |
|---|---|---|---|
| 0 – 10 | 0 | 00 | load word j in the clock where `hot[j]` is set |
| 11 – 32 | 1, 2 | 01 | key initialization, WGperm fed back |
| 33 – … | 3 | 10 | key stream: 17 bits every clock |

In `mowg_top`, `cipher = plain ^ key_stream` is registered. The first valid
cipher word therefore appears 34 clocks after the FSM becomes active, which is
35 clock edges after `rst_n` is released. After that, one 17-bit word arrives
per clock until the next reset. Decryption is the same operation: feed cipher
text to `plain` with the same key and IV.

### Key and IV

The 128-bit key and 128-bit IV fill the 319-bit LFSR as `{63'b0, key, iv}`.
Load word `j` is bits `[29j+28 : 29j]`, so word 0 is `iv[28:0]`. The word ends
up in `s[j]` after loading. `key` and `iv` must stay stable for the 12 clocks
after `rst_n` rises. A new reset re-keys the cipher at any time.

## Modules

| file | role |
|---|---|
| `rtl/mowg_pkg.sv` | field size, `F_POLY`, `TAPS`, `GAMMA_EXP`, phase enum, Montgomery constant functions |
| `rtl/mont_mul.sv` | combinational Montgomery multiplier (29 elements) |
| `rtl/mont_mul_serial.sv` | bit-serial Montgomery multiplier element with C register |
| `rtl/gf_frob.sv` | N-fold squaring network |
| `rtl/gf_pow_2k1.sv` | `X^(2^10−1)` |
| `rtl/mowg_transform.sv` | MOWG transform |
| `rtl/mowg_lfsr.sv` | complemented-state LFSR with input multiplexer |
| `rtl/mowg_fsm.sv` | phase controller |
| `rtl/mowg_cipher.sv` | key-stream generator (FSM + LFSR + transform) |
| `rtl/mowg_top.sv` | key/IV loading, plain ⊕ key stream, and the stand-alone serial multiplier on `mul_*` ports |

The field polynomial, taps and γ are parameters (`F`, `T`, `G_EXP`) of the
LFSR, the transform and the cipher. The widths are fixed by the package
constants `M = 29`, `L = 11` and `D = 17`.

Post-synthesis size of `mowg_top` from a generic yosys coarse synthesis:

* about 960 word-level cells;
* 505 flip-flop bits in total: 319 in the LFSR, 14 in the FSM, 18 in the
  output register, and the rest in the stand-alone serial multiplier.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

All arithmetic is checked against `tb/mowg_ref_pkg.sv`. That package is a
separate model in the plain polynomial basis: shift-and-add multiplication,
square-and-multiply powers, the WG permutation written directly from its
exponents, and the uncomplemented WG LFSR.

| testbench | what it checks |
|---|---|
| `tb_mont_mul` | 304 products against `a·b·x^-29`, and 50 checks of Montgomery-domain chaining |
| `tb_mont_mul_serial` | 43 operations with and without `Cin`; latency 2·29+1; busy/done; start ignored while busy |
| `tb_gf_frob` | `X^(2^1)`, `X^(2^10)`, `X^(2^20)` on unit vectors and random values |
| `tb_gf_pow_2k1` | `X^1023` |
| `tb_mowg_transform` | WGperm and key-stream bits against the reference permutation |
| `tb_mowg_lfsr` | every stage every clock against `to_mont(A)+1` of the plain LFSR, over load, init and run, with idle clocks |
| `tb_mowg_fsm` | phase sequence 11/22/run, one-hot progress, counters frozen in run, reset in mid-init |
| `tb_mowg_cipher` | 4 keys × 200 run words against the plain WG(29,11) model; first word at clock 33 |
| `tb_mowg_top` | end to end at default parameters; see below |

`tb_mowg_top` runs an encryptor and a decryptor on three random key/IV pairs
and checks:

* the cipher text;
* the decrypted plain text;
* the phase sequence;
* the 34-clock start;
* a re-key in the middle of the run phase;
* 8 operations of the stand-alone multiplier.

It counts each of these mechanisms and fails if any never happens.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mowg_pkg.sv tb/mowg_ref_pkg.sv tb/tb_mowg_top.sv --top-module tb_mowg_top
./obj_dir/Vtb_mowg_top
```

Every testbench finishes in well under a second.

## Where this design departs from, or fills in, the source description

**Field representation.** The source draws the transform with ">>10" and ">>20"
shift blocks and 29-inverter complements. Both belong to a normal basis. It
then replaces the normal-basis multipliers with Montgomery multipliers but
does not say how squarings, the constant 1 or domain conversion work after
that change. This design uses the Montgomery polynomial domain throughout:
squarings become XOR networks and "+1" becomes XOR with `ONE`.

**Field polynomial, taps and γ.** None of these is given. This design uses
those of the published WG(29,11) cipher. The example multiplier run in the
source uses an all-ones `f`. That polynomial is reducible, so it does not
define a field, and this design does not use it.

**LFSR constant.** The source's cipher figure adds `β ⊕ 1` to the complemented
LFSR feedback. That constant is correct only for an even number of taps. With
the five WG(29,11) taps, the constant that keeps the complemented LFSR
equivalent to the plain one is `γ`. The design derives the constant from the
tap set. Using the literal `γ + 1` breaks the equivalence, and the LFSR
testbench detects it.

**Key-stream bits.** Which 17 of the 29 WGperm bits form the key stream is not
specified. Bits `[16:0]` of the Montgomery-domain word are used.

**Latency.** The source gives 11 load clocks and 22 initialization clocks,
which this design follows. One simulation description mentions cipher text
"after 44 clock cycles". Here the first cipher word comes 34 clocks after the
FSM starts.

**Controller clocks.** The counters are frozen with synchronous enables. The
source idles their clocks.

**Interfaces of this design's own.** The following are not specified by the
source:

* the key/IV-to-LFSR mapping;
* the load handshake (`load_req`, `load_sel`);
* the registered cipher output with `valid`;
* the serial multiplier's `start`/`busy`/`done` handshake.

The two-clocks-per-bit schedule of the serial multiplier is read from its
multiplexer structure.

**Not built.** Two further signals appear in the source's waveforms (`stb`,
`sout`) without a described function, so they are not built.

**Implementation results.** FPGA slice counts, delay and power figures were not
reproduced.
