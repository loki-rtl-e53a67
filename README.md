# LOKI: a low-latency Kyber accelerator in SystemVerilog

CRYSTALS-Kyber (ML-KEM) spends most of its time on two things: multiplying
polynomials in `Z_q[X]/(X^256 + 1)` with `q = 3329`, and the Keccak permutation
behind its SHA-3/SHAKE hashing. LOKI is a memory-mapped coprocessor for a small
RISC-V microcontroller that takes over both. The polynomial engine does the
forward NTT, the inverse NTT and point-wise (base) multiplication with a
**single butterfly unit** that all three operations share. It needs
**906 cycles for an NTT or INTT and 649 cycles for a PWM**. A separate Keccak-f[1600]
engine takes care of the hashing. The host still does everything else: sampling,
accumulation, encoding and compression.

This repository holds synthesizable RTL for the whole accelerator: both
engines and the register interface that joins them. It also has a
self-checking testbench for every block, and a workload testbench that runs the
polynomial arithmetic and the hashing of Kyber512, Kyber768 and Kyber1024
through the bus.

## Block structure

```
                 reg bus (req/rsp structs)
                          |
                     loki_reg_if ---------------------------+
                      |        \                            |
                  loki_core     `-- lanes / start --> loki_keccak
   +------------------+-----------------------------+
   | loki_ctrl  --> loki_brom (twiddles)            |
   |    | issue/write schedule                      |
   |    v                                           |
   | 4 x loki_bram  <-> operand mux -> loki_butterfly
   |    ^   A: BRAM0/1   B: BRAM2/3        |        |
   |    +---- write-back / loki_fwd_buf <--+        |
   |    +-> read mux -> loki_out_stage -> DOUT      |
   +------------------------------------------------+
```

| module | role |
|---|---|
| `loki_top` | Joins the register interface, the polynomial core and the Keccak engine. Its ports are the bus structs and two done pulses. |
| `loki_reg_if` | Decodes the generic register bus into core controls. It adds wait states for coefficient reads and returns error responses. |
| `loki_core` | The polynomial engine. It holds 4 BRAMs, the operand and write-back multiplexers, the forwarding buffer and the output stage. |
| `loki_ctrl` | The control unit. It runs the issue schedule of NTT, INTT and PWM, the write-back delay line, the ping-pong bank state and a fixed done latency. |
| `loki_butterfly` | The unified butterfly: Cooley–Tukey, Gentleman–Sande and basemul modes, with a latency of 3 cycles. |
| `loki_montgomery`, `loki_barrett`, `loki_mod_add`, `loki_mod_sub` | Arithmetic units of the butterfly. |
| `loki_bram` | A true dual-port 256 × 12-bit memory with synchronous read. |
| `loki_brom` | A 128-entry twiddle ROM, computed when the design is elaborated. |
| `loki_fwd_buf` | A stage-boundary forwarding buffer. It lets the core issue one butterfly every cycle without stalls. |
| `loki_out_stage` | Post-processing on read-out: Barrett after an NTT, scaling after an INTT. |
| `loki_keccak` | Keccak-f[1600], one round per cycle. |
| `loki_pkg` | Constants, types, bus structs and the twiddle functions. |

## Number representation

Every coefficient is a canonical residue in `[0, q)`, 12 bits wide, in the
memories and on the bus. The results match the usual Kyber reference
functions **modulo q**:

* NTT → `poly_ntt` followed by `poly_reduce`
* INTT → `poly_invntt_tomont`
* PWM → `poly_basemul_montgomery`

They are not the same signed 16-bit representatives. The PWM result carries
the reference's factor `2^-16`. The host removes it in the usual way, by
multiplying by `2^16 mod q` (a `tomont` step), wherever the algorithm needs it.

Montgomery reduction uses `R = 2^16` and `q^-1 = -3327`. Barrett reduction uses
`v = 20159`, a rounding term of `2^25` and a shift of 26. The twiddle ROM holds
`zeta_k = 2^16 · 17^bitrev7(k) mod q`, which `loki_pkg::zeta_mont` computes when
the design is elaborated. No table file is read.

## The unified butterfly (`loki_butterfly`)

The unit holds one 16×16 multiplier, one Montgomery and one Barrett reduction,
one modular adder and one modular subtractor. Every mode has the same latency:
operands go in at cycle `t` and results come out at `t+3`. A new operation can
start every cycle.

* **CT (NTT):** `b·w` is registered, Montgomery-reduced and brought to
  `[0, q)`. The result is then added to and subtracted from `a`, which reaches
  the same point through two delay registers. The outputs are
  `a + b·w` and `a − b·w`.
* **GS (INTT):** `a + b` and `a − b` are registered first. The difference is
  multiplied by the twiddle, which passes one delay register on the way. The
  sum passes a second register and the Barrett reduction. The outputs are
  `a + b` and `(a − b)·w`. The reference INTT computes `(b − a)·ζ`, so the core
  feeds `w = −ζ` (`q − ζ`) to get exactly the reference's values.
* **MUL (basemul):** each operation forms one Montgomery product `x·w`. `x` is
  either `b` or a product captured from an earlier operation. `OUT1` is the sum
  of this product and the previous one, so two consecutive products accumulate
  without extra hardware.

After the last operation of a mode, the mode input must stay the same for
three more cycles. This drains the pipeline. The core does this by holding the
mode of the last issued operation while idle.

## Memory organisation and the issue schedule

Polynomial **A** lives in BRAMs 0 and 1, polynomial **B** in BRAMs 2 and 3.
Each pair works as a ping-pong buffer. During a transform stage, both ports of
the *current* BRAM read a butterfly's two coefficients. The two results go to
the *other* BRAM of the pair through its two ports. An NTT or INTT has 7
stages, so the result ends up in the opposite BRAM from the start. The control
unit then marks that BRAM as current. A PWM reads A and B and writes the
product into A's other BRAM.

`loki_ctrl` issues exactly one operation per cycle. The NTT uses the loop order
of the Kyber reference (`len = 128 … 2`, twiddle index `2^s + group`). The INTT
uses the reverse order (`len = 2 … 128`, twiddle index `(128>>s) − 1 − group`).
Each issued operation goes through a fixed pipeline:

| cycle | what happens |
|---|---|
| `t` | BRAM and BROM addresses are presented |
| `t+1` | read data is valid and the operand-select fields arrive |
| `t+2` | the operand register feeds the butterfly |
| `t+5` | butterfly outputs are written back, both ports of the target BRAM |

A transform is 7 × 128 = 896 issue cycles. The last write-back falls in cycle
901 after start. `done` follows at a fixed **906** cycles. A PWM is 128 × 5 =
640 issue cycles. Its last write-back is at cycle 645, and `done` follows at
**649**. Here "n cycles" means this: `done` is high at the n-th rising edge
after the edge that sampled `start`. The cycles between the last write-back and
`done` are idle in this RTL.

### Keeping one butterfly per cycle across stage boundaries (`loki_fwd_buf`)

This is the hardest part of the core to follow. A butterfly's results are
written five cycles after its operands were read. So the last five butterflies
of stage `s` write into BRAM X during the first five cycles of stage `s+1`.
But stage `s+1` reads from X, and needs both of its ports to do so. The
pipeline could stall, but then it would miss the cycle counts above.

Instead, a write-back that targets the BRAM currently being read is
**diverted** into a small buffer. The buffer holds 5 butterflies, which is 10
coefficients with their addresses. Each read address of the next stage is
compared with the buffer. On a **hit**, the buffered value replaces the BRAM
data in the same cycle that the BRAM data would arrive. The diverted values
never have to reach the BRAM: the following stage rewrites every coefficient
into the other BRAM anyway. The buffer is cleared at each start. The top-level
testbench counts diverts and forwarded reads and requires both to happen.

### PWM schedule

Base multiplication `m` (0…127) works on `(a0, a1) = A[2m], A[2m+1]` and
`(b0, b1) = B[2m], B[2m+1]`, with `ζ = zeta(64 + m/2)`, negated for odd `m`.
All four coefficients are read in the step's first cycle. Then five Montgomery
products are issued in this order:

1. `a1·b1`, which is captured for later
2. `a0·b1`
3. `a1·b0`, which completes `r1 = a0·b1 + a1·b0`; `r1` is written to `2m+1`
4. `a0·b0`
5. `(a1·b1)·ζ`, which completes `r0 = a0·b0 + a1·b1·ζ`; `r0` is written to `2m`

That makes five multiplications and two additions per base multiplication,
with one multiplier.

## Read-out and post-processing (`loki_out_stage`)

Results are read through an output stage that applies the final step of the
last operation performed on that polynomial:

* after an NTT, **Barrett** reduction;
* after an INTT, a **Montgomery multiply by 1441** (`= 2^32/128 mod q`), which
  is the reference's final scaling step;
* after a PWM or a host load, no change.

The control unit keeps this tag separately for A and B. This lets the
transform steps run without an extra final pass. Reading the same coefficient
twice returns the same value. The core's `dout` is valid two cycles after
`read_i`.

## Register map (`loki_reg_if`)

The bus is a generic register interface: a request struct
`{addr[31:0], write, wdata[31:0], wstrb[3:0], valid}` and a response struct
`{rdata[31:0], error, ready}`. The master holds a request until `ready`.
Accesses are 32-bit words, and `wstrb` is ignored.

| byte address | access | meaning |
|---|---|---|
| `0x0000` | W | `[0]` start, `[2:1]` op (0 NTT, 1 INTT, 2 PWM), `[3]` polynomial for NTT/INTT (0 = A, 1 = B) |
| `0x0000` | R | the last written op and polynomial fields |
| `0x0004` | R | `[0]` busy, `[1]` done (set at completion, cleared by the next start) |
| `0x0400 + 4i` | R/W | coefficient `i` of polynomial A. A read is post-processed and answers after 2 wait states. |
| `0x0800 + 4i` | R/W | coefficient `i` of polynomial B |
| `0x1000 + 8l` | R/W | Keccak lane `l` (0…24), low 32 bits. `+4` gives the high 32 bits. |
| `0x1100` | W | `[0]` start a Keccak-f[1600] permutation |
| `0x1104` | R | `[0]` busy, `[1]` done (sticky, cleared by start) |

The interface answers with `error` in three cases:

* an unmapped address;
* a coefficient access while the polynomial engine runs;
* a lane access while the Keccak engine runs.

All other accesses complete in the cycle they are presented. `loki_top` also
brings out `ntt_done_o` and `keccak_done_o` for use as interrupts.

A typical sequence for `c = a·b` in the ring:

1. Load A and B.
2. Run NTT(A) and then NTT(B), which is `0x1` and then `0x9`.
3. Run PWM (`0x5`).
4. Run INTT(A) (`0x3`).
5. Read A.

At one transfer per cycle, a single NTT with load and read-back takes about
1930 cycles on the bus. The reads cost three cycles each.

## Keccak engine (`loki_keccak`)

The engine holds the 1600-bit state as 25 lanes of 64 bits, indexed
`x + 5y`. It applies one full round (θ, ρ, π, χ, ι) per cycle. `done` comes 25
cycles after `start`: the start cycle plus 24 rounds. The rotation offsets and
round constants come from the recurrences of the SHA-3 standard, evaluated when
the design is elaborated. The host absorbs and squeezes by XOR-ing and reading
lanes over the bus. Padding and the sponge construction are left to software.

## How this RTL relates to the published design

The original publication gives the following, and this RTL follows it:

* the block set: four dual-port BRAMs, a twiddle BROM, one butterfly unit, a
  control unit, input and output multiplexers, and Barrett and modular-multiply
  units on the output path;
* the operator set of the butterfly unit, the Montgomery and Barrett datapaths
  and their constants;
* the CT and GS formulas;
* five multiplications and two additions per basemul;
* the 906/906/649-cycle latencies;
* memory-mapped use through a generic register interface.

It does not give the internal timing, the register map, the control sequences
or the Keccak hardware. Those parts are this design's own choices:

* **Forwarding buffer and pipeline depth.** These are one way to reach one
  butterfly per cycle. The idle tail up to 906/649 cycles is a fixed wait
  because how the original spends those cycles is not known.
* **Canonical 12-bit coefficients.** The reference uses signed 16-bit values.
  For GS, this design negates the twiddle to match the reference's `(b − a)·ζ`.
* **Barrett rounding term.** The published diagram shows `1 << 26`. This RTL
  uses `1 << 25`, as the Kyber reference code does. With `1 << 26` the quotient
  is one too large for many inputs.
* **Post-processing assignment.** Barrett after NTT and `×1441` after INTT is
  this design's reading of the two output-path boxes.
* **Register map, error responses and wait states.**
* **Keccak engine structure** (one round per cycle, lane access) and sharing one
  bus port between the two engines.
* **Not included:** the APB/AXI-Lite/AXI protocol adapters, and the RISC-V SoC
  the accelerator was integrated into. Both come from outside libraries.
  `loki_top` exposes the plain register bus they would drive.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/loki_ref_pkg.sv` use plain modular arithmetic, with no Montgomery tricks:
NTT, INTT, basemul and schoolbook multiplication in the ring.

| testbench | what it shows |
|---|---|
| `tb_loki_montgomery`, `tb_loki_barrett` | Exhaustive checks over all 16-bit inputs. |
| `tb_loki_modarith` | Modular add and subtract. |
| `tb_loki_butterfly` | All three modes and mode changes. |
| `tb_loki_bram`, `tb_loki_brom` | Memory behaviour and the twiddle values. |
| `tb_loki_ctrl` | The cycle-by-cycle issue and write schedule against an independent model. |
| `tb_loki_out_stage` | The three post-processing modes. |
| `tb_loki_core` | NTT, INTT and PWM against the reference; `INTT(NTT(a) ∘ NTT(b))` equals the schoolbook `a·b`; exact 906/906/649 latencies. |
| `tb_loki_reg_if` | Decoding, wait states and errors, with stub engines. |
| `tb_loki_keccak` | The all-zero-state permutation, SHA3-256 of `""` and `"abc"`, and the 25-cycle latency. |
| `tb_loki_top` | End to end through the bus at full size (this design has no size parameters). It counts the mechanisms that must occur: each operation, bank swaps, diverted write-backs, forwarded reads, each post-processing mode, bus wait states, error responses and a Keccak permutation. |
| `tb_loki_kyber` | Kyber KeyGen, Encaps and Decaps for module ranks 2, 3 and 4. Every NTT, INTT and PWM runs on the accelerator, and so do the hashes H(pk), H(m) and G (SHA3-256 and SHA3-512, multi-block, absorbed over the bus). It checks t̂, u and v against schoolbook references, every digest against a software SHA-3, and that all 256 message bits are recovered. Sampling is replaced by uniform random draws. |

Example with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/loki_pkg.sv tb/loki_ref_pkg.sv $(ls rtl/*.sv | grep -v loki_pkg) \
  tb/tb_loki_top.sv --top-module tb_loki_top
./obj_dir/Vtb_loki_top
```

Swap in another testbench file and its module name to run it. Block-level
testbenches need only the files of their block. The simulator is two-state, so
every register that is read is reset or initialised. The BRAM contents are not
reset.

## Changing the design

* `loki_ctrl` takes `LAT_NTT` and `LAT_PWM` as parameters. The schedule needs
  at least 902 and 646 cycles.
* The field ranges in `loki_pkg` are fixed to Kyber's parameters:
  `q = 3329`, `n = 256`, 12-bit coefficients.
* The assertions (`a_no_inflight` in the control unit, same-address
  double-write in `loki_bram`, `a_req_stable` on the bus) catch the usual
  mistakes when changing the pipeline or driving the bus.
