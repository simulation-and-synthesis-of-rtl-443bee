# Majority Logic Decoder/Detector (MLDD) for EG-LDPC codes

Memories are protected against soft errors by storing each word as a codeword of an
error-correcting code. The Euclidean-geometry LDPC (EG-LDPC) codes used here are
cyclic and *one-step majority-logic decodable*. A decoder for them is only a shift
register, a few XOR trees and a majority vote. The catch is latency. A plain
majority-logic decoder (MLD) decides one bit per clock, so every read costs N cycles
(63 for the (63,37) code), even though nearly every word comes out of the memory
unharmed.

The majority logic decoder/detector (MLDD) removes most of that cost. It runs the same
decoder but watches the parity check sums during the first **three** decoding cycles.
If they are all zero, the word is declared error-free and sent out at once: 3 cycles
instead of N. Only when a check sum fires does the decoder finish the full N-cycle
correcting pass. For the (63,37) code, every pattern of up to four (in practice also
five) flipped bits makes some check sum fire within those three cycles.

The RTL is SystemVerilog-2017 and is parameterised over the whole code family. The
default is the (63,37) code.

## The codes

For a geometry parameter `S`, the code lives on the Euclidean plane EG(2, 2^S). Its
points are the N = 2^(2S) − 1 nonzero elements of the field GF(2^(2S)). Codeword bit
`i` belongs to the point α^i, where α is a primitive element.

A *line* is a set {P + β·D : β ∈ GF(2^S)}. It has 2^S points. Each line that misses
the origin gives one parity check: the XOR of the bits on the line must be zero.
Exactly J = 2^S of these lines pass through the point of bit N−1. Any two of them
share only that point. So the J check sums are *orthogonal* on bit N−1:

- a single wrong bit N−1 flips all J sums;
- any other wrong bit flips at most one sum.

With at most J/2 errors, a majority of the sums therefore tells whether bit N−1 is
wrong. A tie counts as "correct".

| S | code (N, K) | check sums J | correctable flips | primitive polynomial |
|---|-------------|--------------|-------------------|----------------------|
| 2 | (15, 7)     | 4            | 2                 | x^4 + x + 1          |
| 3 | (63, 37)    | 8            | 4                 | x^6 + x + 1          |
| 4 | (255, 175)  | 16           | 8                 | x^8 + x^4 + x^3 + x^2 + 1 |
| 5 | (1023, 781) | 32           | 16                | x^10 + x^3 + 1       |

The check-sum masks are computed during elaboration by `eg_ldpc_pkg::check_mask`, so no
table is stored. For S = 2 the four sums are:

- c3 ⊕ c11 ⊕ c12 ⊕ c14
- c7 ⊕ c8 ⊕ c10 ⊕ c14
- c1 ⊕ c5 ⊕ c13 ⊕ c14
- c0 ⊕ c2 ⊕ c6 ⊕ c14

This is the classic (15,7) decoder. The data-bit counts K above are the dimensions of
the null spaces of the resulting parity-check matrices. Other primitive polynomials
label the points differently but give equivalent codes.

## How a read proceeds

```
 data_in ──load──▶ ┌──────────── cyclic shift register c[0..N-1] ─────────────┐
                   │ c[0] ◀── ⊕ ◀── c[N-1]     (shift: c[i] → c[i+1])         │
                   └──────┬──────────────────────────────────────┬───────────┘
                          ▲ corr                                 │ taps
                          │                                      ▼
                   majority gate ◀──── B1..BJ ──── XOR matrix (J check sums on c[N-1])
                                          │
                                          ▼
                                    control unit ── finish ──▶ output buffers ──▶ data_out
                                          └──────── error
```

Each decoding cycle does three things:

1. The XOR matrix forms the J check sums.
2. The majority gate decides whether `c[N-1]` is wrong.
3. The register rotates by one place. The leaving bit goes back into `c[0]` through
   the correction XOR.

The code is cyclic, so after k rotations the same check sums judge the bit that was
loaded at position N−1−k. After N rotations every bit has been judged once, and the
word is back in place.

The control unit counts the first three cycles and ORs all check sums over them:

- **All zero:** the word is error-free. The unit raises `finish` right away.
- **Any one set:** the unit raises `error` and runs N more cycles, one complete
  majority-logic pass over all bits, and then raises `finish`.

The first three cycles also correct bits, because the majority gate always drives the
correction XOR. With at most J/2 errors every majority decision is right. A bit fixed
early therefore stays fixed, and the later pass leaves it alone.

Both endings leave the word rotated by 3 places (3 or 3 + N shifts). The output
buffers therefore take `data_out[i]` from register bit `(i + 3) mod N`. This is fixed
wiring, with no multiplexer.

## Interface and timing of `mldd_top`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock, rising edge |
| `rst`         | in  | 1     | synchronous reset, active high |
| `load`        | in  | 1     | one-cycle pulse: capture `data_in` and start a read |
| `data_in`     | in  | N     | word read from memory; bit i is the coefficient of x^i |
| `data_out`    | out | N     | decoded word; all zero while `data_out_en` is low |
| `data_out_en` | out | 1     | output enable (high = buffers driving) |
| `finish`      | out | 1     | decoding done (same as `data_out_en`) |
| `error`       | out | 1     | a check sum fired in the first three cycles |

The load cycle counts as cycle 1. The next three cycles are the detection cycles.

| read          | `finish`/`data_out` valid from       | at N = 63        |
|---------------|--------------------------------------|------------------|
| no error      | cycle 5 (3 detection + 2 I/O)        | cycle 5          |
| error found   | cycle N + 5                          | cycle 68         |
| plain MLD, for comparison | cycle N + 2, always      | cycle 65         |

In clock edges: `finish` rises 3 edges after the edge that sampled `load` (error-free
read), or N + 3 edges after it (read with an error). `finish`, `error` and `data_out`
then hold until the next `load`. A `load` in any state abandons the current read and
starts the new one. `data_in` only needs to be valid in the load cycle.

`error` is the detector's verdict, not a failure flag. When `error` is set and at
most J/2 bits were flipped, `data_out` is the corrected codeword. With more flips than
that, the word may not be corrected even though `error` reports the problem.

The architecture uses tristate output buffers that stay in high impedance until
`finish`. This RTL is two-state: it drives `data_out` to zero and `data_out_en` low
instead. To build real tristate pins, put a pad or bus driver after it with
`data_out_en` as the enable.

## Modules

All files are in `rtl/`, one unit per file.

| file | role |
|------|------|
| `eg_ldpc_pkg.sv` | field arithmetic and check-sum masks (elaboration-time functions) |
| `mldd_pkg.sv` | control-unit state type (`IDLE`, `DETECT`, `DECODE`, `DONE`) |
| `mldd_shift_register.sv` | N-bit codeword register with parallel load and the correction XOR |
| `mldd_xor_matrix.sv` | J check sums orthogonal on `c[N-1]` |
| `mldd_majority_gate.sv` | popcount of the J sums compared against J/2 |
| `mldd_control.sv` | 3-cycle detection counter, N-cycle decode counter, `finish`/`error` |
| `mldd_output_buffer.sv` | output gating and the fixed de-rotation by 3 |
| `mldd_top.sv` | the decoder/detector; parameter `S` (2…5, default 3) |

`N = 2^(2S) − 1` and `J = 2^S` are derived inside the top. At the default size the
synthesized logic is:

- 75 flip-flops: 63 for the register, the rest for the control unit;
- eight 8-input XOR trees;
- an 8-input majority;
- a 6-bit counter.

## What follows the original architecture and what is chosen here

Taken from the architecture:

- cyclic shift register with a correction XOR at its input;
- XOR matrix of check sums orthogonal on one bit, and a majority gate;
- a control unit that counts three cycles and raises `finish`;
- output buffers that open on `finish`;
- the (15,7) check equations;
- the list of codes and the (63,37) main size;
- the latencies of 5 and N + 5 cycles.

Chosen here:

- The choice of primitive polynomials, and computing the masks from the geometry.
- Bit order. `c[0]` is fed by the correction gate and the checks sit on `c[N-1]`.
- After a detected error, the decoder runs N *further* cycles, giving the N + 5
  latency. Stopping after N cycles in total would save 3 cycles, but then the two
  endings would leave different rotations.
- The de-rotation wiring at the output.
- The two-state model of the tristate buffers.
- `finish`/`error` held until the next `load`, restart on `load`, and synchronous
  reset. The codeword register itself has no reset.
- How data bits sit inside the codeword is left to the encoder. The decoder corrects
  the whole word.

## Not included

- **Encoder.** It needs the systematic form of the code, which the design does not
  fix. The testbenches form codewords as multiples m(x)·g(x) mod (x^N + 1) of the
  generator polynomial instead.
- **The protected memory.** Its read port connects to `data_in`/`load`.

## Verification

Every testbench in `tb/` is self-checking. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

- `tb_mldd_xor_matrix`: compares the check sums with the printed (15,7) equations, and
  with independently computed (63,37) masks. It uses one-hot and random words.
- `tb_mldd_majority_gate`: exhaustive for J = 4 and J = 8.
- `tb_mldd_shift_register`: load, hold, and rotation with random corrections, against
  a reference model.
- `tb_mldd_output_buffer`: gating and the rotation by 3.
- `tb_mldd_control`: cycle-exact sequencing. It covers errors in each of the three
  detection cycles, a check sum that fires only after detection (ignored), restart,
  and reset.
- `tb_mldd_top`: end to end at the default (63,37) size. It runs 2000 reads with 0–5
  random flipped bits and checks:
  - latency of exactly 5 or N + 5 cycles;
  - `error` set for every read with 1–5 flips;
  - corrected output for up to 4 flips;
  - output released while busy.

  It also counts early finishes, full decodings, corrected reads, detections beyond
  the correction bound and restarts.
- `tb_mldd_codes`: the same scoreboard (`tb/mldd_code_check.sv`) on the (15,7),
  (255,175) and (1023,781) codes side by side. For (15,7) it also checks detection of
  3–4 flips, which is beyond its correction bound of 2.

All pass. The detection guarantee (any four flips for N = 63) is exercised with random
patterns, not proved. A separate software model of the decoder found no miss for
N = 63, neither over all patterns of up to 3 flips nor over 100 000 random patterns
each of 4 and 5 flips. For N = 15,
about 0.5 % of 5-flip patterns escape the three detection cycles.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/eg_ldpc_pkg.sv rtl/mldd_pkg.sv tb/tb_mldd_top.sv --top-module tb_mldd_top
./obj_dir/Vtb_mldd_top
```

To change the code, set `S` on `mldd_top`. `tb/tb_mldd_codes.sv` shows how, including
the generator polynomials a testbench needs.
