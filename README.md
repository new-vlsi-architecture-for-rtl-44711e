# Parallel 32-point Discrete Hartley Transform engine

This RTL computes the discrete Hartley transform (DHT) of a frame of 32 real samples,
for example a block of audio, in a parallel, pipelined datapath:

    X(k) = sum_{n=0}^{N-1} x(n) * cas(2*pi*n*k/N),   cas(a) = cos(a) + sin(a)

The DHT is a real-to-real relative of the DFT. The engine does not use a split-radix
FFT, whose butterflies change from stage to stage. It uses a length-doubling recursion
instead. Every level of that recursion has the same shape: an add/subtract chain, two
half-length transforms running side by side, and a combining stage. In the combining
stage the odd half of the spectrum needs only products by a few fixed constants. Each
constant is applied to several operands, so one constant multiplier can serve all of
them in turn through a multiplexer and a demultiplexer. This sharing is what keeps the
multiplier count low.

## The recursion

Split the input into even samples `x(2i)` and odd samples `x(2i+1)`, `i = 0..N/2-1`.
The odd samples are first rewritten as an **auxiliary sequence** `u`:

    u(N/2-1) = x(N-1),        u(i) = x(2i+1) - u(i+1),   i = N/2-2 .. 0

so that `x(2i+1) = u(i) + u(i+1)` (with `u(N/2) = 0`). Take `E = DHT_{N/2}(x(2i))` and
`U = DHT_{N/2}(u)`. Using `cas(a+b) + cas(a-b) = 2 cos(b) cas(a)`, the N-point transform
follows from the two half-length ones, with `c_k = cos(2*pi*k/N)`, `s_k = sin(2*pi*k/N)`,
`u0 = u(0)` and `W(j) = 2*U(j) - u0`:

    X(k)       = E(k)     + s_k*u0 + c_k*W(k)          k = 0 .. N/4-1
    X(N/2+k)   = E(k)     - s_k*u0 - c_k*W(k)
    X(N/2-k)   = E(N/2-k) + s_k*u0 - c_k*W(N/2-k)      k = 1 .. N/4
    X(N-k)     = E(N/2-k) - s_k*u0 + c_k*W(N/2-k)

(`c_k*W` is the same quantity as `2*c_k*(U - u0/2)`. Writing it this way avoids a
half-LSB term.) Because `s_k = c_{N/4-k}`, each constant `c_m`, `m = 1..N/4-1`, is
multiplied by exactly three operands: `W(m)`, `W(N/2-m)` and `u0`. `c_0 = 1` and
`c_{N/4} = 0` cost nothing.

The recursion stops at N = 8, where a hand-factored kernel needs only additions and two
products by sqrt(2):

    a± = (x0+x4) ± (x2+x6)    b± = (x1+x5) ± (x3+x7)    e± = (x0-x4) ± (x2-x6)
    X0 = a+ + b+   X4 = a+ - b+   X2 = a- + b-   X6 = a- - b-
    X1 = e+ + √2(x1-x5)   X5 = e+ - √2(x1-x5)   X3 = e- + √2(x3-x7)   X7 = e- - √2(x3-x7)

For N = 32 the engine therefore holds four 8-point kernels, three levels of auxiliary
chains (one 16-long chain, two 8-long chains, four 4-long chains), two 16-point
combining stages and one 32-point combining stage. All of them operate in parallel.

## Module structure

    dht_top                 input/output registers, handshake, guard bits
    ├── phase_ctrl          multiplexer phase 0..P-1 and frame strobe
    └── dht_core  N=32      recursive core (one register per level)
        ├── aux_seq  L=16   auxiliary sequence of the odd samples
        ├── dht_core N=16   (even samples)  ──┐ each: aux_seq L=8, two dht_core N=8,
        ├── dht_core N=16   (sequence u)    ──┘       register, dht_combine N=16
        │       └── dht_core N=8 = dht8     8-point kernel, one mul_shared (sqrt 2)
        └── dht_combine N=32                add/sub butterflies + 7 x mul_shared
                └── mul_shared              one constant multiplier, up to P operands
                        └── const_mult      shift-and-add, carry-save compressed

`dht_pkg` holds the functions shared across modules: the fixed-point constants
(computed at elaboration with `$cos`/`$sqrt`), the width rules and the pipeline depth
`core_latency(N)`. The "interchange" wiring, which pairs index k with N/2-k, is not a
module of its own. It is the index arithmetic inside `dht_combine`.

## Shared multipliers and the two time scales

This is the part that needs the most care when the design is changed.

The engine has one clock, `clk`, and a **frame period** of `P` clock cycles (P = 4 by
default). `phase_ctrl` counts the phase 0..P-1 and raises `frame_stb` in phase P-1.
`frame_stb` acts as the slow clock: every data register loads only on it. These are
the input register, the one register per recursion level inside `dht_core`, and the
output register. Between two strobes all the operands of a stage therefore stay
constant.

`mul_shared` exploits that. Operand j goes to multiplier `j / P` in phase `j % P`:

    phase       0        1        2        3 (= frame_stb)
    mux      op[0]    op[1]    op[2]    op[3]
    product  ->slot0  ->slot1  ->slot2  used directly, not stored
    next-stage register loads all products at the end of phase 3

The product of the last phase is not registered. It is read straight from the
multiplier while the downstream register is loading. So all products of a stage are
valid together in phase P-1 and cost no extra latency. Every product computed between
two frame strobes belongs to the same frame. Consequences:

- Every stage, including the 8-point kernels, is combinational around its shared
  multipliers. The adder networks in front of the multiplexers see operands that
  change only at a strobe, so they have a whole frame period to settle (a P-cycle
  multicycle path). The path from the multiplexer through the multiplier and the
  butterflies into the next register must settle in one clock cycle.
- One frame period per recursion level. At N = 32, a frame accepted on a strobe leaves
  the output register `(core_latency(32)+1)*P = 3*4 = 12` cycles later.
- A new frame is accepted on every strobe. That is 32 samples per frame period, or 8
  samples per clock at P = 4.
- `P = 1` turns sharing off. `mul_shared` then instantiates one multiplier per operand,
  and the engine accepts 32 samples in every clock cycle with a 3-cycle latency.
  `P = 2` or `3` are also legal. A `mul_shared` with more operands than P uses
  `ceil(NOPS/P)` multipliers.

Multiplier count at N = 32, P = 4. The 47 constant products of a frame run on **17
physical multipliers**:

| stage | products per frame | multipliers |
|---|---|---|
| 4 x `dht8` (sqrt 2) | 4 x 2 | 4 (2 of 4 slots used) |
| 2 x `dht_combine` N=16 (c_1..c_3) | 2 x 9 | 6 (3 of 4 slots used) |
| 1 x `dht_combine` N=32 (c_1..c_7) | 21 | 7 (3 of 4 slots used) |

The stage counts differ from the published count of N/2 products per combining stage.
Here a stage computes 3*(N/4-1) products, because `c_0 = 1` and `c_{N/4} = 0` need no
multiplier and the sine terms reuse the cosine constants. The unshared algorithm needs
40 multipliers by its own count. The published estimate
for the shared architecture is 16 multipliers, grouped four per multiplier block with
four operands each. The grouping here keeps one constant per multiplier. It does not
mix operands of different stages, so one slot in four is idle in the combining stages.

## Interface of `dht_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears the phase counter and the valid flags only |
| `in_valid` | in | 1 | a frame is offered on `x` |
| `in_ready` | out | 1 | high one cycle per frame period (= `frame_stb`); the frame is taken when `in_valid` is also high |
| `x[N]` | in | W_IN | signed samples x(0..N-1) |
| `out_valid` | out | 1 | one-cycle pulse: `X` has just been updated with a new spectrum |
| `X[N]` | out | W_IN+log2(N)+1 | signed coefficients X(0..N-1), held for a frame period |

Frames can be offered back to back or with gaps. Gaps produce no `out_valid`. The data
registers are not reset. Only the control state is. Concurrent assertions check the
handshake rules in simulation: `out_valid` comes only in the cycle after a frame strobe,
and `in_ready` lasts one cycle when P > 1. They also check that the phase counter wraps
right after the strobe.

## Number format and accuracy

All datapath values are two's-complement integers. The samples enter with `GB` extra
fractional bits (guard bits), which the output register rounds away. Constants are
unsigned fixed point with `CF` fractional bits: `round(cos(2*pi*m/N)*2^CF)` and
`round(sqrt(2)*2^CF)`. `const_mult` adds one shifted copy of the operand per set bit of
the constant and a rounding term `2^(CF-1)`. It compresses the copies with 3:2
carry-save adders and ends with a single carry-propagate adder.

Two effects set the precision:

- The auxiliary sequences are alternating sums. They grow by up to N/2 per level, so
  intermediate values are much larger than the final coefficients (`int_width` adds
  3*log2(N)+1 bits to the sample width). The error of each constant is multiplied by
  these large values.
- Each combining stage roughly triples the rounding error of the stage below, because
  `W = 2U - u0`.

With the defaults (`CF = 24`, `GB = 4`, 36-bit internal datapath at N = 32), every
coefficient stays within 1 LSB of the exact transform. The largest error measured over
full-scale and random frames was 0.75 LSB. With 16 constant bits and no guard bits the
error reached 23 LSB on full-scale square waves. Larger transforms need about 2 more
guard bits and 2 more constant bits per doubling above 32 points. The size test widens
both this way.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | transform length, a power of two >= 8 |
| `W_IN` | 16 | sample width (this design's choice, suited to audio) |
| `CF` | 24 | fractional bits of the constants (this design's choice) |
| `P` | 4 | operands per shared multiplier = clock cycles per frame |
| `GB` | 4 | guard bits (this design's choice) |

The lower-level modules take `N`, `W` (internal width), `CF` and `P` from their parent.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<m>`. They
compare against floating-point evaluation of the defining sums, or against exact
integer arithmetic, and never against the RTL's own formulas. To build and run one
with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dht_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dht_pkg.sv tb/tb_dht_top.sv
    ./obj_dir/Vtb_dht_top

| testbench | what it covers |
|---|---|
| `tb_dht_top` | 32-point engine at its defaults: about 400 frames (full-scale patterns, random), back-to-back and with gaps. Checks each coefficient within 1 LSB, the 12-cycle latency, one output per frame period in bursts, and no spurious `out_valid`. Also checks that operand interleaving, three frames in flight, bubbles and full-scale frames all occurred. |
| `tb_dht_sizes` | the same engine at N = 8, 16, 64, 128, 256, plus N = 32 with P = 1 (one frame per clock), 2 and 3. Checks accuracy, latency and output spacing. |
| `tb_dht_core` | 16-point recursive core with a new frame every period |
| `tb_dht_combine` | combining stage at N = 16 and 32, against the equations in their `2*cos*(U - u0/2)` form |
| `tb_dht8` | 8-point kernel against the defining sum |
| `tb_aux_seq` | auxiliary sequence against its alternating-sum closed form |
| `tb_mul_shared` | shared multiplier with 4, 3 and 6 operands, and with P = 1 |
| `tb_const_mult` | constant multiplier against 64-bit integer arithmetic |
| `tb_phase_ctrl` | phase sequence and strobe for P = 4 and 3 |

## Where this design makes its own choices

The recursion, the 8-point kernel, N = 32, and multipliers by a constant shared four
ways through multiplexers and demultiplexers define the architecture. The following
are choices of this implementation:

- **Widths and rounding:** sample width, constant precision, guard bits,
  round-to-nearest.
- **Clocking:** the "two clocks" of the sharing scheme are one clock plus a clock
  enable.
- **Pipelining:** one pipeline register per recursion level. The product of the last
  phase is unregistered.
- **Handshake and reset:** `in_valid`/`in_ready` with an `out_valid` pulse; reset
  clears control state only.
- **Multiplier grouping:** one multiplier per constant and stage (17 in all, against
  the published figure of 16).
- **Carry-save constant multiplier:** the shift-and-add, carry-save structure is the
  simplest form of a "multiplier with a constant". The published architecture does not
  detail it.

The original algorithm states a throughput of 32 samples per clock. In this RTL that
holds per frame period, or per clock cycle with `P = 1`. Frame-level audio processing
around the transform, such as windowing, quantisation or coding, is not part of this
design.
