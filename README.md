# NULL Convention Logic in SystemVerilog: gates, registers and a pipelined 4x4 multiplier

This is a small, clockless circuit library in NULL Convention Logic (NCL),
with a two-stage pipelined 4x4 signed multiplier built from it. An NCL circuit
has no clock. Each wire pair says whether its value has arrived, and every
gate waits until enough of its inputs have arrived before it changes its
output. A stage knows by itself when its result is complete, and it tells the
stage before it when it may send the next value. So the circuit runs at the
speed of the data and its gates, not at a worst-case clock period.

Everything here is gate-level NCL: every signal is dual-rail and every gate
is a threshold gate with hysteresis. The RTL is written so that it simulates
with zero gate delay in an event-driven simulator (Verilator 5 is used). It
also synthesizes: each gate with memory becomes a latch.

## 1. Dual-rail values and wavefronts

One bit travels on two wires, `r0` and `r1` (type `ncl_pkg::dr_t`):

| value   | r1 | r0 |
|---------|----|----|
| DATA1   | 1  | 0  |
| DATA0   | 0  | 1  |
| NULL    | 0  | 0  |
| illegal | 1  | 1  |

Inputs are handed over in alternating **wavefronts**. A DATA wavefront makes
every bit DATA. Then a NULL wavefront returns every bit to NULL. Then comes
the next DATA wavefront, and so on. NULL is the "no value yet" state that
separates two values. Validity is encoded in the data itself, so no clock is
needed to say when a value is valid.

Two rules make a circuit independent of its delays. The first is the
encoding above, in which a value announces its own arrival. The second is
**input completeness**. A block's outputs may not all become DATA until all of its
inputs are DATA. They may not all return to NULL until all of its inputs are
NULL. If some outputs could complete early, the next stage could see a
"finished" result while some inputs had not arrived yet. Every combinational
cell here obeys this rule, and its testbench checks it after every single
input change.

## 2. The threshold gate with hysteresis (`ncl_th`)

Every other block is built from this one gate. A THmn gate has `N` inputs and
threshold `M`:

* its output **rises** once at least `M` inputs are high;
* its output **falls** only once **all** inputs are low;
* in every other case it **holds** its value. This is the hysteresis.

A weighted gate THmnWw1w2 counts its first input `W1` times and its second
input `W2` times. A few special cases:

* TH22 is the two-input Muller C-element.
* THnn in general is an n-input C-element.
* TH1n is a plain OR. It has no memory, because its set and clear conditions
  cover every input pattern.
* TH23W2 is `M=2, N=3, W1=2`.
* TH34W22 is `M=3, N=4, W1=2, W2=2`.

Only the logic function of the gate is modelled, not its transistor
network. It is an `always_latch` that is transparent while set, clear or
reset applies, and holds otherwise. Verilator's lint says "No latches
detected" for this block. The storage is real, as the `ncl_th` testbench
shows; yosys infers a `$dlatch` for every gate except TH1n. The `rst` input
is this library's addition. Register gates use it to start at NULL, and the
combinational cells tie it low.

## 3. Gate library

`a ; b, c` below means that `a` is the weight-2 input.

| cell       | function      | rails |
|------------|---------------|-------|
| INVERT     | `z = ~x`      | rails swapped, no gate (`ncl_pkg::dr_not`) |
| `ncl_and2` | `z = x & y`   | `z.r1 = TH22(x1,y1)`, `z.r0 = TH34W22(x0,y0 ; x1,y1)` (both DATA0 rails weight 2) |
| `ncl_or2`  | `z = x \| y`  | `z.r0 = TH22(x0,y0)`, `z.r1 = TH34W22(x1,y1 ; x0,y0)` (both DATA1 rails weight 2) |
| `ncl_xor2` | `z = x ^ y`   | `z.r0 = TH23W2(TH22(x1,y1) ; x0,y0)`, `z.r1 = TH23W2(TH22(x1,y0) ; x0,y1)` |
| `ncl_ha`   | `{c,s} = x+y` | `c.r0 = TH12(x0,y0)`, `c.r1 = TH22(x1,y1)`, `s.r0 = TH23W2(c1 ; x0,y0)`, `s.r1 = TH33W2(c0 ; x1,y1)` |
| `ncl_fa`   | `{co,s} = x+y+ci` | `co.r0/r1 = TH23` on the three 0/1 rails, `s.r0 = TH34W2(co1 ; ci0,x0,y0)`, `s.r1 = TH34W2(co0 ; ci1,x1,y1)` |
| `ncl_mux2` | `z = s ? a : b` | `(s AND a) OR (NOT s AND b)` from the cells above |

The half and full adders are the "optimized" kind: each sum gate reuses the
opposite carry rail as a weight-2 input. The half adder's `c.r0` is a plain
OR, so the carry alone may turn DATA early. The sum cannot, so the pair
`{c, s}` still obeys input completeness.

## 4. Registers and the handshake (`ncl_reg`, `ncl_pipeline`)

This is the part that needs the most care. An NCL register sits between two
combinational stages:

```
            ko (to previous stage)            ki (from next stage)
                 ^                                   |
                 |  NOT TH(W)(W) <- TH12 per bit     |
 d[i].r0 --> TH22(d.r0, ki) --> q[i].r0              |
 d[i].r1 --> TH22(d.r1, ki) --> q[i].r1   <----------+
```

* Each rail passes through a TH22 whose second input is `ki`. While `ki = 1`
  ("send me DATA"), a DATA wavefront passes. Once it has passed, the register
  **holds** it, even if the input already goes back to NULL. While `ki = 0`
  ("send me NULL"), only a NULL wavefront passes, and a new DATA wavefront is
  blocked.
* Completion detection works like this. A TH12 on each output pair sees "this
  bit is DATA". One `WIDTH`-input C-element collects those flags, and its
  output is inverted to give `ko`. `ko` falls once every output bit is DATA
  and rises once every bit is NULL.
* `ko` of a register drives `ki` of the register before it. This is a
  four-phase, return-to-NULL handshake. Two wavefronts never collide in a
  stage, whatever the gate delays are.

One cycle for a register that sits between a source and a sink:

1. After reset the outputs are NULL, `ko = 1` and `ki = 1`.
2. The source sends DATA. The register passes it, and `ko` falls ("got it,
   send NULL").
3. The source sends NULL. The register keeps holding its DATA, because the
   sink has not acknowledged it yet.
4. The sink has captured the DATA and drops `ki`. The register now passes the
   NULL, and `ko` rises again.

Every register asserts that, outside reset, no bit entering or leaving it
carries the illegal code. This catches a source that breaks the encoding.

`ncl_pipeline` (defaults `WIDTH = 2`, `STAGES = 3`) chains registers in this
way. The logic between its registers is empty, so it behaves as an
asynchronous FIFO. DATA wavefronts follow each other through it, each
separated from the next by a NULL wavefront. A slow sink stalls the source
through the request chain.

## 5. The two-stage 4x4 Baugh-Wooley multiplier (`ncl_mult4x4`)

The operands `a` and `b` are 4-bit two's-complement numbers, with bit 3 as
the sign. The product `x` is 7 bits, with bit 6 as the sign. Baugh-Wooley
writes the signed product as a sum of non-negative terms. The six partial
products that involve exactly one sign bit are inverted (NCL AND plus a rail
swap, which makes a NAND), and a constant 1 is added at weight 2^4:

```
 column:  6      5      4      3      2      1      0
                               ~a3b0   a2b0   a1b0   a0b0
                        ~a3b1   a2b1   a1b1   a0b1
                 ~a3b2   a2b2   a1b2   a0b2
          a3b3   ~a2b3  ~a1b3  ~a0b3
                          1
```

The column sum, taken modulo 2^7, is the signed product. Only
(-8) x (-8) = 64 does not fit in 7 bits, and it comes out as -64.

Structure, from input to output:

| part | contents |
|------|----------|
| 8-bit NCL register | `{b, a}` |
| stage 1, 16 gates | 10 AND, 6 NAND partial products |
| stage 1, row 1 | half adders on columns 1, 2, 3 (`a0b1+a1b0` gives x1) |
| stage 1, row 2 | full adders on columns 2 (gives x2), 3, 4 |
| stage 1, row 3 | full adders on columns 3 (gives x3), 4, 5 |
| 10-bit NCL register | x0..x3, two bits each for columns 4, 5, 6 |
| stage 2 | 3-full-adder ripple over columns 4..6; the column-4 adder adds the constant 1 |
| 7-bit NCL register | x6..x0 |

The adder wiring follows the published two-stage structure, wire for wire.
The request chain runs from the sink's `ki`, through the 7-bit and 10-bit
registers, to `ko` at the 8-bit register. Two products can be in flight at
once, one in each stage.

**The constant 1.** A constant DATA1 input would never return to NULL. The
TH gates of the adder it feeds would then stay set forever, and the adder
would lock up. The constant is therefore made to follow the wavefront: its
`r1` rail is a TH12 of the two rails of the same adder's `x` operand, and its
`r0` rail is 0. It is DATA1 while that operand is DATA and NULL while it is
NULL. This is this design's own solution, because the published structure
only marks the input as "1".

## 6. Top level (`ncl_top`)

The multiplier uses the AND gate, the inverse, both adders, the register and
the threshold gate. The OR, XOR and MUX cells and the three-register
pipeline are separate examples, and they stand next to it with their own
ports. The ports are `mul_*`, `or_*`, `xor_*`, `mux_*`, `pipe_*` and a common
`rst`. The pipeline's `PIPE_WIDTH` (2) and `PIPE_STAGES` (3) are parameters.
Nothing in the top has a clock.

## 7. Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ncl_pkg.sv tb/tb_ncl_mult4x4.sv --top-module tb_ncl_mult4x4 -o sim
./obj_dir/sim
```

Always list `rtl/ncl_pkg.sv` first. The testbenches use `#1` steps and
`wait`-style loops, which need `--timing`.

| testbench | what it shows |
|-----------|---------------|
| `tb_ncl_pkg` | encoding table, encode/decode, inverse |
| `tb_ncl_th` | TH23, TH22, TH33, TH12, TH23W2, TH34W22 against a reference model under random, non-monotonic inputs; hold cases |
| `tb_ncl_and2`, `_or2`, `_xor2`, `_mux2`, `_ha`, `_fa` | every input combination, inputs arriving and leaving one at a time in random order; results, input completeness, hold until all NULL |
| `tb_ncl_reg` | pass, hold against NULL input, block DATA while `ki = 0`, completion timing of `ko` |
| `tb_ncl_pipeline` | 300 values in order through 3 stages; counts values in flight together and source stalls |
| `tb_ncl_mult4x4` | all 256 operand pairs plus 200 random ones, with operand bits arriving in random order and a randomly pausing sink; counts both stages busy and stalls |
| `tb_ncl_top` | everything at its default size, concurrently; requires each mechanism (overlap, stall, both MUX selections, an output held back by a missing input) at least once |

Each testbench runs in seconds.

**Simulation notes.** The handshake loops (`ko` to `ki`) are real
combinational feedback through latches. Verilator reports them as
`UNOPTFLAT` and settles them by iterating. This is inherent to NCL and is
harmless, because every loop is broken by a gate that holds its state. The
simulator has no X state, so every register gate takes `rst`. Before reset
is released, the inputs should be NULL and `ki` high.

## 8. Where this design departs from, or fills in, the source description

* **Gate model.** The gates are modelled by their logic function, with no
  transistor networks and no delays. A real NCL circuit relies on every gate
  being a genuine hysteresis gate. A synthesis flow that does not respect
  the inferred latches will break the circuit.
* **Reset.** `rst` is an addition. No initialisation scheme was given.
* **Wide completion trees.** Completion detection for registers wider than
  2 bits uses one wide C-element. A physical design would build a tree of
  TH44/TH33 gates.
* **The OR gate.** The OR gate's rails are assigned so that it computes OR,
  as its name says. A drawing that puts the same two gates on swapped
  output labels would compute NOR.
* **The constant 1.** The multiplier's constant 1 follows the wavefront, as
  described in section 5.
* **7-bit product.** The product is 7 bits, so (-8) x (-8) wraps.
* **The multiplexer.** Only the multiplexer's behaviour was given (select,
  and hold until all inputs are NULL). Its gate structure, built from AND/OR
  cells, is this design's choice.
* **The pipeline.** The pipeline has no logic between its registers.
* **Not built.** The following were not built because they were named
  without any detail: carry-lookahead adders, Booth or Wallace-tree
  multipliers, FIR filters, asynchronous rings and dividers. A VHDL-style
  multi-valued simulation package is also not reproduced; the gates here are
  structural instead.
