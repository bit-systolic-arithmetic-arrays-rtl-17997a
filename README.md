# Bit-systolic serial-parallel multiply-accumulator in differential dynamic logic

This design multiplies an n-bit multiplier that arrives one bit per clock by
an n-bit multiplicand held in parallel, and adds a 2n-bit addend that also
arrives one bit per clock. The array never needs a carry chain or a wide
adder. Every combinational path in it computes a single bit: one full-adder
step and one AND. The clock rate therefore does not depend on the word
length, and the array grows to any n by adding identical cells that talk
only to their neighbours. This style is called *bit-systolic*. The cells
are modelled on a family of differential, dynamic, two-phase clocked
circuits: every bit is carried on a true rail and a complement rail, and
every storage element is a capacitor sampled on one clock phase and read on
the other.

The RTL is parameterised by `N` (n above). The default is 4, the width used
in the worked examples of the design.

## How the array lines up the partial products

The array is a row of `N` identical bit-cells (`sp_bit_cell`). Cell `k`
holds multiplicand bit `y[k]`. The leftmost cell is `k = N-1`, where the
inputs enter. Each cell has:

* one delay on the **multiplier line**. The serial multiplier `x` moves one
  cell per cycle. `x<k>` is the bit currently at cell `k`.
* a **product cell**, which forms `x<k> & y[k]`.
* a **serial adder** (`Σs`), which adds that bit to the product stream
  coming from the left. It keeps its carry for exactly one cycle.
* two delays on the **product line**. The first holds the adder's result,
  called `a<k>` and exposed on `acc_tap[k]`. The second passes it to the
  next cell.

The multiplier moves one stage per cycle and the product stream two. Take
multiplier bit 0 entering in cycle `s`, and count cycles from there. In
cycle `t`, cell `k` sees multiplier bit `i = t - s - (N-1-k)`. It adds the
product-stream bit of weight `w = t - s - (N-1) + 2k`, and `i + k = w`, so
`x_i * y_k` always lands on the bit of the right weight. The carry from
weight `w` is added in the next cycle, to weight `w+1`, which is exactly
what a bit-serial adder needs. The recurrence the array implements is

    a<k>(t) = a<k+1>(t-2) + x<k>(t) * y[k]     (serial add, carry kept one cycle)
    x<k>(t) = x<k+1>(t-1)

For N = 4 and no addend, cell 0 forms these bits (`+` is the serial sum
with carries):

| cycle (s = 1) | a<0> formed              | weight |
|---------------|--------------------------|--------|
| 4             | x0y0                     | 0      |
| 5             | x0y1 + x1y0              | 1      |
| 6             | x0y2 + x1y1 + x2y0       | 2      |
| 7             | x0y3 + x1y2 + x2y1 + x3y0| 3      |
| 8             | x1y3 + x2y2 + x3y1       | 4      |
| 9             | x2y3 + x3y2              | 5      |
| 10            | x3y3                     | 6      |
| 11            | carry only               | 7      |

So the product LSB is formed `N` cycles into the sequence. One product of
`2N` bits leaves every `2N` cycles. The multiplier is sent as `N` bits
followed by `N` zeros, and the next word follows at once.

### The addend and accumulation

The product line already holds `2N` bits, so an addend costs no extra
logic. It is shifted into the left end of the product line. Its low `N`
bits travel ahead of the multiplier: addend bit 3 enters together with
multiplier bit 0 (for N = 4). At the start of a multiplication they
therefore sit in the high half of the pipeline.

The path from addend input to product output is exactly `2N` cycles long.
Feeding `p` back into `a` therefore lines each result up with the next
multiplication, and the array accumulates `Σ x_i·y_i` at one product per
`2N` cycles. `bsa_top` provides this feedback path. Its `acc_en` input
selects the addend source.

## Word timing at the ports

A clock cycle is one `phi2` pulse followed by one `phi1` pulse. The two
phases must never overlap; assertions in `dyn_dff` report an overlap.
Change inputs after `phi1` falls and before `phi2` rises. Read outputs
after `phi1` falls. With multiplier bit 0 on `x` in cycle `s`:

| signal      | timing                                                           |
|-------------|------------------------------------------------------------------|
| `x`         | bit `i` in cycle `s + i` for `i < N`; 0 in cycles `s+N .. s+2N-1` |
| `y`         | the word's value from cycle `s - 1` until the next word's `s - 1`  |
| `a`         | bit `w` (0..2N-1) in cycle `s + w - N + 1`                        |
| `acc_tap[k]`| bit `w` of cell `k`'s partial sum in cycle `s + N + w - 2k`        |
| `p`         | bit `w` of `a + x*y` in cycle `s + N + 1 + w`                      |
| `x_out`     | `x` delayed `N` cycles, for a following array                     |

`y` can change only in the cycle just before a word's first multiplier
bit. That is the one cycle in which every cell has a zero on its
multiplier line.

## Cells and signalling

| module         | function                                                                  |
|----------------|---------------------------------------------------------------------------|
| `diff_pkg`     | `diff_t` dual-rail bit `{t, f}`; `to_diff`, `diff_valid`                  |
| `latch_cell`   | dynamic latch: stores both rails when its sampling phase ends            |
| `dyn_dff`      | master (`phi2`) + slave (`phi1`) latch: a one-cycle delay                 |
| `xor_cell`     | differential XOR                                                          |
| `carry_cell`   | differential carry: high when two or more of `a`, `p`, `c` are high       |
| `product_cell` | differential one-bit product                                              |
| `serial_adder` | two `xor_cell`s, one `carry_cell` and a `dyn_dff` holding the carry       |
| `sp_bit_cell`  | one array stage, as described above                                       |
| `sp_mac`       | `N` stages; single-ended ports, dual-rail inside                          |
| `complex_gate` | dynamic gate `F = AB + CD`, inputs sampled on `phi2`                      |
| `bsa_top`      | `sp_mac` with the accumulate feedback, and `complex_gate` alongside       |

**Differential logic.** Each cell computes both output rails from the
true-form rails of its inputs, with no inverters. For example, the XOR
complement rail is `a.t&b.t | a.f&b.f`. When an input pair is left fully
discharged (both rails low), the outputs also stay low instead of taking an
arbitrary value. Every stored bit in `sp_bit_cell` is checked for equal
rails, and `rail_err` reports any pair whose rails agree. It stays low once
the array has been flushed.

**The complex gate.** The underlying switch conducts when its sampled input
is 0. `A` and `B` switch in parallel, `C` and `D` in parallel, and the two
pairs in series. The pre-charged output is therefore pulled low exactly
when `AB + CD` is false. The gate is an example of the circuit style. It
has its own ports in `bsa_top` and no connection to the arithmetic.

## How far the model goes

These points follow the source design:

* the array structure;
* the cycle-by-cycle schedule, addend pre-shift, output timing and `2N`
  feedback latency;
* the four cell types and their differential form;
* the master/slave two-phase flip-flop;
* the `F = AB + CD` gate.

These are choices of this RTL:

* **Storage is edge-modelled.** A dynamic stage keeps the charge present
  when its sampling switch opens. Each latch therefore stores on the
  *falling* edge of its phase. Pre-charge, evaluation and charge decay are
  not modelled, and a stage held too long without a clock does not forget.
* **The logic cells are combinational.** In the circuits, every cell
  samples its inputs on one phase. How the XOR, carry and product cells of
  one bit-cell are staggered across the phases is not specified. Here,
  storage sits only where the array's delays are: one per cell on the
  multiplier line, two on the product line, one for the carry. This
  reproduces the documented cycle schedule exactly.
* **No carry clear.** A carry out of bit `2N-1` enters the next word's
  LSB. Keep `a + x*y`, and a running accumulation, below `2**(2N)`.
* **No reset.** Dynamic circuits have none. After power-up, `2N + 2` cycles
  of zero input leave every stage at zero with valid rails.
* **Unsigned only.** Signed operands are a possible extension of the array,
  but no method for it is given, so none is built.
* The `acc_en` select and the `rail_err` and `acc_tap` outputs are
  additions for use and observation.
* Larger systems built from these arrays are not included: image
  convolvers, SIMD arrays and polynomial solvers. Neither are the
  electrical properties: depletion-mode GaAs FETs, voltage levels, and
  cells simulated at 2 GHz.

## Simulating

Every testbench checks itself. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/diff_pkg.sv tb/tb_bsa_top.sv --top-module tb_bsa_top
    ./obj_dir/Vtb_bsa_top

Replace `tb_bsa_top` with any testbench name. The `-y` options let verilator
find the other modules by file name. The package must be given explicitly.
The simulator may start storage at random values: the testbenches flush
the array instead of relying on a reset.

| testbench          | what it establishes                                                                                          |
|--------------------|--------------------------------------------------------------------------------------------------------------|
| `tb_bsa_top`       | full design at default size: 60 words mixing multiply, multiply-add and feedback accumulation, changing `y`; every `p` bit checked at its cycle; complex gate checked every cycle; each mechanism must occur |
| `tb_sp_mac`        | N = 4 and N = 12: every `p`, `acc_tap[k]` and `x_out` bit against integer arithmetic at the scheduled cycle |
| `tb_sp_bit_cell`   | one stage: partial sum, both product delays, multiplier delay, rail check                                    |
| `tb_serial_adder`  | 8-bit word streams, including a full carry ripple and carry between words                                    |
| `tb_dyn_dff`       | one-cycle delay, no change during `phi2`                                                                     |
| `tb_latch_cell`    | stores the value present at the end of the pulse and holds it                                               |
| `tb_complex_gate`  | all 16 input combinations plus random ones; output holds after `phi2`                                        |
| `tb_xor_cell`, `tb_carry_cell`, `tb_product_cell` | exhaustive over valid inputs, and discharged inputs                            |
| `tb_diff_pkg`      | the dual-rail helpers                                                                                        |

To change the word length, set `N` on `bsa_top` or `sp_mac`. Nothing else
depends on it. The checking code in the testbenches works out its expected
values with 64-bit integers, which allows `N` up to 15.
