# Fault-tolerant adder that uses spare width for concurrent recomputation

A safety-minded microcontroller wants every addition checked, but a second
adder costs area and doing every addition twice costs a cycle. This design
sits in between. It observes that most additions in real code use far fewer
bits than the adder has: loop counters, array indices and exponent fields fit
in 16 bits, only addresses and full-width data need 32. When both operands of
an addition fit in the lower half of the adder, the upper half is idle, so it
is used to compute the same addition a second time, on copies of the operands
shifted up by half the width. Both copies come out in the same cycle and are
compared. Only when an operand really needs the full width is the addition
repeated in a second cycle, with the two operands swapped between the adder
inputs.

The result is a checked adder that costs two extra half-width multiplexers, a
1-bit multiplexer and a small OR tree instead of a second adder, and that
averages well under two cycles per checked addition.

## How an addition is checked

The n-bit adder (n = 32) is built from two n/2-bit adders. A zero test looks at
the upper halves `a_h`, `b_h` of both operands.

**Narrow addition** (upper halves all zero, the `dual` case):

```
            a_l  b_l                a_l  b_l   (copies, via the operand muxes)
             |    |                  |    |
   c_in -> [ ADD(n/2) lower ] -> c_lo    [ ADD(n/2) upper ] <- c_in (carry mux)
                  |                           |
             {c_lo, s_lo}   ==compare==   {c_hi, s_hi}
```

* The two operand multiplexers route `a_l`, `b_l` into the upper adder
  instead of `a_h`, `b_h`.
* The carry multiplexer feeds the upper adder with the carry in instead of the
  lower adder's carry out, so the carry chain is cut at the half boundary.
* Both halves now compute the same (n/2+1)-bit result. This is recomputation
  with shifted operands done concurrently: a fault in bit k of the lower adder
  appears in bit k+n/2 of the full adder, a different piece of hardware.
* The result delivered is `{c_lo, s_lo}` zero-extended to n bits, with
  `cout` = 0 (the carry is already in `sum[n/2]`).

**Wide addition** (some upper bit set):

* Cycle 1: the two halves form an ordinary n-bit adder and compute a + b.
  The operands are kept in registers.
* Cycle 2: the kept operands are fed back swapped, so the adder computes
  b + a. Each adder input port now carries the other operand, so a fault on one
  input path changes the two results differently.

In both cases the two results, including the carry out, go into registers and
the comparator checks them in the following cycle, which keeps the comparator
off the adder's path. `error` goes high with the result when they differ.

### What the check does and does not catch

* Narrow additions: a fault confined to one half (sum bit, operand path,
  carry chain, operand mux) changes only one of the two copies, because they
  run on disjoint hardware, so it is caught whenever it changes the result.
* Wide additions: faults on one adder input path are caught whenever the two
  operands differ in the affected bit, thanks to the swap. A fault that hits
  both computations the same way, such as a stuck sum output bit, is **not**
  caught: both cycles use the same hardware in the same position. The
  end-to-end testbench demonstrates both effects.
* The zero test itself is not duplicated. If it wrongly reports "narrow", the
  result has its upper half missing and both copies agree.

## Cost and timing

| item | size for n = 32 |
|---|---|
| operand multiplexers | 2 x 16 bit |
| carry multiplexer | 1 bit |
| zero test | OR tree over 32 bits: 8 four-input + 2 four-input + 1 two-input gates, 3 levels, then one inverter |
| result registers | 2 x 33 bit |
| kept operands for the repeat | 2 x 32 bit + carry |
| comparator | 33-bit XOR and OR reduction |

Counted in two-input gate equivalents with a four-input OR at twice the cost,
the multiplexers come to about 3n + 4 gates and the OR tree to 21, against
about 5n for even a ripple-carry second adder. The zero test and the
multiplexers add about four gate delays in front of the adder.

Throughput and latency, counted from the cycle a request is accepted:

| addition | adder cycles | result appears |
|---|---|---|
| narrow | 1 (next request can be accepted the next cycle) | 1 cycle later |
| wide | 2 (`in_ready` low in the repeat cycle) | 2 cycles later |

### Measured on code

`tb/tb_workloads.sv` replays the additions of two kernels through the adder:

| kernel | narrow | wide | cycles per addition |
|---|---|---|---|
| Livermore Loop 1, 990 iterations (per iteration 6 narrow: loop compare, increment, four index computations; 13 wide: struct-member and element addresses, data) | 5940 | 12870 | 1.684 |
| Single-precision matrix multiply with software floating point, n = 64 | 2113729 | 1839104 | 1.465 |

For the matrix multiply the counts follow 8n^3 + 4n^2 + 3n + 1 narrow and
7n^3 + n^2 wide additions: row-major index arithmetic, loop compares and
increments and exponent arithmetic are narrow, and base-plus-offset addresses
and mantissa additions are wide. At n = 256 that formula gives 1.466 cycles
per addition; n = 256 is not simulated, as it would take several minutes.

## Interface of `ft_adder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | request present |
| `in_ready` | out | 1 | request taken this cycle if `in_valid`; low in the repeat cycle |
| `a`, `b` | in | N | operands (in a processor: the two register-file read ports) |
| `cin` | in | 1 | carry in |
| `out_valid` | out | 1 | one-cycle pulse: result below is valid |
| `sum` | out | N | sum |
| `cout` | out | 1 | carry out (0 for narrow additions, see above) |
| `narrow` | out | 1 | the addition took the one-cycle concurrent path |
| `error` | out | 1 | the two computations disagreed |

The requester holds `a`, `b`, `cin` and `in_valid` until the request is
accepted; an assertion checks this. Results cannot be back-pressured. The
adder only adds: to subtract, present the inverted subtrahend and `cin` = 1.
A 16-bit subtraction takes the narrow path only if the inversion is done on 16
bits, as the workload testbench does.

## Modules

| file | role |
|---|---|
| `rtl/ft_add_pkg.sv` | width (32), OR fan-in (4), sequencer state type, OR-tree sizing functions |
| `rtl/ft_adder.sv` | top: operand hold and swap, result registers, comparison, outputs |
| `rtl/reso_ctrl.sv` | two-state sequencer: issue / repeat, capture strobes, `out_valid` |
| `rtl/reso_datapath.sv` | the split adder with zero test, operand muxes and carry mux |
| `rtl/zero_detect.sv` | OR tree of parametric fan-in, inverted |
| `rtl/mux2.sv` | W-bit two-to-one multiplexer |
| `rtl/add_half.sv` | half-width adder, behavioural (any adder architecture works) |
| `rtl/result_compare.sv` | XOR/OR-reduce equality check |

`N` must be even and at least 4; every module takes its defaults from the
package.

## Where this RTL makes its own choices

These points are not fixed by the method and were chosen here:

* the valid/ready request handshake, the synchronous active-low reset and the
  absence of result back-pressure;
* comparing the carry outs as well as the sums, and the zero-extended format
  of a narrow result;
* keeping the operands in registers for the repeat, with the swap done by two
  N-bit multiplexers (in a processor the swap could instead come from reading
  the register file ports the other way round);
* a behavioural half-adder, left to synthesis;
* an inverter after the OR tree to give an active-high `dual` signal.

Not built: a pipelined version of the adder (the zero test and multiplexers
could be given their own stage); a hardware subtract mode; the register file.

## Simulating

Every testbench is self-checking and prints one
`TB_RESULT checks=<n> failures=<n>` line. With Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/ft_add_pkg.sv rtl/mux2.sv rtl/add_half.sv rtl/zero_detect.sv \
  rtl/result_compare.sv rtl/reso_datapath.sv rtl/reso_ctrl.sv rtl/ft_adder.sv \
  tb/tb_ft_adder.sv --top-module tb_ft_adder -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_ft_adder` | full 32-bit adder end to end: 5000 random additions with gaps and bursts, exact latency, then two injected faults (a stuck sum bit and a stuck operand bit in the upper half), checking which additions must be flagged; counts narrow, wide, stalls, back-to-back narrow additions and detected errors in each mode |
| `tb_workloads` | the kernel addition streams above, with addition counts and cycle totals checked |
| `tb_reso_datapath` | 32-bit datapath with random and boundary operands; 8-bit datapath exhaustively |
| `tb_reso_ctrl` | sequencer against a cycle-level model; burst cycle counts (narrow 1/cycle, wide 1 per 2 cycles) |
| `tb_zero_detect`, `tb_mux2`, `tb_add_half`, `tb_result_compare` | the leaf blocks |

The fault injection in `tb_ft_adder` uses `force` on nets inside the datapath
(`u_dp.s_hi`, `u_dp.hi_a`), so renaming those breaks that testbench.
