# Configurable Booth multiplier (4/8/12/16-bit, signed)

A radix-2 Booth multiplier for 16-bit two's-complement operands that does
not always pay for 16 iterations. Before multiplying, it looks at how many
4-bit groups of the operands actually hold data, and runs 4, 8, 12 or 16
Booth iterations to match. `6 x 7` takes 4 iterations. `-22477 x 13632`
takes 16. Fewer iterations mean a shorter run and less switching.

The RTL follows the architecture of the paper "Design Of Delay-Efficient
Configurable Booth Multiplier For High Speed Applications". It comes in two
forms, side by side in the top module `cbm_top`:

* a **clocked, iterative** multiplier: operand registers, configuration
  register, Booth controller, counter, adder/subtractor, arithmetic shifter
  and accumulator, doing one Booth iteration per clock;
* a **combinational** multiplier (`cbm_comb`): the same algorithm unrolled
  into 16 stages. Only the first 4/8/12/16 stages are active.

The two forms share no signals.

## Booth's algorithm on the PA register

The multiplier `A` is scanned by Booth recoding and the multiplicand `B` is
added or subtracted. All the work happens in one wide register, PA:

```
 PA[33:17]          PA[16:1]         PA[0]
+------------------+----------------+-----+
| accumulator (17) | multiplier (16)| LSB |
+------------------+----------------+-----+
  starts at 0        starts at A      starts at 0
```

Each iteration looks at PA[1:0]:

| PA[1:0] | action on the accumulator   |
|---------|-----------------------------|
| 00, 11  | none                        |
| 01      | accumulator + B             |
| 10      | accumulator - B             |

Then all of PA is shifted right by one place, and the sign bit is
repeated. Bits that leave the accumulator move into the multiplier field.
After 16 iterations, PA[32:1] holds the 32-bit signed product.

The accumulator has 17 bits, one more than the operands. This guard bit
lets the multiplier subtract B = -32768 without overflowing. The published
design uses a 16-bit accumulator and a 33-bit PA, and would get that case
wrong. With the guard bit, PA is 34 bits. The low 33 bits still match the
published register value after a full run. For -22477 x 13632 the low 33
bits of PA end at `111011011011110010011011110000001`.

## Range detection

Each operand is split into the groups [15:12], [11:8], [7:4] and [3:0]. The
range of an operand is the highest group that holds a one. The range of the
multiplication is the larger of the two operand ranges:

| range code | highest non-zero group (either operand) | iterations |
|------------|------------------------------------------|------------|
| `11`       | [15:12]                                  | 16         |
| `10`       | [11:8]                                   | 12         |
| `01`       | [7:4]                                    | 8          |
| `00`       | [3:0], or both operands zero             | 4          |

A negative operand has its top group non-zero, so any product with a
negative operand runs all 16 iterations. Only small non-negative operands
get the shortened run.

### The extra iteration

Running only n Booth iterations makes the recoding treat the multiplier as
an **n-bit signed** number. Range detection only checks for zero groups, so
it can pick a range whose top bit is a one in a positive multiplier. Take
`A = 0x000E` (14). It lands in the 4-bit range, but 4-bit Booth reads
`1110` as -2, and the product would come out negative.

This design fixes that itself. If n < 16 and `A[n-1] = 1`, it runs one more
iteration (n + 1). That last step sees the zero above bit n-1, so the
product is exact. In this case the reported `iters` is 5, 9 or 13. The
range code stays the same. The published design has no such step.

Only the multiplier's bit matters. The multiplicand is always sign-extended
to the full accumulator width, so its value never depends on the range.

### Reading the product out after a short run

The design does not shrink PA to 2n+1 bits for an n-bit range. PA keeps its
full width, and the short run simply stops early. After k iterations, the
top 16+k+1 bits of PA[33:1] hold the product, scaled by 2^(16-k). Below them
sit the 16-k multiplier bits that were never scanned. `cbm_shifter` recovers
the product as `signed(PA[33:1]) >>> (16 - k)`, cut to 32 bits. The
combinational form uses the same read-out.

## Clocked multiplier

```
 a,b --> operand regs --> configuration register (range, iterations)
              |                         |
              | A                       v
              v                 counter <-- Booth controller <-- go
          accumulator (PA) <-- shifter <-- adder/subtractor <-- B
              |
              +--> shifter read-out --> p
```

| module            | role |
|-------------------|------|
| `cbm_operand_reg` | captures `a` (multiplier) and `b` (multiplicand) on `go` |
| `cbm_config_reg`  | registers the range and iteration count from `cbm_range_detect` |
| `cbm_counter`     | 4-bit down counter, preset to iterations - 1; `zero` marks the last iteration |
| `cbm_controller`  | FSM IDLE -> LOAD -> RUN; Booth-decodes PA[1:0] into `alu_op` |
| `cbm_alu`         | 17-bit accumulator ± sign-extended multiplicand, or pass |
| `cbm_shifter`     | one-place arithmetic right shift; product read-out |
| `cbm_accumulator` | the PA register |

### Handshake and timing

* Drive `a`, `b` and pulse `go` while `idle` is high.
* Edge 1 captures the operands. After it, `a` and `b` may change.
* Edge 2 loads the range, PA = {0, A, 0} and the counter.
* Edges 3 to k+2 each run one iteration (k = `iters`).
* `done` is high for the cycle after the last iteration. `p`, `range_q` and
  `iters` then stay valid until the next `go`.

So a multiplication takes **k + 2 clock edges** from `go` to `done`:

| range | iterations k       | edges from `go` to `done` |
|-------|--------------------|---------------------------|
| 4     | 4 (5 with extra)   | 6 (7)                     |
| 8     | 8 (9)              | 10 (11)                   |
| 12    | 12 (13)            | 14 (15)                   |
| 16    | 16                 | 18                        |

`go` is ignored while a run is in progress. The reset `rst_n` is
asynchronous and active low. It leaves the controller idle and the registers
at zero. `range_a` and `range_b` show the ranges of the operands in the
operand registers. `range_q` shows the range used by the last run.

The published paper gives no cycle timing. The LOAD state, the `done`
pulse and the ignored `go` are choices made in this design.

## Combinational multiplier

`cbm_comb` has ports `a`, `b`, `p`, `range_ab` and `iters`. It chains 16
`cbm_booth_stage` instances. Stage i works only when i < `iters`. A stage
that is switched off passes PA through unchanged, with its adder set to
"no operation". The product is then
read out as described above. Its result is the same as the clocked form's,
available after one combinational delay. In `cbm_top` it uses the `comb_a`,
`comb_b`, `comb_p`, `comb_range` and `comb_iters` ports.

The paper calls its multiplier combinational, and reports a combinational
path delay of 1.846 ns on a Virtex-7 FPGA. But its block diagrams show the
clocked datapath with a counter and a controller. Both readings are
provided. The stage chain and the stage bypass are this design's own way of
building the combinational form. No FPGA timing from the paper is
reproduced here.

## Departures from the published description

* **Guard bit.** The accumulator and adder have 17 bits, not 16, and PA has
  34 bits, not 33. This keeps products with B = -32768 correct.
* **Extra iteration** for a positive multiplier whose top in-range bit is
  one. This keeps shortened runs exact.
* **Operand roles.** `a` is the multiplier and `b` the multiplicand. This
  follows the published PA register and its waveform values. One of the
  paper's block diagrams labels the two registers the other way round.
* **No separate configuration port.** The configuration register is loaded
  from the operand registers when a run starts. No external configuration
  input exists.
* **Range loop bound.** The paper's flow chart loops "32 times"; the
  iteration count here comes from the range, as its text describes.
* **No operand swap.** Textbook Booth practice picks as multiplier the
  operand with fewer 0/1 transitions. Neither form does this: `a` is always
  the multiplier.
* Reset, handshake, latency and encodings are this design's choices. See
  the first comment of each file.

## Parameters

`W` (operand width, 16) and `G` (group width, 4) are parameters of every
module. Their defaults come from the `cbm_pkg` package. `W` must be a
multiple of `G`. Besides the default 16/4, the configurations 8/2, 12/4 and
32/8 have been simulated (`tb_cbm_params`). The range code is `$clog2(W/G)` bits,
and the counter is `$clog2(W)` bits.

## Verification

Every module has a self-checking testbench in `tb/`, except the two helpers
`cbm_range_detect` and `cbm_booth_stage`, which are tested through
`cbm_config_reg` and `cbm_comb`. Each testbench prints
`TB_RESULT checks=N failures=M`:

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_cbm_top`          | the full design at default size: 2013 multiplications, including 2000 random ones with random leading zero groups. It checks the product against `$signed` multiplication, the range against a bit scan, the exact cycle count, and agreement between the clocked and combinational forms. It counts every range, add, subtract and shift-only step, every extra iteration and every ignored `go`, and fails if any of them never happened |
| `tb_cbm_table1`       | the four published reference products (ranges 16, 12, 8, 4), bit for bit, with range codes, cycle counts and the published final PA value |
| `tb_cbm_params`       | both forms at W/G = 8/2, 12/4 and 32/8, 2000 random products each, with cycle counts; uses the helper `cbm_param_check.sv` |
| `tb_cbm_comb`         | combinational form, 5000+ operand pairs |
| `tb_cbm_config_reg`   | range rule, iteration count, register hold |
| `tb_cbm_controller`   | control lines per state, Booth decoding, `done`, ignored `go` |
| `tb_cbm_alu`, `tb_cbm_shifter`, `tb_cbm_accumulator`, `tb_cbm_counter`, `tb_cbm_operand_reg` | unit behaviour against independent models |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cbm_pkg.sv \
          tb/tb_cbm_top.sv --top-module tb_cbm_top -o sim
./obj_dir/sim
```

For lint, run `verilator --lint-only -Wall -y rtl rtl/cbm_pkg.sv rtl/cbm_top.sv`.
The remaining lint warnings are about unused bits and one unconnected
output: `cbm_shifter` serves both the shift and the read-out path, and each
user leaves some bits unused. Verilator also notes that `rst_n` feeds both
the asynchronous resets and the controller's assertions.

## Files

`rtl/`:

* `cbm_pkg.sv`: constants, `alu_op_e`, `range_e`, `booth_decode`
* `cbm_top.sv`
* `cbm_operand_reg.sv`
* `cbm_range_detect.sv`
* `cbm_config_reg.sv`
* `cbm_counter.sv`
* `cbm_controller.sv`
* `cbm_alu.sv`
* `cbm_shifter.sv`
* `cbm_accumulator.sv`
* `cbm_booth_stage.sv`
* `cbm_comb.sv`

`tb/`: `tb_<module>.sv` for each module except the two helpers, plus `tb_cbm_table1.sv` and `tb_cbm_params.sv` (with its helper `cbm_param_check.sv`).
