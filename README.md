# Elliptic wave filter datapath with delay-robust register sharing

A register that is shared by several values is overwritten as soon as its old
value is no longer needed. In a conventional datapath that can happen at the
very clock edge that latches the result computed from the old value. The
register's new contents then race the result through the functional unit, and
only the unit's minimum path delay protects the hold time. When clock arrival
and path delays vary, no choice of clock period can fix that race: a slower
clock gives no extra hold margin.

This design removes the race by the way registers are shared. If an operand
register is never rewritten at the edge that latches the result computed from
it, every hold constraint has a margin of a whole clock period. Every setup
constraint can then be met by lengthening the period. So for any bounded skew
or delay variation there is a clock at which the datapath works. This property
is called structural robustness against delay variation (SRV). It costs a few
extra registers. It needs no special flip-flops, no second clock phase and no
delay padding.

The RTL applies this to a standard high-level-synthesis benchmark: the
fifth-order wave digital elliptic filter (EWF). The filter runs on three
adders and one multiplier, with one sample every 16 clock cycles.

## The rule, in clock cycles

Every operation takes one cycle. It reads its operands from registers during
a control step, and its result is written at the clock edge that ends the
step. Two rules make the datapath SRV:

* **Setup:** a result is used no earlier than the step after it is written.
  Every single-cycle schedule meets this.
* **Hold, type I:** a register read in a step is not written at the edge that
  ends that step. In lifetime terms, a freed register stays unused for one
  extra step before new data goes into it.
* **Hold, type II:** the same rule, with one exception. An operation that is
  the *only* last reader of a value may write its own result over that value
  in place. A register's bits see their clock edge at nearly the same time,
  so this is safe. If two operations read the value last in the same step,
  neither may overwrite it. The other reader would then see the register
  change under it.

Type I needs 14 registers for this filter and type II needs 12. The
conventional minimum is 11.

A third setting follows the same idea when registers must stay at the
minimum. It keeps 11 registers and applies the type II sharing wherever
possible. A few additions are then left that still see an operand overwritten
at their result edge. Those are gathered onto two adders. Those two adders
must be built with minimum-delay compensation (MDC): delay added to their
short paths, a physical measure the RTL cannot express.

A further relaxation (type III) lets a register be rewritten at the result
edge when the register is known to be clocked later than the destination
register. It depends on controlled clock-arrival order in layout. It is not
implemented.

## The filter schedule

The filter takes one input sample `inp` and keeps seven state values
`dat1`..`dat7` from one sample to the next. It computes 26 additions and 8
coefficient multiplications per sample, and its output is `gamma`. The
operation numbers and value names below are those of the schedule that
`ewf_pkg::OPS` encodes. In the table, `×k` means multiplication by
coefficient `k`. A value is written at the end of the step in which it is
computed.

| step | adder 0 | adder 1 | adder 2 | multiplier |
|---|---|---|---|---|
| 0 | 1: a = inp + dat1 | | | |
| 1 | 2: b = a + dat2 | 3: d = dat6 + dat7 | | |
| 2 | 4: c = b + dat3 | | | |
| 3 | 5: e = c + d | | | |
| 4 | | | | 6: f = e ×0 |
| 5 | 7: g = f + b | | | 8: s = e ×1 |
| 6 | 9: h = g + b | 10: t = s + d | | |
| 7 | 12: u = t + d | | | 11: i = h ×2 |
| 8 | 13: j = i + a | 14: r = g + e | | 15: v = u ×3 |
| 9 | 16: k = j + a | 17: n = j + g | 18: w = v + dat7 | |
| 10 | 20: o = n + dat4 | 21: x = w + t | 22: α = w + dat7 | 19: l = k ×4 |
| 11 | 23: m = l + inp | 25: y = x + dat5 | | 24: p = o ×5 |
| 12 | 26: dat1' = m + j | 27: dat3' = p + dat4 | | 28: z = y ×6 |
| 13 | 29: dat2' = dat3' + o | 31: dat4' = z + dat5 | | 32: γ = α ×7 |
| 14 | 30: dat5' = r + t | 33: dat6' = dat4' + y | 34: dat7' = γ + w | |
| 15 | (sample load) | | | |

The primed values replace the state for the next sample. The output `γ`
(`gamma`) can be read during step 14. The next input sample is written at the
edge that ends step 15.

## Register assignments

`SRV_TYPE` picks the register assignment. The schedule and the hardware are
the same in all three settings, and only the register file's size and the
control words change. Each entry below is `value@edge at which it is written`.
A register holds each value until that value's last read.

**SRV_TYPE = 2 (default, SRV type II, 12 registers)**

| reg | values |
|---|---|
| R0 | dat4@14 |
| R1 | dat5@15 |
| R2 | inp@0, z@13 |
| R3 | alpha@11, dat7@15 |
| R4 | a@1, k@10, l@11, m@12, dat1@13 |
| R5 | c@3, f@5, t@7 |
| R6 | d@2, r@9 |
| R7 | e@4, n@10, p@12, dat3@13 |
| R8 | b@2, h@7, i@8, w@10 |
| R9 | g@6, o@11, dat2@14 |
| R10 | s@6, j@9, gamma@14 |
| R11 | u@8, v@9, x@11, y@12, dat6@15 |

Chains such as `u → v` (op 15 reads `u` last and writes `v`) are the
in-place overwrites that type II allows. Every other handover leaves at
least one step with the register unused.

**SRV_TYPE = 1 (SRV type I, 14 registers)**

| reg | values |
|---|---|
| R0 | dat4@14 |
| R1 | dat5@15 |
| R2 | inp@0, z@13 |
| R3 | m@12, dat7@15 |
| R4 | a@1, alpha@11 |
| R5 | c@3, f@5, t@7 |
| R6 | d@2, r@9 |
| R7 | e@4, l@11, dat3@13 |
| R8 | b@2, i@8, w@10 |
| R9 | g@6, x@11, dat1@13 |
| R10 | s@6, j@9, dat2@14 |
| R11 | h@7, v@9, o@11, dat6@15 |
| R12 | u@8, k@10, y@12 |
| R13 | n@10, p@12, gamma@14 |

**SRV_TYPE = 0 (11 registers, MDC on adders 0 and 1)**

| reg | values |
|---|---|
| R0 | inp@0, y@12 |
| R1 | a@1, k@10, l@11, m@12, dat1@13 |
| R2 | b@2, h@7, i@8, j@9, dat2@14 |
| R3 | d@2, u@8, v@9, w@10 |
| R4 | c@3, e@4, r@9 |
| R5 | f@5, g@6, n@10, o@11, dat6@15 |
| R6 | s@6, t@7 |
| R7 | alpha@11, gamma@14, dat7@15 |
| R8 | x@11, p@12, dat3@13 |
| R9 | z@13, dat4@14 |
| R10 | dat5@15 |

In this setting three additions still break the hold rule:

* op 23: `inp` in R0 is overwritten by `y`;
* op 25: `x` in R8 is overwritten by `p`;
* op 27: the old `dat4` in R9 is overwritten by `z`.

Ops 23 and 25 run in step 11 and op 27 runs in step 12. No step has more than
two of them and none is a multiplication, so MDC is needed on adders 0 and 1
only.

The type I and type II maps follow the extended left-edge method:

1. Merge each value with the result of its sole last reader (type II only).
2. Extend every lifetime by one step.
3. Pack the lifetimes into as few registers as possible.

The state values wrap around the 16-step loop, so the packing was done by an
exhaustive search over the cyclic lifetimes instead of a single left-to-right
sweep. Each map uses the fewest registers possible under its rule, and the
search proved that one register fewer does not fit. The 11-register MDC map
came from a bounded search. It packs the plain lifetimes and minimises, step
by step, the number of operations that still break the rule.

## Hardware blocks

| module | role |
|---|---|
| `ewf_pkg` | types, the 34-operation schedule `OPS`, the three register maps, and `build_ctl()`, which derives a step's control word |
| `ewf_controller` | modulo-16 step counter; control word per step, `in_ready`, `out_valid`; stall on `run` low |
| `ewf_regfile` | `NREG` × `W` registers, five write ports (three adders, the multiplier, the input sample) and nine read ports (two operands per unit and the output) |
| `ewf_adder` | `W`-bit wrap-around adder (three instances) |
| `ewf_coef_mult` | `W`-bit signed multiply by `COEFS[sel]`, with an arithmetic shift right by `FRAC` |
| `srv_checker` | combinational check of each control word against the hold rule of `SRV_TYPE`; outputs `violation`, `in_place` and `mdc_hold` |
| `ewf_srv_datapath` | top level; connects the above and asserts that `srv_violation` never rises |

The control words are built at elaboration from the schedule and the chosen
map. Changing a map or the schedule in `ewf_pkg` changes the hardware with no
other edits.

### Top-level interface and timing (`ewf_srv_datapath`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (registers cleared, counter at step 15) |
| `run` | in | 1 | advance one step per clock; low freezes the counter and all register writes |
| `in_data` | in | W | input sample |
| `in_ready` | out | 1 | `in_data` is written at this clock edge (step 15 with `run` high) |
| `out_data`, `out_valid` | out | W, 1 | filter output; valid in step 14 |
| `step` | out | 4 | current control step |
| `srv_violation` | out | 1 | the current control word breaks the hold rule (never, for the shipped maps) |
| `srv_in_place` | out | 4 | per unit: the result overwrites its own operand (type II chains) |
| `srv_mdc_hold` | out | 4 | per unit: this step relies on the unit's MDC (`SRV_TYPE = 0`, adders 0 and 1) |

With `run` held high, a sample is taken every 16 clocks. Its output appears
15 clocks after the edge that takes the sample. The first sample is taken at
the first clock edge after reset with `run` high.

Parameters: `W = 16`, `FRAC = 14`, `SRV_TYPE = 2`, and `COEFS`, eight
signed Q2.14 coefficients.

## What is fixed and what is chosen

These parts come from the published design:

* the operation graph and its step-by-step schedule;
* three adders and one multiplier;
* single-cycle operations;
* the 16-step iteration;
* the SRV rules;
* the register counts: 11 conventional, 14 for type I, 12 for type II;
* the claim that MDC on two adders is enough when registers stay at the
  minimum.

The following are this design's own choices and can be changed freely:

* **Coefficients and number format.** The filter is a standard benchmark,
  but its coefficients were not available. `COEFS` holds placeholder values
  in Q2.14 (0.5, 0.75, −0.375, 0.625, −0.25, 0.875, 0.125, 0.3125). The
  datapath therefore computes the EWF *structure* with these gains, not a
  specific elliptic response. For a real filter, supply your own
  coefficients and width.
* **Arithmetic.** 16-bit two's complement with wrap-around, and truncating
  multiplication.
* **Binding.** Additions are bound to adders in operation-number order within
  a step. The multiplier coefficients are numbered in schedule order.
* **Interface.** The input-load and output steps, the reset state and the
  `run` stall.
* **Register maps.** All three were recomputed with the method above; they
  are not copied from a published drawing. They match the published register
  counts. For `SRV_TYPE = 0`, the published text states that two MDC adders
  suffice, and this map meets that. Whether it marks the same three additions
  as the published example is not known.

Not implemented:

* type III sharing;
* the delay padding of MDC itself;
* the double-latch and double-slave registers. Those are the conventional
  alternatives that SRV avoids.

## How far it is verified

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end.

* `tb_ewf_srv_datapath` runs the type II, type I and 11-register datapaths
  side by side on 200 random samples with random stalls. Every output is
  compared with `ewf_ref_model`, which writes the 34 filter equations
  directly. The test also checks the 16-cycle sample rate and the 15-cycle
  latency. It counts the stalls, the type II in-place writes and the MDC
  steps, and confirms that no hold-rule violation ever occurs.
* `tb_ewf_full` runs the top level with default parameters on 20 samples.
* `tb_ewf_controller`, `tb_ewf_regfile`, `tb_ewf_adder`, `tb_ewf_coef_mult`
  and `tb_srv_checker` test the blocks alone. The checker testbench derives
  its expected results directly from the rule.

Each testbench was also run against a deliberately broken copy of its block,
and each one failed as it should. The hold-timing benefit itself is a
physical property: simulation cannot show it. What the simulations do show
is that the register maps compute the right filter and follow the rule in
every step.

## Simulating

With Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ewf_pkg.sv tb/tb_ewf_srv_datapath.sv --top-module tb_ewf_srv_datapath -o sim
./obj_dir/sim
```

Use the same command for any other testbench. The package file must be listed
first because Verilator does not find packages through `-y`. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ewf_pkg.sv
rtl/ewf_srv_datapath.sv`.

## Changing it

* **Other coefficients or width:** set `COEFS`, `FRAC` and `W` on
  `ewf_srv_datapath`, and the same values on `ewf_ref_model` in the
  testbenches.
* **Another register map:**
  1. Add a `reg_map_t` to `ewf_pkg`, indexed by `data_e`.
  2. Extend `nreg_of()` and `reg_of()`.
  3. Run `tb_ewf_srv_datapath`. A map that computes the wrong filter fails
     the output comparison. A map that breaks the hold rule trips
     `srv_violation` and the assertion.
* **Another schedule:** edit `OPS`. `MAX_REGS` (16) limits the register
  index width.
