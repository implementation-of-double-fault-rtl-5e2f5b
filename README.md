# Double fault tolerant full adder with fault localisation and pipelining

A one-bit full adder that finds and corrects its own output faults while it keeps running. This includes a *double fault*, where the sum and the carry are both wrong at the same time.

Two properties make this possible:

* A checker works out a second copy of the sum and a second copy of the carry from the inputs. It compares each copy with the adder's own output, so it reports separately **which** output is wrong. It does not raise one shared error signal.
* One output bit can only be wrong by being the complement of the right value. So the repair is to invert that output. No spare adder is needed: the repair costs one inverter and one 2:1 multiplexer per output.

Pipelined (main) configuration: one register stage sits between the checker and the repair stage. Each output is registered together with its own flag.

Each repaired carry is correct, so it can feed the next bit of a wider adder. A fault then does not spread along the carry chain.

## Block structure

```
            +--------------------- self_checking_fa ---------------------+
 a,b,cin -->| full_adder_cell --sum,cout------------------------------+  |
 fault   -->|   (fault sites)                                         |  |
            | functional_unit (eqt) --+                               |  |
            | G1=b|cin  G2=b&cin --MUX-1(sel a)--> c1 --XNOR G4 <---cout--> fc
            | G3=a&b&cin, ~c1 ------MUX-2(sel eqt)--> s1 --XNOR G5 <--sum--> fs
            +------------------------------------------------------------+
                     {cout,fc} -> pipe_reg m1      {sum,fs} -> pipe_reg m2
                                        \              /
                                         fault_repair: out = flag ? out : ~out
                                                 |
                                     sum_final, cout_final, fs_q, fc_q
```

| File | Role |
|---|---|
| `rtl/dft_fa_pkg.sv` | Fault-model types: `fault_e` (none, stuck-at-0, stuck-at-1, flip) and `fault_ctl_t` (one fault for the sum, one for the carry) |
| `rtl/full_adder_cell.sv` | The protected adder cell, with a fault site on each output |
| `rtl/functional_unit.sv` | Equal-input detector `eqt = a'b'c' + abc` |
| `rtl/mux2.sv` | 2:1 multiplexer used by the checker and by the repair stage |
| `rtl/self_checking_fa.sv` | Adder cell plus checker; produces the flags `fs` and `fc` |
| `rtl/pipe_reg.sv` | Pipeline register with asynchronous reset (instances m1 and m2) |
| `rtl/fault_repair.sv` | Inverter plus multiplexer per output |
| `rtl/dft_fa_pipelined.sv` | Top level |

## How the checker localises a fault

The reference carry uses the majority function split on `a`. When `a = 1` the carry is `b | cin` (G1); when `a = 0` it is `b & cin` (G2). MUX-1 picks between the two and gives `c1`.

The reference sum uses the following property of a full adder:

* For inputs 000 and 111, the sum equals the carry, and both equal `a&b&cin` (G3).
* For the other six inputs, the sum is the complement of the carry.

MUX-2 is steered by `eqt`, which is 1 only when all three inputs are equal. It passes G3 or `~c1`, and that gives `s1`.

Two XNOR gates compare the references with the cell outputs:

| a b cin | sum | carry | G1 | G2 | G3 | eqt | fc | fs |
|---|---|---|---|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1 |
| 001 | 1 | 0 | 1 | 0 | 0 | 0 | 1 | 1 |
| 010 | 1 | 0 | 1 | 0 | 0 | 0 | 1 | 1 |
| 011 | 0 | 1 | 1 | 1 | 0 | 0 | 1 | 1 |
| 100 | 1 | 0 | 0 | 0 | 0 | 0 | 1 | 1 |
| 101 | 0 | 1 | 1 | 0 | 0 | 0 | 1 | 1 |
| 110 | 0 | 1 | 1 | 0 | 0 | 0 | 1 | 1 |
| 111 | 1 | 1 | 1 | 1 | 1 | 1 | 1 | 1 |

(Fault-free rows. A flag is 1 when its output is right and 0 when it is wrong.)

An earlier scheme combined sum and carry into a single error bit. That bit cancels when both outputs flip together, so a double fault goes unseen. Here each flag watches one output only, so a double fault clears both flags.

The checker is assumed to be fault free. Faults are modelled only on the two outputs of the adder cell.

## Flag polarity

Throughout the RTL, `fs`/`fc` = 1 means **fault free** and 0 means **faulty**, as the XNOR comparators produce them. The repair multiplexer passes the output when its flag is 1 and the inverted output when its flag is 0.

Some descriptions of this scheme word the flags the other way round ("flag high = fault"). Taken literally, that would make the repair stage invert correct outputs. The polarity used here is the one for which the comparators and the repair stage agree.

## Pipelining and timing

`dft_fa_pipelined` has one parameter, `PIPELINED` (default 1):

* **`PIPELINED = 1`** (main configuration):
  * Register `m1` holds `{cout, fc}` and register `m2` holds `{sum, fs}`.
  * Inputs applied before a rising edge of `clk` produce corrected outputs right after that edge: one cycle of latency, one addition per cycle.
  * The critical path is split: the adder and checker are in the first stage, the inverter and multiplexer in the second.
* **`PIPELINED = 0`**: the registers are left out, and the block is the purely combinational self-repairing adder. `clk` and `rst` are then unused.

`rst` is asynchronous and active high. During reset, `sum_final = cout_final = 0` and both flags read 1, so nothing is repaired.

Which signals are registered, the reset style and the reset values are all choices made in this implementation. They are not inherited from a reference design.

## Interface of the top level

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (pipelined configuration) |
| `rst` | in | 1 | asynchronous reset, active high |
| `a`, `b`, `cin` | in | 1 each | operands and carry in |
| `fault` | in | `fault_ctl_t` (4) | fault applied to the adder cell's sum and carry; tie to `dft_fa_pkg::NO_FAULT` in normal use |
| `sum_final` | out | 1 | corrected sum |
| `cout_final` | out | 1 | corrected carry; drive the next bit's `cin` from here |
| `fs_q`, `fc_q` | out | 1 each | flags of the result on the outputs; 0 shows where a fault was found and repaired |

## Fault injection

The `fault` input exists so that the fault tolerance can be tested. Each output of the cell can be:

* left alone,
* held at 0 or held at 1 (models a permanent fault), or
* inverted (models a transient upset).

Every one of these faults either leaves the output correct or inverts it, so the repair covers all 16 combinations. A real fault inside the checker, or one that hits the checker and the cell at the same time, is outside this model.

## Where the RTL departs from or extends the reference description

* **Gates.** The reference design is specified at transistor level: CMOS gates, transmission-gate multiplexers, and an XNOR in pass-transistor logic. The RTL models the same logic functions with ordinary operators and `mux2` instances.
* **Fault sites and flag ports.** The fault-injection sites and the output ports `fs_q`/`fc_q` are additions.
* **Width.** The cell is one bit wide. The repaired carry is meant to feed the next cell, but no word width is given. So a multi-bit adder is not part of the RTL; the chain testbench builds one from four cells.
* **No multi-bit pipeline.** A pipelined multi-bit adder would need its inputs skewed from bit to bit. That is not described and is not built.
* **Area and delay not reproduced.** The reference figures for area (transistor count) and delay come from a custom 55 nm implementation. This RTL cannot reproduce them.

## Verification

Each testbench in `tb/` checks itself against values it computes on its own. It prints `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_full_adder_cell` | 8 input vectors × 16 fault combinations |
| `tb_functional_unit` | `eqt` against the table above |
| `tb_self_checking_fa` | Outputs and flags for all 128 cases; counts 64 single and 32 double faults localised |
| `tb_fault_repair` | All 16 combinations of output and flag |
| `tb_pipe_reg` | One-cycle delay, asynchronous reset and reset hold |
| `tb_dft_fa_pipelined` | Top level at default parameters: all 128 cases back to back, then 2,100 random operations, plus latency and reset checks. It counts fault-free, sum-repaired, carry-repaired and double-repaired results and fails if any kind never occurs |
| `tb_dft_fa_comb` | Unpipelined configuration, exhaustive plus random |
| `tb_dft_fa_chain` | Four unpipelined cells rippling the repaired carry. Every cell has random faults, and the 5-bit sum must still be exact |

The pipelined top level also has a concurrent assertion: with no fault injected, neither flag may drop one cycle later. Keep `--assert` on so that it is checked.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/dft_fa_pkg.sv tb/tb_dft_fa_pipelined.sv --top-module tb_dft_fa_pipelined
./obj_dir/Vtb_dft_fa_pipelined
```

For lint only: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/dft_fa_pkg.sv rtl/dft_fa_pipelined.sv`.

The only lint warning is that the package constant `NO_FAULT` is unused when a module is linted on its own. The testbenches use it.
