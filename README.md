# Run-time reconfigurable constant multiplier (pipelined shift-and-add, FPGA style)

Many signal-processing circuits multiply a sample by one constant from a small
set, and the constant changes at run time. Examples are adjustable filters,
polyphase filters and FFT twiddle factors. A generic multiplier does this job,
but it is large. A multiplier for one fixed constant is much smaller. It is a
tree of adders fed with shifted copies of the input: a shift is only wiring.
This design joins several such trees into one. The parts the trees have in
common are built once. Where they differ, a multiplexer, or an adder whose
sign can be switched, picks what the selected constant needs. Every adder and
every multiplexer is followed by a register, so the circuit runs at FPGA
fabric speed and takes one sample per clock.

The RTL implements one complete instance: a multiplier whose constant is
1912, 1111 or 1331, with a signed 16-bit input. It also holds the generic
building blocks such fused graphs are made of, including a three-input
(ternary) adder node.

## The fused adder graph for 1912, 1111, 1331

Each constant on its own has a three-stage pipelined shift-and-add form:

| constant | stage 1 | stage 2 | stage 3 |
|---|---|---|---|
| 1912 | 17x = x + (x<<4) | 239x = (x<<8) − 17x | 1912x = 239x << 3 |
| 1111 | 17x | 19x = (x<<1) + 17x and 273x = x + (17x<<4) | 1111x = 19x + (273x<<2) |
| 1331 | 17x | 239x and 273x | 1331x = 239x + (273x<<2) |

All three share 17x and the 273x adder. The stage-2 "239 or 19" adder differs
in the shift on x (8 or 1) and in its sign. The final step differs as well:
a shift by 3 and no second operand for 1912, an addition for the other two.
The fused circuit (`rscm_1912_1111_1331`) resolves those differences as follows.
In the "value" column, the three entries are for configurations 0, 1 and 2.

| register level | node | value (cfg 0 / 1 / 2) | how the difference is resolved |
|---|---|---|---|
| 1 | `u_n17`: x + (x<<4) | 17x | shared |
| 1 | `u_r1x`: x delayed | x | shared |
| 2 | `u_m1`: multiplexer | 128x / x / 128x | input 0 = x<<7, input 1 = x |
| 2 | `u_r2x`, `u_r217`: delays | x, 17x | shared |
| 3 | `u_n239`: (m1<<1) ∓ 17x | 239x / 19x / 239x | sign vector (−, +, −) on the 17x operand |
| 3 | `u_n273`: x + (17x<<4) | — / 273x / 273x | shared (unused in cfg 0) |
| 4 | `u_m2`: multiplexer | 1912x / 19x / 239x | input 0 = n239<<3, input 1 = n239 |
| 4 | `u_r4273`: delay with clear | 0 / 273x / 273x | register cleared in cfg 0 |
| 5 | `u_nout`: m2 + (z273<<2) | 1912x / 1111x / 1331x | shared |

Two ideas keep the fused graph small:

* **Multiplexers only where the graphs differ.** A multiplexer input is
  needed when the same node position takes a different shift or a different
  source in different configurations. The two multiplexers here switch only a
  shift.
* **Zero costs nothing.** When a configuration needs no operand at some
  position (1912 needs no 273x term), the register in front of the adder is
  cleared instead of adding a multiplexer input for a constant 0.

**Configuration travels with the data.** The configuration index enters
together with its sample and is delayed stage by stage (`cfg_q`). Each
multiplexer and switchable adder therefore sees the configuration of the
sample it is processing. The constant can change on every clock. The very
next sample is multiplied by the new constant, and the samples still in the
pipeline are not affected. There is no reconfiguration delay beyond the one
clock edge that accepts the new `cfg`.

## Switchable adder/subtractor

When an addition is fused with a subtraction, the node must compute a+b,
a−b or −a+b depending on the configuration. `switchable_addsub` follows a
slice-level mapping that needs no more LUTs than a plain adder:

* Each operand bit is XORed with its subtract flag (`sa`, `sb`), so a
  subtracted operand is bit-inverted.
* The two resulting bits are XORed into a propagate bit `p`.
* A multiplexer carry chain passes the carry on when `p` is 1. Otherwise it
  takes the (possibly inverted) `a` bit. The sum bit is `p ^ carry`.
* The carry into bit 0 is `sa | sb`. This adds the +1 that completes the
  two's complement of the subtracted operand.

Subtracting both operands (−a−b) would need a carry-in of 2 and is not
supported. `fused_add_node` wraps the adder with the operand shifts, the
per-configuration sign vectors `SUB_A`/`SUB_B` and the output register. An
elaboration-time assertion rejects a sign vector that subtracts both operands
in one configuration.

## Multiplexer stage and balancing registers

`config_mux` registers one of `N_IN` inputs, each with its own left shift.
`SEL[k]` is the input used in configuration k. The special value `SEL_ZERO`
(8'hFF) clears the register instead of loading it. A multiplexer that only
switches a shift gets the same signal on several inputs.

`pipe_reg` is a balancing register: it delays a word so that both operands of
an adder come from the same stage. `ZERO_CFG` marks the configurations in
which it is cleared. The multiplexers are written behaviourally and left to
the synthesis tool. On Xilinx Virtex-5 to Virtex-7 slices, hand-mapping
multiplexers onto the slice multiplexer primitives saves one LUT per bit for
about half of the sizes from 2 to 32 inputs. That mapping is not included.

## Ternary adder node

FPGAs that can add three words in one carry chain allow adder graphs with
fewer nodes, and so fewer multiplexer inputs once the graphs are fused.
`fused_ternary_node` is one registered node of such a graph. Per
configuration it computes a+b+c, −a+b+c, a−b+c or −a−b+c (c is never
negated). Any operand can be forced to zero, for the case where a two-input
node of one configuration shares a node with a three-input node of another.
Each negated operand is bit-inverted, and one carry per negated operand is
added.

No fused ternary graph for a specific constant set is included, so in
`rcm_top` the node stands on its own with its own ports. Its configurations
0..3 are set to the four operations in the order above.

## Interfaces and timing

`rcm_top` (all widths at their defaults):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the valid pipeline |
| `mul_in_valid`, `mul_cfg`, `mul_x` | in | 1, 2, 16 | sample valid, configuration (0: 1912, 1: 1111, 2: 1331), signed sample |
| `mul_out_valid`, `mul_y` | out | 1, 27 | product valid, signed product |
| `tern_cfg`, `tern_a/b/c` | in | 2, 27 each | ternary node configuration and operands |
| `tern_y` | out | 27 | ternary node result |

* **Multiplier:** latency is 5 clocks from `mul_x` to `mul_y`. Throughput is
  one sample per clock, with no stalls. `mul_cfg` = 3 is not a configuration,
  and its product is unspecified.
* **Ternary node:** latency is 1 clock, and arithmetic is modulo 2^27.
* **Reset:** data registers have no reset. Only the valid bits are reset, so
  an output is meaningful only while `mul_out_valid` is 1.
* **Widths:** all internal words are 27 bits (16 + 11, since 1912 < 2^11).
  Every product of a 16-bit signed input is exact.

## What follows the reference design and what does not

Taken from the reference design:

* the three constants and their order;
* the fused graph: every shift, the sign vector (−, +, −) and both
  multiplexer mappings;
* a register after every adder and multiplexer;
* the zero operand made by clearing a register;
* the switchable adder/subtractor structure;
* the operation set of the ternary node;
* the 16-bit input width.

Choices made in this design:

* the input is signed two's complement;
* the 27-bit internal width;
* the 2-bit configuration index that travels with the sample;
* the valid signal and its reset;
* no reset on the data registers;
* the selection-table encoding of `config_mux`;
* the configuration assignment of the ternary node in the top.

Not included:

* the algorithm that builds fused graphs from a set of constants (it is a
  software tool);
* circuits for other constant sets;
* the reconfigurable multiple-constant FIR filter used in the evaluation (its
  coefficient sets are not available);
* vendor-primitive mapping of the multiplexers.

A different constant set needs a different graph. Build it from
`fused_add_node`, `fused_ternary_node`, `config_mux` and `pipe_reg`, setting
their shift, sign-vector, selection and zero parameters, as
`rscm_1912_1111_1331` does.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
arithmetic written independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_switchable_addsub` | all three sign modes on random and corner operands, sum and carry-out |
| `tb_fused_add_node` | shifts, a sign vector with add / subtract-b / subtract-a, 1-cycle latency |
| `tb_config_mux` | three shifted inputs, the zero selection, every configuration |
| `tb_pipe_reg` | delay and per-configuration clear |
| `tb_fused_ternary_node` | all four operations, operand shifts, forced-zero operands |
| `tb_rscm_1912_1111_1331` | streaming with gaps, extreme inputs, a change of constant on every cycle, exact 5-cycle latency |
| `tb_rscm_exhaustive` | all 65536 inputs in each configuration, plus a pass that alternates configurations (262144 products) |
| `tb_rcm_top` | end to end at default parameters; counts and requires each mechanism: every configuration, both adder/subtractor modes, the zero-by-clear path, back-to-back reconfiguration, input bubbles, extreme inputs, all four ternary operations |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rcm_pkg.sv tb/tb_rcm_top.sv --top-module tb_rcm_top -o sim
./obj_dir/sim
```

Replace `tb_rcm_top` with any other testbench name. Every run takes well under
a second.
