# Glitch-amplification power hammer

This RTL models a power-hammering circuit for FPGAs that contains no oscillator.
Crashing or browning out an FPGA board takes a large amount of switching on the
chip's interconnect. The usual way to get it is a ring oscillator, but design-rule
checks look for the combinational loop that an oscillator needs. This design
contains no loop. It is an ordinary synchronous circuit: a toggle flip-flop whose
output is delayed by different amounts before reaching the inputs of a wide XOR.
Each delayed copy arrives at a different time and flips the XOR output again. One
toggle per clock therefore becomes up to six output transitions per clock. Each
of these glitching outputs drives a very long routing path, held in the design
by transparent latches. The switched capacitance of those paths draws the power.

At the sizes modelled here, 47 generators run at 200 MHz. Each is one LUT6 set up
as a 6-input XOR with its inputs 200 ps apart. This gives an activity factor of 3
on every generator output: 1.2 G transitions/s, the same as a 600 MHz clock.
These outputs drive 62,839 transparent latches in total. The LUT setting selects
the strength, from "off" (constant output) through "route-through" (activity 0.5)
to XOR2 … XOR6 (activity 1 … 3).

## How one toggle becomes k transitions

```
           clk
            |
   en --> [T flip-flop] --q--+---------------------------------> LUT input 0
                             +--[200 ps]--+--------------------> LUT input 1
                                          +--[200 ps]--+-------> LUT input 2
                                                       ...        ...
                                                       +-------> LUT input 5
                                                                     |
                                                 LUT6 (INIT from lut_mode)
                                                                     |
                                                                  glitch
```

After a rising clock edge `q` changes once. The change reaches LUT input *i*
*i* × 200 ps later. An XOR output flips whenever any one of its inputs flips.
An XOR of inputs 0 … k−1 therefore makes k transitions, at 0, 200, …, (k−1) × 200 ps
after the edge. Every transition is a full swing of the output net. With k = 6
the last transition comes 1.0 ns after the edge, well inside the 5 ns period. The
circuit therefore passes static timing: no path is longer than a clock period,
and nothing feeds back.

The seven configurations, with the number of output transitions per clock cycle
(activity factor = transitions / 2):

| `lut_mode`   | LUT function                 | transitions/cycle | activity |
|--------------|------------------------------|-------------------|----------|
| `LUT_STATIC` | constant 0                   | 0                 | 0        |
| `LUT_ROUTE`  | input 0 passed through       | 1                 | 0.5      |
| `LUT_XOR2`   | XOR of inputs 0–1            | 2                 | 1.0      |
| `LUT_XOR3`   | XOR of inputs 0–2            | 3                 | 1.5      |
| `LUT_XOR4`   | XOR of inputs 0–3            | 4                 | 2.0      |
| `LUT_XOR5`   | XOR of inputs 0–4            | 5                 | 2.5      |
| `LUT_XOR6`   | XOR of inputs 0–5            | 6                 | 3.0      |

The enumeration value of each mode equals its number of transitions per cycle.
`glitch_pkg::lut_init(mode)` builds the 64-bit INIT word. Bit *a* of the word is
the output for input value *a*, and the bit equals the parity of the lowest
*mode* bits of *a*.

For reference, this hammer has been reported to draw about 4 W (board supply)
with a static output, 9.4 W in route-through, and 10.9 / 11.8 / 12.2 W for
XOR2 / XOR3 / XOR4. With XOR5 and XOR6 the board crashed. In every case a
vendor power estimator predicted about 2 W. This RTL cannot reproduce power
figures; it reproduces the switching activity that causes them.

## The power-burning network

Each generator output drives one `burn_path`: a chain of `SEGMENTS` transparent
latches in series, joined by routing. A latch held transparent (`anchor_en = 1`)
passes every glitch on, so every segment of the path switches as often as the
generator output. The latches are sinks that keep the implementation tools from
removing the long routes. Depth is used instead of fanout: a single very
high-fanout net would stand out in tool reports, while a long chain does not.

`SEGMENTS = 1337` comes from the resource use of the reference attack. On a
141,120-flip-flop device (a Zynq UltraScale+ ZU3EG), 44.57 % of the flip-flops
were used, almost all of them as these latches. That is 62,897 elements; less the
47 toggle flip-flops and divided over 47 paths, it gives 1337 latches per path.
This one-path-per-generator layout, with a latch after every segment, is a
modelling choice. The attack only states that long, deep, latch-anchored paths
were used.

Closing the anchors (`anchor_en = 0`) freezes every path at its current value,
while the generators keep glitching.

## Modules

| module                  | kind          | role |
|-------------------------|---------------|------|
| `glitch_pkg`            | package       | `lut_mode_e`, `lut_init()`, default sizes (47 generators, LUT6, 200 ps, 200 MHz, 1337 segments) |
| `power_hammer_top`      | RTL           | 47 generators + power-burning network, shared mode decode |
| `glitch_generator`      | RTL           | toggle flip-flop → delay chain → LUT |
| `t_flipflop`            | RTL           | toggle flip-flop with enable and synchronous active-low reset |
| `tap_delay_chain`       | behavioural   | 6 taps, `TAP_DELAY_PS` apart, built from `routing_wire` hops |
| `routing_wire`          | behavioural   | one routing hop: `y(t) = a(t − DELAY_PS)` |
| `lut6`                  | RTL           | K-input LUT, `y = init[a]`, INIT as an input port |
| `power_burning_network` | RTL           | one `burn_path` per generator |
| `burn_path`             | RTL           | `SEGMENTS` `anchor_latch` stages in series |
| `anchor_latch`          | RTL           | transparent latch, `always_latch` |

### Top-level ports (`power_hammer_top`)

| port         | dir | width  | meaning |
|--------------|-----|--------|---------|
| `clk`        | in  | 1      | attack clock (200 MHz in the reference setup) |
| `rst_n`      | in  | 1      | synchronous active-low reset of the toggle flip-flops |
| `hammer_en`  | in  | 1      | toggle enable; the point where any trigger logic would attach |
| `lut_mode`   | in  | 3      | `glitch_pkg::lut_mode_e`, applies to all generators |
| `anchor_en`  | in  | 1      | gate of all anchoring latches, 1 = transparent |
| `glitch_out` | out | N_GEN  | LUT output of each generator |
| `path_end`   | out | N_GEN  | last latch of each burn path |

Parameters: `N_GEN` (47), `LUT_K` (6, at most 6), `TAP_DELAY_PS` (200),
`SEGMENTS` (1337).

## What is behavioural and what is synthesizable

The generator's behaviour depends on *physical* delays. On the device these are
routing hops, chosen with a placement/routing tool so that the LUT inputs
are about 200 ps apart. No synthesizable RTL can express that, so
`tap_delay_chain` and `routing_wire` are behavioural models built on
intra-assignment delays. Synthesis ignores the delays and reduces the chain to
wires, and a synthesis tool may fold the XOR of identical copies into a constant or a plain wire. A
real attack needs the routing tuned on the device, not this RTL alone.
`routing_wire` is accurate for inputs that change at most once per `DELAY_PS`.
That always holds here, because it only carries the toggle signal.

Everything else (toggle flip-flop, LUT, latches, mode decoder) is synthesizable.
Synthesis of the full top yields 47 flip-flops and 62,839 latches.

The burn paths model no routing latency; the segments are plain wires between
latches. Modelling that latency would only shift the pulse train in time, and at
62,839 segments it made the tools much slower.

## Differences from the reference attack

- **Mode as a run-time input.** On the device the LUT configuration is part of the
  bitstream and is changed by rebuilding it. Here `lut_mode` is a port decoded to
  INIT, so one build can sweep all seven strengths.
- **Identical generators.** The reference attack varied a few generators at the
  chip corners, in ways not given. All 47 are identical here.
- **Reset and enable.** The reset of the toggle flip-flop and the `hammer_en`
  enable are additions. A hidden (Trojan) attack would drive `hammer_en` from
  trigger logic, which is not part of this design.
- **Path structure.** The number of latches per path and the latch after every
  segment are inferred from resource counts, as explained above. The attack also
  used about a quarter of the device's routing; the amount of routing per
  segment is not modelled.
- **LUT count.** The reference attack used 0.8 % of the device's LUTs, about 564
  LUTs on that device, or about 12 per generator. Where the LUTs beyond the XOR
  went is not described. Here each generator has exactly one LUT, and the
  delay chain is routing only.
- **Not included:** the bitstream scanner that detects such circuits. It is
  software that converts a bitstream to a netlist graph and propagates LUT
  toggle probabilities, not hardware. The same toggle-probability idea appears
  in `tb_lut6` as a check: every route-through or XOR configuration must flip
  its output on all n·2ⁿ single-input changes of its n used inputs.

## Simulation

All code is SystemVerilog-2017 with `timeunit 1ns; timeprecision 1ps;` in every
unit. The delays need Verilator's timing support. To build and run a testbench:

```
verilator --binary --timing --assert -y rtl -y tb rtl/glitch_pkg.sv \
          tb/tb_power_hammer_top.sv --top-module tb_power_hammer_top
./obj_dir/Vtb_power_hammer_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                   | what it checks |
|-----------------------------|----------------|
| `tb_t_flipflop`             | random enable vs. reference; one transition per cycle; reset |
| `tb_lut6`                   | `y = init[a]` on random data; every mode's truth table; toggle probability 1 for XOR/route modes |
| `tb_routing_wire`           | far end repeats a random sequence 200 ps later, not earlier |
| `tb_tap_delay_chain`        | tap *i* changes between *i*·200 − 10 ps and *i*·200 + 10 ps |
| `tb_anchor_latch`           | transparent while open, holds while closed |
| `tb_burn_path`              | full-length path passes every transition; freezes when closed |
| `tb_power_burning_network`  | each path end follows its own generator; all hold when closed |
| `tb_glitch_generator`       | k transitions per 5 ns cycle in each mode, last one at (k−1)·200 ps; none with the toggle off |
| `tb_power_hammer_top`       | reduced array (4 × 32): all seven modes, anchors closed, toggle disabled, reset while hammering; each mechanism must occur |
| `tb_power_hammer_full`      | default size (47 × 1337): 47 transitions/cycle in route-through, 282 in XOR6, on the generator outputs and on all path ends |

The full-size build takes about a minute and 1 GB of memory in Verilator. The
simulation itself runs in well under a second.

## Lint notes

- `SYNCASYNCNET` on `toggle_q`: the delay-chain model waits on every change of
  the flip-flop output, which lint reads as asynchronous use.
- `NOLATCH` on `anchor_latch` inside long chains: reported after the chain is
  flattened. Synthesis maps every stage to a latch.
