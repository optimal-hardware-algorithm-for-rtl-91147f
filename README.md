# Adaptive delta modem with selective two/three-bit step control

A delta modulator sends one bit per sample. The bit says whether the
input is above or below a local copy of the signal, called the
accumulator, and both ends move their accumulators up or down by one step
for each bit. With a fixed step, a steep input outruns the accumulator:
this is slope overload. The usual fix is to double the step while the
accumulator has not yet caught the input. But if the step has grown large
at the moment of crossing, the accumulator overshoots: a spike in the
rebuilt signal.

This modem uses a 4-bit datapath and controls the step with three rules:

* **Catch up fast.** While successive pulses agree (the input has not been
  crossed), the step doubles each clock.
* **Land softly.** At a crossing the step is halved, not reset to unity, and
  it halves again at each further crossing, never going below unity.
* **Switch between two and three history bits.** A 2-bit status counter
  counts successive 0 pulses (accumulator above the input). After two of
  them the decision looks at all three stored pulses instead of the newest
  two, and halves the step once. In a long falling run this gives three
  doublings, one halving, then doubling again.

The transmitter and the receiver contain the same step generator. Fed the
same pulse train, they build bit-identical accumulators.

## Signal path

```
             +-----------+   vs    +------------+  pulse   +-----------+
 vin (real)->|sample/hold|-------->| comparator |--------->| pulse reg |--> adm_tx
             +-----------+         +------------+    |     +-----------+    adm_valid
                                         ^ vacc      |
                                   +-----------+     v
                                   |  4-bit DAC|   step generator --step--+
                                   +-----------+   (SP, counter,          |
                                         ^          XOR gates, STR)       v
                                         |                          +-----------+
                                         +---------- AC <-----------| 4-bit add/|
                                                  (accumulator)     | subtract  |
                                                                    +-----------+
 receiver: adm_tx --> step generator --> add/subtract --> AC --> DAC --> vout (real)
```

| Module | Part |
|---|---|
| `adm_modem` | top: transmitter and receiver joined by the pulse line |
| `adm_modulator` | transmitter loop |
| `adm_demodulator` | receiver |
| `adm_step_gen` | step generator: `adm_sp_reg` + `adm_status_counter` + `adm_step_logic` + `adm_step_reg` |
| `adm_sp_reg` | SP, the 3-bit history of ADM pulses (shift right, newest in the MSB) |
| `adm_status_counter` | 2-bit counter: cleared by a 1 pulse, counts 0 pulses, wraps 3 to 0 |
| `adm_step_logic` | XOR decision gates: SL (double) or SR (halve) |
| `adm_step_reg` | STR, the one-hot step 1/2/4/8, shifted left or right |
| `adm_addsub` | 4-bit adder/subtracter (4AS), clamped to 0..15 |
| `adm_accumulator` | AC, the 4-bit accumulator register |
| `adm_dac`, `adm_comparator`, `adm_sample_hold` | behavioural models of the analog parts |
| `adm_pkg` | widths, the counter state that selects three-bit mode, and the `step_cmd_e` type |

A pulse of 1 means the sample was above the accumulator. It adds the step;
a pulse of 0 subtracts it.

## The step decision

This is the part that needs care. At each clock edge the present pulse `d`
shifts into SP, so `sp = {d, previous, one before}`. The gates read SP with
`d` already in it, and the status counter as it was *before* `d` updates
it:

| counter | decision | SR (halve) when |
|---|---|---|
| `00`, `01`, `11` | two-bit | `sp[2] != sp[1]`: the input was just crossed |
| `10` | three-bit | `sp[2] != sp[1]`, or all three bits are equal |

Otherwise the command is SL (double). STR does not go below 1 or above 8.
The counter only reaches `10` after two successive 0 pulses, so in
three-bit mode the older two bits are always `00`. In practice three-bit
mode therefore always halves. Starting from a 1 pulse with step 4, a run of
0 pulses gives:

| pulse | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| counter before | – | 0 | 1 | **2** | 3 | 0 | 1 | **2** | 3 | 0 | 1 |
| step applied | … | 2 (cross) | 4 | **2** | 4 | 8 | 8 | **4** | 8 | 8 | 8 |

A run of 1 pulses keeps the counter at 0, so the step doubles up to 8 and
stays there. The two directions are **deliberately asymmetric**. They
follow the description of the counter's hardware: cleared by a 1, counting
0s. The algorithm's verbal description instead says the periodic halving
applies whether the accumulator is continuously above *or* below the
input. If you want the symmetric form, make the counter count the run
length of equal pulses, clearing it at every crossing
(`adm_status_counter`, one line). The reference model in
`tb/adm_ref_pkg.sv` would need the same change.

The exact gate equation in three-bit mode is this design's reading. The
hardware is described only as "an exclusive-OR gate on all three bits",
selected by the counter. A plain 3-input parity would never change the
decision in the states where the counter selects it.

## Timing

* One ADM pulse per rising clock edge; nothing is pipelined beyond that.
* The sample/hold samples `vin` at the rising edge. The comparator decision
  used at edge *n* therefore compares the sample of edge *n-1* with the
  accumulator of edge *n-1*.
* At edge *n*, `adm_out` (`adm_tx`), the accumulator and STR all update. The
  step added at an edge is the step chosen at that edge. Through `q_next` of
  `adm_step_reg` it goes combinationally into the adder, so the halved step
  is the one applied at a crossing.
* `adm_valid` is low for the first clock after reset, then high. The
  receiver advances only on clocks where it is high, so it does not take the
  reset value of the pulse register for a pulse. `rx_acc` and `rx_step` then
  equal `tx_acc` and `tx_step` one clock later. This strobe is an addition
  of this design; the original hardware has only the pulse line.
* Reset is asynchronous and active low. AC = 0, STR = 1, SP = 000,
  counter = 00, held sample 0 V.

## Ranges and end stops

* The accumulator spans 0..15 (16 levels of `VREF/16`). The adder/subtracter
  clamps at both ends instead of wrapping, so a large step near full scale
  cannot fold the signal to the other end.
* The largest step is 8 levels per clock, which is also the steepest slope
  the loop can follow. SL at 8 holds 8.
* `VREF` (default 5.0 V) is a parameter of the modem, the modulator, the
  demodulator and the DAC model. Its value is this design's choice.

## Analog parts

`adm_dac`, `adm_comparator` and `adm_sample_hold` are behavioural models
that use `real` ports: an ideal binary DAC (`vout = code * VREF / 16`), an
ideal comparator (`vp > vn`, ties give 0) and an ideal edge-triggered
sample/hold. They simulate in Verilator and parse in any IEEE 1800 tool,
but they do not synthesize. The top and the two ends carry them, so only
`adm_step_gen` with the blocks inside it, `adm_addsub` and
`adm_accumulator` synthesize on their own. For silicon, replace the three
models with real macros and keep the ports. The digital core is tiny:
about 18 word-level cells and 9 flip-flops for the step generator, plus a
4-bit adder and 4 flip-flops per end.

## What is not built

* The two-bit-only and three-bit-only decisions. They appear only as
  baselines; the selective decision is the design.
* An output low-pass filter after the receiver's DAC. `vout` is the raw
  staircase.
* The channel. The top wires the transmitter straight to the receiver.

## Verification

Each block has a self-checking testbench in `tb/`, which ends by printing
`TB_RESULT checks=N failures=M`.

* `adm_ref_pkg` is an integer reference model of the whole step algorithm.
  It is written independently of the RTL structure. The step generator,
  modulator, demodulator and modem testbenches check the RTL against it
  every clock.
* `tb_adm_step_gen` also checks the directed sequence in the table above,
  and the doubling to 8 on a run of 1s.
* `tb_adm_step_logic` checks the decision gates against an 8x4 truth
  table. `tb_adm_addsub` is exhaustive.
* `tb_adm_modem` runs the top at its default parameters. It applies
  constant levels, full-range jumps, a triangle inside the range and one
  driven past both ends. It counts each mechanism and fails if one never
  occurs: doubling, halving at a crossing, three-bit halving, the unity
  floor, the top stop, accumulator clamping, counter clear, counter wrap,
  and receiver idle. On the triangle (0.4 V to 4.6 V, 0.05 V per clock),
  the mean error of `vout` is about 0.24 V, under one LSB (0.3125 V).

The input waveforms are this design's choice, because none are
specified: no triangle amplitude, frequency or clock rate. The
power-spectrum comparison of the three decision schemes is an offline
analysis and is not reproduced.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/adm_pkg.sv tb/adm_ref_pkg.sv tb/tb_adm_modem.sv \
    --top-module tb_adm_modem --Mdir obj_modem
./obj_modem/Vtb_adm_modem
```

Any other testbench builds the same way. Replace `tb_adm_modem` with its
name; `tb/adm_ref_pkg.sv` is needed only by the testbenches that import it.
Every testbench finishes in well under a second.
