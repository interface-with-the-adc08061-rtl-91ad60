# Booth-multiplier wattmeter for a small CPLD

A wattmeter has to multiply voltage by current, continuously. This design does it
with two 8-bit ADCs that convert at the same moment, one fed by a voltage signal and
one by a current signal, and a sequential radix-2 Booth multiplier small enough for a
64-macrocell CPLD. Each product's upper byte goes to an 8-bit DAC, so the DAC output
follows the instantaneous power, refreshed once per conversion.

There are two versions, which share the same register layout and pin-out:

| version | module | controller | clocks per product | notes |
|---|---|---|---|---|
| main | `watt` | 3 states: START, ADD_SUB_NOP, SHIFT | 17 | RD high 1 clock, low 16: 50 ns / 800 ns at 20 MHz, 850 ns per product |
| fast | `wattfast` | 2 states: START, MULT_STATE | 9 | add/sub and shift merged into one clock, for a faster ADC |

`wattmeter_top` places both side by side. Each has its own ADC, RD and DAC pins, and
they share only clock and reset. They are two alternative boards, not one system.

## The multiplier register

The whole multiplier is built around one 17-bit register, `AREG`, plus an 8-bit
multiplicand register `DREG` and a 3-bit step counter `CREG`:

```
 bit  16 ............ 9   8 ............ 1   0
     +-----------------+------------------+-----+
AREG |   accumulator A |  multiplier Q    | Q-1 |
     +-----------------+------------------+-----+
      <--------- product after 8 steps -->
```

On a **load**, `A = 0`, `Q = ADC_IN_2`, `Q-1 = 0`, `DREG = ADC_IN_1`. Each of the 8
steps first looks at the two lowest bits `{Q0, Q-1}` = `AREG[1:0]`:

| AREG[1:0] | meaning | action on A |
|---|---|---|
| 10 | a run of ones in Q starts | A = A - DREG |
| 01 | a run of ones in Q ends | A = A + DREG |
| 00, 11 | inside a run | unchanged |

It then shifts the whole 17-bit register one place right, copying bit 16 into itself
(an arithmetic shift). Q is consumed from the bottom while the partial product grows
in from the top. After 8 steps `AREG[16:1]` holds the 16-bit two's-complement
product, and `Q-1` holds the last multiplier bit. Both samples are therefore taken as
two's-complement numbers (-128 to +127).

In the **main** version the add/subtract and the shift are separate clocks
(`do_asn`, then `do_shift`). In the **fast** version a combinational `SUM` (AREG with
A replaced by A ± DREG) is computed, and `AREG <= {SUM[16], SUM[16:1]}` does both in
one clock.

The step counter works differently in the two versions:

* **main**: `CREG` is cleared on load and decremented on every add/sub/nop step.
  `DONE = (CREG == 0)` is combinational. It is high after the load, low for the next
  7 steps and high again after the 8th, when the counter wraps round to zero. The
  controller looks at DONE in SHIFT: DONE=0 goes back to ADD_SUB_NOP and DONE=1 goes
  to START.
* **fast**: `CREG` is loaded with 7 and decremented on every step. The controller
  leaves MULT_STATE after the clock in which it sees DONE. That clock still does a
  step, so there are 8 steps (CREG = 7, 6, …, 0).

Either counter returns to its start value only when WIDTH is a power of two. An
immediate assertion in each datapath enforces this.

### What reaches the DAC

`DAC_OUT <= AREG[15:8]` at the next load, which is product bits 14..7. In effect this
is the product divided by 128 and read as a signed byte. The product's sign bit
(bit 15) is not sent. The only product that needs it is (-128)·(-128) = +16384,
which comes out as 0x80.

### The 0x80 multiplicand

The accumulator is only as wide as a sample, as in the original circuit. For
`DREG = 0x80` (-128), the first subtraction gives +128, which does not fit in 8 bits,
and the product comes out wrong. This affects 255 of the 65536 input pairs: every
pair with ADC_IN_1 = 0x80 except those with ADC_IN_2 = 0. All other pairs are exact;
the datapath testbenches check this exhaustively. With a 9-bit accumulator
(`AREG` of 18 bits) the case would be exact. This design keeps the original width.
If the analog front end can reach full negative scale on the ADC_IN_1 channel, widen
the accumulator or clamp that code.

## Frame timing and the ADC interface

One multiplication is one **frame**. The frame starts in the START state, the only
state in which RD is high:

```
main  clk #   0     1    2    3    4  ...  15   16  | 0
      state   START ASN  SHIFT ASN SHIFT ... ASN SHIFT| START
      RD      1     0    0    0    0   ...  0    0   | 1
              ^ samples captured, DAC_OUT updated at the end of this clock

fast  clk #   0     1 .. 8          | 0
      state   START MULT x 8        | START
```

The ADCs are used without chip select, RDY or INT. CS is tied low, so their data
outputs are always driven. The RD pulse alone ends one conversion and starts the
next. Both ADCs share the one RD pin, so they convert at the same moment. The
samples on `ADC_IN_1`/`ADC_IN_2` are captured at the clock edge that ends START. At
that same edge `DAC_OUT` takes the result of the previous frame. The DAC therefore
lags the samples by exactly one frame and is steady for the whole frame. The inputs
may change freely at other times.

At the intended 20 MHz clock, RD is high for 50 ns (the ADC's minimum) and low for
800 ns. Two parameters stretch the frame for other ADC or clock speeds:

* `WAIT_STATES` (main version, default 0) adds RD-low clocks between START and the
  first add/sub step. One gives an 18-clock, 900 ns frame at 20 MHz; two keep RD low
  for a full 900 ns. The position of these clocks is this design's choice.
* `RD_STATES` (fast version, default 1) keeps START, and RD, for that many clocks.
  With 2 at 35 MHz, RD is high for 57 ns and a product takes 10 clocks, 286 ns. Only
  the first START clock loads. A second load would overwrite the DAC byte with the
  fresh samples.

The fast version's timing rests on the CPLD's worst-case register-to-register time
of about 26 ns. That makes 35 MHz a comfortable clock and 9–10 clocks a product.
Timing in another device has to be re-checked with its own tools.

## Module hierarchy

```
wattmeter_top
├── watt                    main version
│   ├── watts_ctrl          3-state Moore controller (+ optional wait states)
│   └── booth_datapath      DREG, AREG, CREG, DAC register, separate add/sub and shift
└── wattfast                fast version
    ├── watts2_ctrl         2-state Moore controller (+ optional extra RD clocks)
    └── booth_fast_datapath same registers, combined add/sub+shift
wattmeter_pkg               state enums, Booth recoding enum, SAMPLE_W = 8
```

All flip-flops are on the rising clock edge. `reset` is asynchronous and active high.
It puts both controllers in START and clears all data registers. Clearing the data
registers is this design's addition, so that the first DAC byte after reset is 0.
After synthesis, the main version has 39 flip-flops and the fast version 37.
Assertions check that a datapath never gets two commands in the same clock.

Parameters (all default to the original design):

| parameter | default | where | meaning |
|---|---|---|---|
| `WIDTH` | 8 | all | sample width; must be a power of two |
| `WAIT_STATES` | 0 | `watt`, `watts_ctrl`, top | extra RD-low clocks per frame |
| `RD_STATES` | 1 | `wattfast`, `watts2_ctrl`, top | RD-high clocks per frame |

## Where this departs from, or fills in, the original description

* Moore outputs, state encodings, reset style and reset of the data registers are
  not specified by the original design; the choices are listed above.
* The original datapath loads whenever RD is high. Here it loads on the controller's
  LOAD output. In the main version LOAD and RD are the same state, so nothing
  changes. In the fast version, LOAD marks only the first of several RD clocks.
* The position of the optional wait state, and how a second RD clock avoids a
  second load, are this design's own.
* The ADCs, the DAC and the analog front end are outside this RTL and appear only as
  pins.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops. For the
end-to-end test, with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/wattmeter_pkg.sv tb/tb_wattmeter_ref_pkg.sv tb/tb_wattmeter_top.sv \
    --top-module tb_wattmeter_top
./obj_dir/Vtb_wattmeter_top
```

Replace the last file and top module with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_booth_datapath` | all 65536 sample pairs through the main datapath; DAC byte and DONE timing |
| `tb_booth_fast_datapath` | all 65536 pairs through the fast datapath; exactly 8 multiply clocks |
| `tb_watts_ctrl` | state/output sequence, frame of 17 clocks, and of 19 with `WAIT_STATES = 2` |
| `tb_watts2_ctrl` | sequence, frames of 9 and of 10 with `RD_STATES = 2`; LOAD only in the first RD clock |
| `tb_watt`, `tb_wattfast` | pin-level runs with random samples (0x00, 0x7F, 0x80, 0xFF mixed in), default and stretched timing |
| `tb_wattmeter_top` | the top at default parameters on a 20 MHz clock. Beside it run a main version with one wait state (20 MHz) and a fast version with two RD clocks (35 MHz). It measures each frame in nanoseconds: 850, 450, 900 and 286 ns, with RD high 50, 50, 50 and 57.2 ns. It counts add, subtract, no-op, shift, DONE returns, 0x80 multiplicands, wait states and second RD clocks, and fails if any never occurs |

`tb_frame_checker` is the pin-level checker used by the last three. It checks that
every DAC byte is bits 14..7 of the product of the samples taken two loads earlier,
that the DAC holds steady between loads, and that the frame length and RD pulse
width are right. `tb_wattmeter_ref_pkg` holds the reference values. Except for a
0x80 multiplicand, these are the plain signed product. For 0x80 a separate
behavioural Booth loop with the same 8-bit accumulator gives the reference.
