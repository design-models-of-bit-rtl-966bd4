# Bit-stream online computers for power and root functions

A sensor with a frequency output delivers its measurement as a stream of
pulses: the number of pulses in a time window is the value. These circuits
apply a nonlinear function to such a stream while it arrives, pulse by pulse,
and produce the result as another pulse stream. After x input pulses, exactly

    y = [x^(M/N) + 0.5]        ([.] = integer part, i.e. x^(M/N) rounded to nearest)

output pulses have been emitted. The design contains three computers built from
one generic architecture:

| instance | function              | mode                                  |
|----------|-----------------------|---------------------------------------|
| `pow32`  | y = [x^(3/2) + 0.5]   | series generation: one input pulse gives one or several output pulses |
| `pow23`  | y = [x^(2/3) + 0.5]   | sampling ("number divider"): only input pulses 1, 2, 4, 7, 10, ... give an output pulse |
| `sqrt`   | y = [sqrt(x) + 0.5]   | sampling: input pulses 1, 3, 7, 13, 21, ... give an output pulse |

There is no multiplier, no table and no root algorithm. The only arithmetic is
additions on a few registers.

## The idea: comparing two step functions by their increments

Write the rounded function as an inequality between integers. The output may
reach y as soon as x^(M/N) >= y - 1/2. Raise both sides to the power N and
multiply by 2^N:

    (2y - 1)^N  <=  2^N * x^M

Both sides are integer polynomials: the left side `R(y)` in the output count
and the right side `L(x)` in the input count. The circuit keeps one signed
accumulator,

    SM_RES = L(x) - R(y + 1)       (starts at L(0) - R(1) = -1)

Each input pulse adds `L(x+1) - L(x)`, and each output pulse subtracts
`R(y+2) - R(y+1)`. Whenever SM_RES is non-negative the next output pulse is
due. Because both sides are polynomials, their increments come from a
difference table (Newton's forward differences). A polynomial of degree d
needs d-1 registers, each adding its right neighbour on every step, plus a
constant: the d-th difference. For x^(3/2):

    L(x) = 4x^3 :  values 0, 4, 32, 108, 256 ...   increments 4, 28, 76, 148 ...
                   second differences 24, 48, 72 ...  third difference 24 (constant)
    R(y) = (2y-1)^2 : values 1, 9, 25, 49 ...      increments 8, 16, 24 ...
                   second difference 8 (constant)

So Block1 is the chain `SM1 <- SM1 + COUNT`, `COUNT <- COUNT + 24`, starting at
SM1 = 4 and COUNT = 24. Block2 is `SM2 <- SM2 + 8`, starting at 8. The start
values for any M and N are the forward differences of `2^N x^M` at x = 0 and of
`(2y-1)^N` at y = 1. The package `oc_pkg` computes them at elaboration time, so
one set of modules covers every exponent M/N. In the general form, Block1 has
M-1 registers plus the constant RG1, and Block2 has N-1 registers plus the
constant RG2:

| computer | Block1 registers (start) | RG1 | Block2 registers (start) | RG2 |
|----------|--------------------------|-----|--------------------------|-----|
| x^(3/2)  | 4, 24                    | 24  | 8                        | 8   |
| x^(2/3)  | 8                        | 16  | 26, 72                   | 48  |
| sqrt(x)  | (none)                   | 4   | 8                        | 8   |

The rounding is exact by construction: `L` is even and `R` is odd, so the two
sides are never equal. The test benches compare against a direct search for
the largest y with (2y-1)^N <= 2^N x^M.

## Control: three states

`control_unit` is a Moore machine:

* **a0**: idle, `ready` = 1. An input request (`impulse`) moves it to a1.
* **a1**: one clock. Block1 steps and SM_RES adds the argument increment. If
  the new SM_RES is >= 0 the machine goes to a2, otherwise back to a0.
* **a2**: one clock per output bit. `y` = 1, Block2 steps and SM_RES subtracts
  the result increment. The machine stays in a2 while the new SM_RES is still
  >= 0, otherwise it returns to a0.

The transition after a1 or a2 tests the value being written into SM_RES in
that clock (`result_adder.nonneg_next`). This comparison-after-operation order
is what makes the output counts exact.

**Timing.** An input pulse whose argument step raises the function by k keeps
the unit busy for k + 1 clocks (a1 plus k clocks of a2), and one more clock in
a0 before the next pulse is taken. The output bits are k consecutive clocks
with `y` = 1. So the input pulse rate must stay below one per k + 2 clocks,
where k is the largest step in the range used. For x^(3/2), k grows as about
1.5·sqrt(x); for the sampling modes k is at most 1.

Worked example for x^(3/2) (SM_RES after each input pulse, output bits in brackets):

    x=1: -1+4=3 [1] 3-8=-5
    x=2: -5+28=23 [1] 23-16=7 [1] 7-24=-17
    x=3: -17+76=59 [1] 59-32=27 [1] 27-40=-13
    x=4: -13+148=135 [1] 87 [1] 31 [1] -33            y(4) = 8

## Input and output of a converter

`bitstream_converter` is one complete computer:

* **`impulse_detector`**: a two-flip-flop synchronizer and a rising-edge
  detector for the asynchronous sensor stream `x`. The detected edge sets a
  request flag that stays up until the arithmetic unit is `ready`. A pulse that
  arrives during an output series is therefore not lost. It waits and is
  processed next. The flag holds one pulse only, so two pulses inside one busy
  period merge into one.
* **`online_computer`**: the control unit, Block1 and Block2 (two
  `increment_block`s) and SM_RES (`result_adder`).
* **`y_out = y & clk`**: this makes consecutive output bits of a series leave
  as separate pulses, one in the high phase of each clock. Because `y` changes
  just after the rising edge, the gate can leave a runt pulse at the edge where
  a series ends. Sample `y_out` in the high phase, or use the registered `y`
  (one clock per bit) on chip.
* **Two `pulse_counter`s**: they give the results in binary. `y_count` is the
  function value and `x_count` the number of input pulses taken. Both can be
  preset with `cnt_load`.

Latency from the rising edge of `x` to the first output bit is 5 clocks:
2 synchronizer clocks, the request clock, the a0 clock and the a1 clock.

`online_computers_top` puts the x^(3/2), x^(2/3) and square-root converters
side by side. Each has its own `x_*` input and its own `y_*`, `y_out_*`,
`ready_*`, `impulse_*`, `state_*`, `sm_res_*`, `y_count_*` and `x_count_*`
outputs; clock, reset and the counter preset are shared.

## Parameters and limits

| parameter      | default | where                            |
|----------------|---------|----------------------------------|
| `M`, `N`       | 3, 2    | exponent M/N, any positive integers (the top fixes 3/2, 2/3, 1/2) |
| `WIDTH`        | 32      | signed width of SM_RES and of all difference registers |
| `CNT_WIDTH`    | 16      | width of the result counters     |
| `SYNC_STAGES`  | 2       | synchronizer depth, at least 2   |

There is no overflow detection. The largest register is the first stage of
Block1, about 2^N·M·x^(M-1). At WIDTH = 32 this limits x^(3/2) to about
x = 13,000 input pulses per window, and x^(2/3) to about 1.3·10^8. The square
root is limited by SM_RES itself, to about 2^29. The 16-bit counters wrap at
65,535 (x^(3/2) reaches that at x = 1,625). Restart each measurement window
with `rst`, or preset the counters. All registers use a synchronous,
active-high reset.

## Where this follows the method and where it is a design choice

These parts follow the method as published:

* the inequality form of each function;
* the structure of Block1, Block2 and SM_RES with its gated inputs;
* the three-state control graph and its microoperations;
* the start values of the x^(3/2), x^(2/3) and square-root computers;
* the AND of the output with the clock;
* the counter element.

The RTL reproduces every register value of the published worked examples.
These are the examples for the first 7 input pulses of x^(3/2), the first 11
of x^(2/3) and the first 13 of the square root.

These are choices of this implementation:

* computing the start values from M and N (the published examples are
  special cases of it);
* the 32/16-bit widths and the synchronous reset;
* the insides of the impulse detector (synchronizer, edge detection, held
  request);
* the clock-level timing;
* using the counter for both x and y, and its preset input;
* placing the three computers in one top.

In the generic architecture, a delay element gates Block2 with the previous
output bit. Here that is folded into the control unit: the a2 state itself
enables the subtraction. The published implementation targeted a small
Spartan-3E FPGA at 125 MHz; no timing or area figures are claimed here.

## Files

`rtl/`: `oc_pkg.sv` (state type, difference-table functions),
`increment_block.sv`, `result_adder.sv`, `control_unit.sv`,
`online_computer.sv`, `impulse_detector.sv`, `pulse_counter.sv`,
`bitstream_converter.sv`, `online_computers_top.sv`.

`tb/`: one self-checking bench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb_online_computers_top` runs the whole
design at its default parameters: 1000 random input pulses per computer, with
pulses arriving during output series. It counts that every mechanism occurred:
output series, single outputs, inputs with no output, held requests, counter
preset, and reset during a series.

`tb_published_examples` replays the three published worked examples through
the top, input pulse by input pulse. It checks every difference register after
each pulse: SM1, Count and SM2 of x^(3/2), the three registers of x^(2/3), and
SM1 of the square root.

Simulate, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/oc_pkg.sv \
        tb/tb_online_computers_top.sv --top-module tb_online_computers_top
    ./obj_dir/Vtb_online_computers_top

Lint a module:

    verilator --lint-only -Wall -Irtl rtl/oc_pkg.sv rtl/online_computers_top.sv

`verilator -Wall` reports that clock, reset and `step` go unused in the
square-root Block1, which is only the constant 4.
