# Sequential approximation register (SAR) for FPGA

A sequential approximation register finds a number by halving steps. It starts
at mid-scale and then, once per clock, moves up or down by a weight that halves
each time: for 8 bits, 128, then ±64, ±32, ±16, ±8, ±4, ±2, ±1. Whoever drives
it decides the direction of each step, typically from a comparator that says
whether the target lies above or below the present value. After as many steps
as the register has bits, the output is within one LSB of the target. This is
the core of a successive approximation ADC, or of any search over a monotone
quantity.

The step weights 1, 2, 4, 8, ... are the leading terms of the tetranacci
sequence (each term the sum of the four before it: 0, 1, 1, 2, 4, 8, 16, 30,
58, ...), which is why the method can be viewed as a member of the Fibonacci
family. The hardware does not depend on that view; it only uses powers of two.

The design is a drop-in FPGA replacement for fixed 8-bit SAR chips, with a
width parameter so that registers of any size, multiples of 8 or not, come from
the same source.

## How one conversion runs

The register has two control inputs, both supplied from outside:

* `itr`: the iteration number, 0 to WIDTH-1;
* `d`: 1 to add the weight of this iteration, 0 to subtract it.

On each rising clock edge the register loads:

| `itr` | `d` = 1                  | `d` = 0                  |
|-------|--------------------------|--------------------------|
| 0     | 2^(WIDTH-1)              | 2^(WIDTH-1)              |
| i > 0 | q + 2^(WIDTH-1-i)        | q − 2^(WIDTH-1-i)        |

Iteration 0 is a load, not an add: it ignores `d` and sets mid-scale, which
starts a new conversion from any previous state.

Example, WIDTH = 8, target 77, with `d = (q < target)` chosen before each
edge:

| edge | itr | q before | d | q after |
|------|-----|----------|---|---------|
| 1    | 0   | –        | – | 128     |
| 2    | 1   | 128      | 0 | 64      |
| 3    | 2   | 64       | 1 | 96      |
| 4    | 3   | 96       | 0 | 80      |
| 5    | 4   | 80       | 0 | 72      |
| 6    | 5   | 72       | 1 | 76      |
| 7    | 6   | 76       | 1 | 78      |
| 8    | 7   | 78       | 0 | 77      |

Holding `d` high climbs 128, 192, 224, 240, 248, 252, 254, 255; holding it low
falls 128, 64, 32, 16, 8, 4, 2, 1.

Points to keep in mind when using it:

* Every step either adds or subtracts; there is no "keep" choice as in the
  classic bit-setting SAR. So the final value always has its LSB set (it is
  odd for WIDTH = 8), and a target is reached to within ±1 LSB, not exactly.
  Target 0 ends at 1, target 255 at 255.
* The arithmetic wraps modulo 2^WIDTH, as a plain register does. Within a
  proper sequence (itr 0, 1, ..., WIDTH-1 in order) it never wraps, because the
  remaining weights always sum to less than the distance to either end. It can
  wrap only if iterations are repeated or skipped.
* The register has no notion of a conversion being done: the controller knows
  the result is ready after the edge that consumed `itr = WIDTH-1`.

## Structure

```
           itr, d
             |
        +----v------+   q_next   +-----------+
   +--->| sar_logic |----------->| RG (DFFs) |---+---> q
   |    +-----------+            +-----------+   |
   +---------------------------------------------+
```

* `rtl/sar_logic.sv`: combinational next-value logic. It decodes `itr` into a
  one-hot weight, then selects the mid-scale load, `q + weight` or
  `q − weight`.
* `rtl/sar_register.sv`: the top. The logic block above plus the WIDTH-bit
  register; `q` is the register output.

Parameters (both modules):

| name  | default | meaning |
|-------|---------|---------|
| WIDTH | 8       | register width in bits, 2 or more |
| ITR_W | $clog2(WIDTH) = 3 | width of `itr` |

Ports of `sar_register`:

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| clk   | in  | 1     | clock, rising edge |
| rst_n | in  | 1     | asynchronous reset, active low, clears `q` to 0 |
| itr   | in  | ITR_W | iteration number |
| d     | in  | 1     | add (1) or subtract (0) |
| q     | out | WIDTH | register output |

Timing: one iteration per clock, with no enable; `itr` and `d` must be stable
around the rising edge, and `q` holds the new value right after it. A full
conversion takes WIDTH clocks.

## Where this RTL makes its own choices

The behaviour of the 8-bit register (the mid-scale load and the ±128 >> i
steps for iterations 1..7) is the specified one. The following are choices of
this implementation:

* The asynchronous active-low reset to 0. FPGA registers power up at 0; the
  reset makes that explicit and testable.
* Loading on every clock edge, with no clock enable. Hold the register by
  adding an enable in `sar_register` if the controller needs idle cycles.
* The generalisation to any WIDTH: weight 2^(WIDTH-1-i) at iteration i.
* When WIDTH is not a power of two, `itr` can take codes of WIDTH or more;
  those codes hold the present value.
* Overflow wraps modulo 2^WIDTH (see above) rather than saturating.

For size: generic synthesis of the 8-bit top gives 8 flip-flops, two 8-bit
adder/subtractors, the weight decoder and the output multiplexers. An FPGA
implementation of the same function has been reported at 113 logic elements.
That figure depends on the device and the tool, so it is not a target for this
RTL.

## Testbenches

Both testbenches check themselves and end with a line
`TB_RESULT checks=N failures=M`.

* `tb/tb_sar_logic.sv`: exhaustive test of the next-value logic. It applies
  every `itr`, `d` and `q` to an 8-bit instance, and all 5-bit `q` values to a
  WIDTH = 5 instance, where codes 5..7 must hold. The expected values come from
  written-out weight tables, not from shifts.
* `tb/tb_sar_register.sv`: end-to-end test of the top at its default size. It
  acts as the controller and checks `q` after every edge against a model, along
  with the one-clock latency. It converts every target 0..255, replays the
  constant-`d` sequences and forces wrap-around in both directions. It also
  resets in the middle of a conversion. It counts loads, adds, subtracts,
  wraps, resets and conversions, and fails if any of them never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_sar_register tb/tb_sar_register.sv
./obj_dir/Vtb_sar_register
```

Each runs in well under a second.
