# Super-pipelined CORDIC sine/cosine accelerator

Newton-Raphson load-flow solvers for power systems rebuild a Jacobian matrix
on every iteration. Each off-diagonal entry needs the sine and cosine of a bus
angle difference θi − θj, so a single build of a few-thousand-bus network
takes thousands of trigonometric evaluations. This design computes them in
hardware. A host streams floating-point angles into an FPGA. Each angle passes
through a deep CORDIC pipeline that returns one cosine/sine pair on every
clock. The results are collected in a result memory for the host to read back.

The CORDIC pipeline is *super-pipelined*: every CORDIC stage is split over two
clocks so that no clock holds both a shift and an add. This doubles the
latency but keeps the throughput at one result per clock, and it raises the
clock rate. The published design reports 166 MHz against 122 MHz for the
single-clock stages on an Altera Stratix part. This RTL follows that structure.
Word widths, number formats, the bus register map and the memory size are its
own choices (listed under "Departures and own choices").

## Data path

```
 host ──PCI──► PCI bridge ──► Avalon-MM slave ──► float_to_fixed ──► sp_cordic ──► fixed_to_float (cos)
 (not part of this RTL)       avalon_cordic_slave                    21 stages  └─► fixed_to_float (sin)
                                    ▲                                                      │
                                    └──────────── result_sram ◄──────── {sin, cos} ────────┘
```

`tsunami_cordic_top` wires this chain together. Its only external interface is
a 32-bit Avalon-MM slave port. The PCI bus, the PCI bridge chip and the host
software are outside the design.

## How the CORDIC gets sine and cosine

A rotation of the vector (x, y) by an angle θ is built from micro-rotations by
±atan(2^-i), i = 0, 1, 2, …. Each micro-rotation only needs shifts and
additions:

```
d  = +1 if z >= 0, else -1
x' = x - d·(y >> i)
y' = y + d·(x >> i)
z' = z - d·atan(2^-i)
```

Here z is the angle still to be rotated. Starting from (x, y, z) = (K, 0, θ),
after n steps x ≈ cos θ and y ≈ sin θ. Each micro-rotation also stretches the
vector by √(1 + 2^-2i). K = ∏ 1/√(1 + 2^-2i) is loaded up front to cancel that
stretch, so no multiplier is needed at the end. For 20 rotations, K =
0.6072529. Summed, the micro-angles reach ±1.743 rad, which covers the first
and fourth quadrants (|θ| ≤ π/2). That is the input range of the unit.

The direction of each step depends only on the sign of the remaining angle.
For example, 37° is reached as 45 − 26.57 + 14.04 + 7.13 − 3.58 + 1.79 − 0.90
+ … : after +45° the remainder is −8°, so the next step subtracts, and so on.

The pipeline has 21 stages:

| stage | module | work |
|---|---|---|
| 1 | `cordic_init` | load x = K, y = 0, z = θ |
| 2 … 21 | `cordic_stage`, `SHIFT` = 0 … 19 | one micro-rotation each |

After 20 rotations the remaining angle is below atan(2^-19) ≈ 1.9·10^-6 rad.
Over 40 000 random angles in simulation, the largest error of a cosine or sine
was 1.9·10^-6.

## The super-pipeline

Each stage spans two register levels:

1. **shift clock**: register `x >>> SHIFT`, `y >>> SHIFT`, the sign of z
   (the rotation direction) and unshifted copies of x, y and z;
2. **add clock**: perform the three additions or subtractions selected by
   that sign.

Stage 1 also takes two clocks, so that every stage has the same timing. The
latency of `sp_cordic` is therefore 2 × 21 = 42 clocks. A new angle enters,
and a result leaves, on every clock. There is no stall or back-pressure
anywhere in the path. The pipeline always advances, and only the valid bits
are reset.

## Number formats

* **Host side:** IEEE-754 single precision, one value per 32-bit bus word.
  Angles are in radians.
* **Inside the CORDIC:** W-bit two's complement with W−2 fraction bits. The
  default W = 32 gives a range of −2 to 2 in steps of 2^-30.
* **`float_to_fixed`** truncates toward zero. It flushes denormals to 0. Values
  with |x| ≥ 2, infinities and NaN saturate, and set a sticky *saturated* flag
  in the status register. A saturated angle is outside the CORDIC's range,
  so its result is meaningless. It is still stored, so that result entries
  keep their one-to-one order with the angles written.
* **`fixed_to_float`** finds the leading one, normalises, and rounds to
  nearest-even.
* The angle tables in `cordic_pkg` hold atan(2^-i) and K with 62 fraction
  bits. Each is rounded to the datapath width when a stage is elaborated.

## Bus interface and register map

The slave has `RES_ADDR_W + 2` word-address bits (18 by default). There are no
wait states. `readdatavalid` comes exactly one clock after `read`. Read and
write must not be requested in the same clock; an assertion checks this.

| address (word) | name | access | meaning |
|---|---|---|---|
| top bit 0, 0 | CTRL | read | bit 0 busy (angles still in flight), bit 1 overflow, bit 2 an angle saturated |
| | | write | bit 0 = 1 clears COUNT, overflow and saturated |
| top bit 0, 1 | ANGLE | write | push one angle into the pipeline |
| top bit 0, 2 | COUNT | read | number of results stored |
| top bit 1, 2n | RESULT | read | cos of result n |
| top bit 1, 2n+1 | RESULT | read | sin of result n |

Results are stored at consecutive entries from 0, in the order the angles were
written. When all 2^RES_ADDR_W entries are used, further results are dropped
and *overflow* is set.

A typical host sequence:
1. Write CTRL = 1.
2. Write the angles to ANGLE, one per clock if the bus allows.
3. Poll CTRL until busy is 0.
4. Read COUNT.
5. Read the RESULT window.

An angle accepted at clock edge E is stored at edge E + 45: 1 clock in the
slave, 1 in `float_to_fixed`, 42 in the CORDIC and 1 in `fixed_to_float`.

## Files

| file | contents |
|---|---|
| `rtl/cordic_pkg.sv` | atan and gain tables, rounding functions |
| `rtl/cordic_init.sv` | stage 1 |
| `rtl/cordic_stage.sv` | one two-clock micro-rotation stage |
| `rtl/sp_cordic.sv` | the 21-stage CORDIC unit |
| `rtl/float_to_fixed.sv`, `rtl/fixed_to_float.sv` | format converters |
| `rtl/result_sram.sv` | 64-bit-wide dual-port result memory |
| `rtl/avalon_cordic_slave.sv` | bus slave, write pointer, flags |
| `rtl/tsunami_cordic_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tsunami_full.sv` | the top at its default size, with two full-size cases |
| `tb/tb_float_pkg.sv` | real-arithmetic float reference used by the testbenches |

Top-level parameters: `N_STAGES` (21), `W` (32, at least 26 because of the
float converter), `RES_ADDR_W` (16, so 65536 results).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Plain
Verilator 5 runs any of them, for example the full-size test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tsunami_full \
    -y rtl -y tb +libext+.sv rtl/cordic_pkg.sv tb/tb_float_pkg.sv tb/tb_tsunami_full.sv
./obj_dir/Vtb_tsunami_full
```

To run a different testbench, change the top module and the last file name.
`tb_float_pkg.sv` is needed only by the testbenches that convert floats.

What the tests establish:

* **Each block** is compared with an independent reference:
  * integer models for the stage;
  * for the CORDIC, a bit-exact integer model of the algorithm and `$cos`/`$sin`;
  * real-arithmetic float conversion for the converters;
  * a shadow array for the memory.

  Each test also checks the exact latency.
* **`tb_tsunami_cordic_top`** drives the whole design with a 32-entry memory.
  It covers the following:
  * a back-to-back burst, stored on consecutive clocks at the 45-clock latency;
  * angles in both quadrants, including ±π/2;
  * saturation;
  * filling and overflowing the memory;
  * clearing it.
* **`tb_tsunami_full`** runs the default configuration on two cases. They
  match the sine/cosine counts of two PSS/E test systems:
  * 6952 angles (1646 buses);
  * 33945 angles (7917 buses).

  It checks that the last result lands exactly on time, and checks every
  result. The angles are random, because the systems' data are not available.

## Departures and own choices

The published design fixes the chain of blocks, the 21 stages (stage 1 for
initialization), the gain-corrected start value 0.607, and the two-clock
stages with one result per clock. It also uses a 32-bit Avalon system bus
behind the PCI bridge. The following are choices of this RTL:

* The 32-bit fixed-point format and the IEEE single-precision host format.
* The rounding, saturation and denormal rules of the converters.
* The exact shift/add register split inside a stage.
* No quadrant folding. Angles must lie within ±π/2, as stated for the original
  unit. Power-flow angle differences outside that range must be reduced by the
  host.
* The result memory is an on-chip array: 65536 × 64 bits, one {sin, cos} pair
  per entry. The original board used an SRAM whose size is not stated.
* The register map, the overflow rule (drop and flag) and the busy counter.

Not built:
* the host PC;
* the PCI bus and the PCI bridge, which is a vendor part; the top's Avalon port
  stands in for them;
* the future-work items of the original, which are described only in outline:
  SDRAM-resident network data with a cache controller, floating-point units,
  and an embedded PowerPC control processor.
