# VPAC — an area calculation pipeline

VPAC splits each pixel of a video raster line between three areas, A, B and C.
The areas always fill exactly one pixel: A + B + C = .FF (255/255). Two of the
areas, A and B, are computed from preliminary data. C is whatever is left.
The areas later decide the pixel's colour. The circuit was first built from
TTL parts inside a special-purpose computer. It was then moved onto a single
CMOS gate array of about 2,700 gates, clocked at 8.33 MHz (120 ns).

The chip is a three-stage pipeline. It accepts one new data set every clock and
delivers the result three clocks later. Most of its work is muxing and adding:

* Each area is either loaded from one of two initial values, or it continues
  from its own previous value.
* A signed increment, multiplied by 1, 2, 3 or 4, is added to it.
* The sum is clamped to the range 0 to one pixel.
* Where A and B together would overflow the pixel, a priority flag decides
  which area keeps its value.

The repeated "previous value + k × increment" is how one pipeline steps along a
linear ramp of areas. That ramp is, for instance, the coverage of an edge
crossing a row of pixels. In the original system four pipelines run side by
side on neighbouring pixels. They produce a 1000-pixel line in 250 clocks.

This repository holds synthesizable SystemVerilog for the whole pipeline. It
also has a self-checking testbench for every block, one for the full chip, and
one for a two-line raster workload.

## Block structure

```
                 pipeline section 1                          section 2
        +---------------------------------------+     +---------------------+
AS,AA,  |  b103 (A)                             |     |  calc               |
DAJ --->|  delta -> ndelta --+                  | AI  |  R2: AIR,BIR,ABFIR   |
ABF --->|  areamux ----------+-> narea (R1) ----|---->|  9-bit add, split   |--> A0,B0,C0
ctrl -->|     ^______ SA (last area) ____|      |ABFI |  R3: output register |
        |                                       |---->|                     |
        |  b103 (B), same module                | BI  |                     |
BS,BA,  |  (its ABFI output is unused)          |---->|                     |
DBJ --->|                                       |     +---------------------+
        +---------------------------------------+
PXA0/PXA1 and PXB0/PXB1 come from the two narea stages.
```

| module     | role |
|------------|------|
| `vpac`     | top level: two `b103`s and one `calc` |
| `b103`     | computes one intermediate area (AI or BI): `delta`, `ndelta`, `areamux`, `narea` |
| `delta`    | registers the controls, the increment DAJ and the flag ABF; picks the new or old DAJ/ABF |
| `ndelta`   | picks 1×, 2×, 3× or 4× the increment |
| `areamux`  | picks the starting area: previous result, old AA, AA or AS |
| `narea`    | pipeline register R1, adder, clamp, pixel flags |
| `calc`     | pipeline register R2, split of the pixel into A, B, C, output register R3 |
| `acp_pkg`  | widths, select encodings (`area_sel_e`, `mult_sel_e`), control struct `ctrl_t` |

## Number formats

This is the part that most needs care when driving the design. Every width
below is the original design's. How the bits are read (the binary point and
the sign) is this implementation's interpretation.

| signal | bits | meaning |
|--------|------|---------|
| A0, B0, C0, AI, BI | 8 | unsigned fraction of a pixel; `8'hFF` is a full pixel |
| AM, SA (inside `b103`) | 12 | the same fraction with 4 extra low bits; the top 8 bits are AI |
| AS, AA, BS, BA | 5 | top 5 bits of the 12-bit area; the low 7 bits are zero when loaded |
| DAJ, DBJ, DS, D | 15 | two's complement increment; its top 12 bits line up with the 12-bit area |

So an initial value `AS = 5'd8` means 8/32 of a pixel (AI = 64). An increment
`DAJ = 15'd128` adds 16 to the 12-bit area, which is 1 to AI, per clock. The 3
low bits of the increment are dropped when it is added. They exist so that
2×, 3× and 4× keep precision. The multiples are formed modulo 2^15, as the
shifting circuit does. An increment must therefore be small enough for the
multiple used with it.

## Timing and the controls

The five control inputs arrive **one clock before** the data they steer:

* MSA and MSB select the area.
* MSD selects the new or the old increment.
* ALUS0 and ALUS2 select the multiple.

`delta` registers them, while AS, AA, DAJ and ABF are used in the clock they
arrive. In the original system the controls are computed by the stage in
front of the chip.

| clock | what happens |
|-------|--------------|
| n−1 | controls for data set n on `msa_i` … `alus2_i` |
| n   | data set n on `as_i`, `aa_i`, `daj_i`, `bs_i`, `ba_i`, `dbj_i`, `abf_i`; muxing and multiplying |
| n+1 | R1 holds the area and increment; adder and clamp; **PXA0/PXA1/PXB0/PXB1 valid** |
| n+2 | R2 holds AI, BI, ABFI; the pixel is split |
| n+3 | R3: **A0, B0, C0 valid** |

At 120 ns per clock, the result is ready 360 ns after the data was registered
in front of the chip. A new result follows every 120 ns. The original design
first had no R3. The outputs then left the chip combinationally, after 325 ns.
R3 was added so that the logic after the chip gets a full clock period. Only
this final three-stage version is implemented.

`slrt` (SLRT) clears every register. Here it is a synchronous, active-high
clear. The original only says that SLRT clears the registers.

## Section 1: one area (`b103`)

Area select `{MSA, MSB}` (used as the registered `{MSAR, MSBR}`):

| MSA MSB | AM = |
|---------|------|
| 0 0 | SA, this module's own last clamped area (accumulate) |
| 0 1 | AA of the previous clock |
| 1 0 | AA of this clock |
| 1 1 | AS of this clock |

Multiple select `{ALUS0, ALUS2}`: 00 → 1×, 01 → 2×, 10 → 3×, 11 → 4× the
selected increment. 2× and 4× are shifts, and 3× is DS + 2×DS.

MSD = 1 uses this clock's DAJ and ABF. MSD = 0 uses the ones from the
previous clock.

`narea` adds the top 12 bits of the registered increment to the registered
area. The result is clamped:

* below zero gives 0;
* one pixel or more gives all ones, so AI = `FF`;
* otherwise the sum is unchanged.

The clamped 12-bit value is fed back as SA. PXA0 is 1 when AI is zero, and
PXA1 when AI is `FF`. These flags come straight out of section 1, one clock
after the data. They are not aligned with A0.

Loading with a multiple k and then accumulating with 4× every clock makes
pipeline k of four produce pixels k, k+4, k+8, … of one linear ramp.
`tb/tb_raster_line.sv` drives four `vpac` instances exactly this way.

## Section 2: splitting the pixel (`calc`)

| condition | A | B | C |
|-----------|---|---|---|
| AI + BI < 256 | AI | BI | FF − (AI + BI) |
| AI + BI ≥ 256, ABFI = 0 | AI | FF − AI | 0 |
| AI + BI ≥ 256, ABFI = 1 | FF − BI | BI | 0 |

"FF − x" is a bitwise complement. The overflow test is the carry of a 9-bit
adder. The original rule is stated as AI + BI ≥ FF, but at exactly FF both
rows give the same result, so the carry test is equivalent. ABFI is the
priority flag ABF, delayed through section 1 of the A module. A concurrent
assertion in `calc` checks that A + B + C = FF on every clock.

## Where this RTL fills gaps or departs

* **Number format.** The binary point, the sign of the increments and the
  alignment described above are inferred from the widths and bit ranges of the
  original description. They are not stated in it.
* **Clamp value and feedback.** Sums at or above one pixel saturate to all
  ones in the 12-bit area, not to `FF0`. The clamped value, not the raw sum, is
  fed back for accumulation.
* **Flag source.** PXA0/PXB0 and PXA1/PXB1 are computed from AI/BI. They are
  not computed from the final A0/B0, which can differ when the areas overlap.
* **Control timing.** Controls lead data by one clock. This follows from the
  controls being registered before use while the data is not.
* **SLRT.** It is synchronous and active high.
* **Left out.**
  - An input called MXZI, listed among the controls on the original block
    diagram, has no described function and no port here.
  - The stage in front of the chip, which generates the controls, is not part
    of this design.
  - The TTL-compatible pad buffers and the gate-array base are not part of it
    either.
* **Pin count.** The ports come to 54 input bits and 28 output bits. The chip
  had 60 input pads; the other six are not accounted for.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each has a
watchdog. Build and run one with Verilator 5, for example the full chip:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/acp_pkg.sv tb/acp_model_pkg.sv rtl/*.sv tb/tb_vpac.sv \
    --top-module tb_vpac
./obj_dir/Vtb_vpac
```

Swap in `tb_areamux`, `tb_delta`, `tb_ndelta`, `tb_narea`, `tb_b103`,
`tb_calc` or `tb_raster_line` to run the others. Each runs in well under a
second.

| testbench | what it checks |
|-----------|----------------|
| `tb_areamux`, `tb_delta`, `tb_ndelta`, `tb_narea`, `tb_calc` | each sub-block against integer arithmetic, with random and corner inputs; latency of `calc` |
| `tb_b103` | one area module against the reference model in `tb/acp_model_pkg.sv`, including a 40-clock accumulation |
| `tb_vpac` | the full chip at its default sizes (described below) |
| `tb_raster_line` | four pipelines, two back-to-back 1000-pixel lines (a gentle ramp, then steep clamped ramps), every pixel checked against the closed-form ramp |

`tb_vpac` runs about 3,300 clocks of load/accumulate runs and random data,
with a clear in mid-run. It checks the 3-clock latency and every output on
every clock. It fails if any of these never happened:

* any area select, any multiple, or either increment choice;
* a clamp at either end, in both modules;
* any flag;
* any of the three split cases.

The reference model (`acp_model_pkg`) works on plain integers rather than
bits, so it does not share the design's bit-slicing.

## Changing it

* The widths are parameters of every module. Their defaults come from
  `acp_pkg`: `AREA_W` 8, `SUM_W` 12, `INIT_W` 5, `DELTA_W` 15. The tests
  assume these defaults.
* To get the earlier two-stage timing, remove the output register in `calc`.
  A0, B0 and C0 then come two clocks after the data.
