# Capacitive fingerprint sensor with a hardware thinning processor

Minutiae-based fingerprint verification spends a large share of its time on
one simple step: *thinning*. Thinning turns the binary ridge image from the
sensor into a skeleton of one-pixel-wide lines, which the later stages use to
find ridge endings and bifurcations. On a 32-bit RISC host, thinning a
160 x 192 image takes about 17.8 million cycles, roughly 40 % of the whole
algorithm. The same work is a handful of bit operations repeated over every
pixel, so it suits a small streaming datapath. This RTL does one full
thinning iteration in 61,768 clocks, about 1.5 ms at 40 MHz.

The design has two parts:

* a **capacitive charge-sharing pixel** whose sense node gets a small
  three-transistor inverter. The inverter makes the ridge/valley decision
  full-swing and early, which shortens the time the cell draws static
  current. That part is analog, so here it is a behavioural model.
* a **Zhang-Suen (ZS) thinning processor**, written as synthesizable RTL. It
  has a 2-D address counter, a 3x3 window generator and two "thinning stage"
  blocks, one for each ZS sub-iteration.

The system top connects the two parts. One `start` pulse captures a frame
into a one-bit image memory and thins it in place. The host then reads the
skeleton back.

```
 finger ─► sense_pixel ◄─ phi1/sw1/sa_en ── sensor_ctrl ──► image_ram ◄──► thinning_processor
                  └──────────── pix ───────────►┘   (write)  (ROWS*COLS bits)  ├ pixel_counter (scan)
                                                                  ▲            ├ window_gen
                                                        host_addr/host_rdata   ├ zs_stage1
                                                                               └ zs_stage2
```

## The thinning rules

Pixels are single bits: 1 is black (ridge) and 0 is white. The eight
neighbours of the centre pixel Pc are numbered so that P1..P8 go once around
it:

```
P7 P6 P5
P8 Pc P4
P1 P2 P3
```

* **N(Pc)** is the number of black neighbours, P1 + ... + P8.
* **S(Pc)** is the number of 1→0 changes met when walking P1, P2, ..., P8
  and back to P1. S = 1 means the black neighbours form one connected arc,
  so erasing Pc cannot split a ridge.

A black centre pixel is erased when:

| sub-iteration | common test                | extra terms                         | removes            |
|---------------|----------------------------|-------------------------------------|--------------------|
| stage 1       | 2 ≤ N ≤ 6 and S = 1        | P2·P6·P8 = 0 and P4·P6·P8 = 0       | west/north border  |
| stage 2       | 2 ≤ N ≤ 6 and S = 1        | P2·P4·P8 = 0 and P2·P4·P6 = 0       | south/east border  |

(P6 is above the centre, P4 right, P2 below and P8 left.)

ZS is a *parallel* algorithm. Every decision in a sub-iteration must see the
image as it was when that sub-iteration began. One iteration is a stage-1
sub-iteration over the whole image followed by a stage-2 sub-iteration.
Iterations repeat until one erases nothing. `thin_pkg` holds N, S and the
common test. `zs_stage1` and `zs_stage2` add their two product terms. Both
stages are purely combinational.

## How the processor streams the image

`thinning_processor` runs each sub-iteration as one **pass**: a raster scan
of the image memory at one pixel per clock.

1. `pixel_counter` (the 2-D address counter) produces (row, col). The scan
   covers `ROWS + 2` rows, so the last windows get flushed. Reads beyond the
   image feed white pixels.
2. The memory returns each pixel one clock later. `window_gen` pushes it into
   two line buffers of `COLS` bits and a 3x3 shift window. The window is
   centred `COLS + 1` positions behind the newest pixel. Each window carries
   its own (row, col). Neighbours that fall outside the image are forced to
   white.
3. The active stage decides. If it erases the centre, the processor clears
   that address through the memory's write port **in the same pass**.

The in-place update is safe for a specific reason. The window generator
takes every neighbour from its line buffers, never from memory. The line
buffers were filled before any write to those pixels. A write always lands
on a pixel that the scan has already read, so each decision still sees the
unmodified image, as ZS requires. The testbenches check this against a
reference model that copies the image on every sub-iteration.

### Cycle count

| quantity                        | clocks                                   | at 160 x 192 |
|---------------------------------|------------------------------------------|--------------|
| one pass (sub-iteration)        | ROWS·COLS + COLS + 4                     | 30,884       |
| one ZS iteration (two passes)   | 2·(ROWS·COLS + COLS + 4)                 | 61,768       |
| `start` edge → `done`           | iterations · 2·(ROWS·COLS + COLS + 4)    | 247,072 (4 iterations, test pattern) |
| sensor capture                  | 4 · ROWS·COLS                            | 122,880      |

The +4 per pass comes from three sources: the memory read latency, the
window register, and one restart clock. The restart clock clears the scan
counter and the window generator between passes. The published figures for
"step 1 and 2" are 56,000 and 65,000 cycles. The 61,768 clocks here fall
between them.

The processor stops in one of two cases. Normally it stops after an
iteration that erased nothing; then `converged` = 1. It also stops after
`MAX_ITER` iterations (default 32); then `converged` = 0. The outputs
`iterations`, `erased1` and `erased2` report what happened.

## The pixel cell (behavioural model)

`sense_pixel` models the proposed charge-sharing cell phase by phase, with
integer millivolts and femtofarads:

* **Precharge** (`phi1` high). Node Cp2 and the sense node Vsa go to VDD,
  and node Cp1 goes to ground.
* **Unit-gain** (`phi1` falls). Charge is shared:
  Vsa = VDD·(Cp2+Cf)/(Cp1+Cp2+Cf). The finger capacitance Cf is large on a
  ridge, so Vsa is higher there. The unit-gain buffer keeps the plate shield
  at Vsa, which takes the large shield capacitance out of the sum.
* **Sensing** (`sw1` rises). The 3T inverter switches below VDD/2. It turns
  Vsa into the full-swing Vsa1: 0 V on a ridge, VDD over a valley. Static
  current flows from this point on (`static_on`).
* **Evaluate** (`sa_en` rises). The comparator latches `pix` = 1 for a
  ridge, and transistor M5 cuts the static current.

The default values give 1925 mV on a ridge and 1320 mV over a valley. That is
about the 0.6 V unit-gain difference the original circuit shows. The
capacitances and the inverter threshold (1600 mV) are assumed values. The
model does not include the R1/R2 attenuator, analog settling or power.
`static_on` exists only to make the shorter static-current window visible in
simulation.

`sensor_ctrl` drives these phases for one pixel at a time in raster order:
PRE, UG, SENSE, EVAL, one clock each. At the end of EVAL it writes the
cell's decision to `image_ram`. A 160 x 192 frame therefore takes 122,880
clocks (3.1 ms at 40 MHz). The top uses a single cell model and evaluates it
for the addressed pixel. The environment supplies the finger as
`finger_contact` for (`sense_row`, `sense_col`).

## Top-level interface (`fingerprint_system`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock (40 MHz intended), active-low asynchronous reset |
| `start` | in | one pulse while idle: capture a frame, then thin it |
| `busy`, `capturing`, `thinning`, `done` | out | status; `done` is a one-clock pulse |
| `sense_row`, `sense_col` / `finger_contact` | out / in | addressed pixel / whether a ridge touches it |
| `ridges` | out | black pixels captured |
| `iterations`, `erased1`, `erased2`, `converged` | out | thinning statistics |
| `host_addr` / `host_rdata` | in / out | read the image (address row·COLS+col), one clock latency, only while not busy |

Parameters: `ROWS` = 192 and `COLS` = 160 (defaults from `thin_pkg`), and
`MAX_ITER` = 32. The time from `start` to `done` is
4·ROWS·COLS + 1 + iterations·2·(ROWS·COLS + COLS + 4) clocks. The single
extra clock hands the memory from the sensor controller to the processor.

## Choices made in this RTL

The original design gives the ZS rules, the block split of the thinning
processor (counter, window generator, stage 1, stage 2), the image size, the
cell's phase sequence and the 3T inverter. The following choices were made
here:

* **Image orientation.** Rows are 160 pixels long and there are 192 rows.
  The scan is raster order, columns fastest.
* **Image memory.** It sits outside the processor, as the original gate
  count suggests. It has one bit per pixel, a synchronous read port, a
  separate write port, and returns the old data when a read and a write hit
  the same address.
* **In-place update and stop rule.** The update is in place, as described
  above. The processor stops at convergence, bounded by `MAX_ITER`.
* **Image border.** Pixels outside the image count as white.
* **Sensor timing.** Each phase lasts one clock. The scan is one pixel at a
  time. The cell-model values are assumed.
* **Reset and status outputs.** Reset is asynchronous and active-low. The
  status counters are additions of this RTL.

Not included: the host processor, which keeps enhancement (Gabor
filtering), minutiae detection and matching in software; the physical pixel
array and its addressing; and the conventional sensing cell, which the
proposed cell replaces.

## Files

| file | contents |
|------|----------|
| `rtl/thin_pkg.sv` | image size, `window_t`, N, S and the common ZS test |
| `rtl/zs_stage1.sv`, `rtl/zs_stage2.sv` | erase decisions of the two sub-iterations |
| `rtl/pixel_counter.sv` | 2-D raster address counter |
| `rtl/window_gen.sv` | line buffers and 3x3 window with border masking |
| `rtl/thinning_processor.sv` | pass/iteration control, in-place erase writes |
| `rtl/image_ram.sv` | one-bit image memory |
| `rtl/sensor_ctrl.sv` | pixel scan and phase timing of the sensor read-out |
| `rtl/sense_pixel.sv` | behavioural model of the pixel cell (not synthesizable) |
| `rtl/fingerprint_system.sv` | system top |
| `tb/zs_ref_pkg.sv` | reference ZS model (compass-direction form) and a finger-like test pattern |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/thin_pkg.sv tb/zs_ref_pkg.sv tb/tb_thinning_processor.sv \
    --top-module tb_thinning_processor
./obj_dir/Vtb_thinning_processor
```

Replace the testbench name to run another. What each testbench covers:

* `tb_zs_stage1`, `tb_zs_stage2`: all 512 windows, compared with the
  reference.
* `tb_window_gen`: random 5 x 7 frames, with and without input gaps. Checks
  each window, its position, `out_last` and the latency.
* `tb_thinning_processor`: 24 x 20 images (finger pattern and random blobs),
  plus a `MAX_ITER` = 1 instance. Checks the final image, the counts and the
  exact clock count.
* `tb_sensor_ctrl`: 6 x 5 frames through the cell model. Checks the phase
  order, the stored image, the ridge count and 4 clocks per pixel.
* `tb_sense_pixel`: ridge/valley decisions, output hold, the static-current
  window, and the charge-sharing levels (bracketed by cells with shifted
  inverter thresholds).
* `tb_pixel_counter`, `tb_image_ram`: sequence, wrap and clear; latency and
  read-before-write.
* `tb_fingerprint_system`: the whole design at its default 160 x 192 size.
  It captures a finger-like pattern and thins it, then compares the skeleton
  pixel by pixel with the reference. It also checks every clock count and
  that ridge and valley sensing, stage-1 and stage-2 erasures, more than one
  iteration, and convergence all happen. It needs about 430,000 clocks and
  runs in seconds.

To change the image size, override `ROWS` and `COLS` on
`fingerprint_system`, `thinning_processor` or any of the submodules. All
widths follow from them.
