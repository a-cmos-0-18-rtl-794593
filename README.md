# 64×64 SPAD imager with an 11-bit TDC in every pixel

This is a time-of-flight image sensor. Every one of its 64×64 pixels holds a single-photon
avalanche diode (SPAD) and its own time-to-digital converter (TDC). A laser pulse lights
the scene. Each pixel measures how long after its first returning photon the next laser
synchronisation edge (STOP) arrives. Because STOP comes one laser period after the pulse
that caused the photon, the round-trip time is `2·T_ToF = T_laser − T_measured`. This is a
"reversed start-stop" scheme: the photon starts the converter and the shared STOP ends it.
As a result, only pixels that actually see a photon spend power converting.

The same pixel works in two more modes:

- **Test mode.** A global external START replaces the photon, so all TDCs measure the same
  interval. This is how the TDCs are characterised.
- **2D mode.** The SPAD pulses clock the TDC's counter directly. The pixel then counts
  photons during the exposure and gives an intensity image.

The RTL is SystemVerilog (IEEE 1800-2017). The digital parts are synthesizable. The
analog parts (SPAD front end, ring oscillator, PLL) are behavioural models.

## The pixel TDC: how 11 bits come from a ring oscillator

Each pixel has a pseudo-differential ring oscillator whose 8 phases are spaced one time bin
apart. The bin is 145 ps at the fastest setting, so one oscillator period is 8 bins. The
conversion works as follows:

1. The glue logic (`tdc_glue`) enables the oscillator on the START edge and disables it on
   the falling edge of STOP. When disabled, the ring freezes.
2. An **8-bit ripple counter** (`ripple_counter`) is clocked by phase 0, so it counts
   complete oscillator periods. This gives the coarse part, `code[10:3]`.
3. The frozen phases always show four cyclically adjacent phases high. The most recent
   high phase, the one whose neighbour is still low, says how many bins of the unfinished
   period have passed. The **thermometric encoder** (`thermo_encoder`) finds this single
   1→0 transition and encodes its position. This gives the fine part, `code[2:0]`.

So `code = 8·periods + bins = elapsed time / t_bin`. 2048 codes at 145 ps cover 297 ns.
With the slowest bin (625 ps) they cover 1.28 µs. These correspond to the 44 m and 192 m
ranges of the sensor.

The oscillator frequency is set by an analog control voltage that all pixels share. A
programmable PLL produces this voltage by locking a copy of the ring to a reference clock.
Because of this, the bin does not drift with process or temperature.

### Start/stop corner cases

`tdc_glue` uses two edge-triggered flags, both cleared by `tdc_rst` at the start of a frame:

- `started` is set by the rising edge of START. The width of the SPAD pulse does not
  matter, and any later photon in the frame has no effect.
- `stopped` is set by the falling edge of STOP. Once it is set, a START that arrives late
  (overlapping the STOP pulse, or after it) cannot restart the oscillator.
- A pixel that sees no photon never runs and reads 0.
- In 3D mode a photon counts only while the time gate is open and the pixel's row is
  armed. The START flag samples the gate on the photon edge. When the gate closes, the
  SPAD output goes high, but this rise is not taken as a photon.

## SPAD front end

`spad_aqr` models the SPAD with its active quench/reset circuit:

- While the gate is closed, the detector output is held high.
- After the gate opens, the detector is restored and the output falls.
- A photon makes the output rise at once. The output stays high for the dead time
  (`holdoff_ns`, 4–500 ns), and photons arriving during the dead time are lost.

`holdoff_ns` stands for the analog hold-off voltage.

## Array and periphery

| block | module | what it does |
|---|---|---|
| smart pixel | `smart_pixel` | SPAD + glue + TDC + 11-bit memory + output buffer |
| pixel memory | `pixel_memory` | stores the code on the rising edge of `store`, only in armed rows |
| output buffer | `pixel_out_buffer` | puts the stored code on the column bus when the row is selected |
| array | `pixel_array` | 64×64 pixels; column buses are the OR of the pixels' outputs |
| rolling shutter | `rolling_shutter` | arms a band of `ACTIVE_ROWS` rows per frame to save power; `advance` moves the band, `rs_on=0` arms all rows |
| row decoder | `row_decoder` | shift register holding one token that selects the row to read; asserts that at most one row is selected |
| serialiser | `data_serialiser` | sends a row out on `sout`: column 0 first, MSB first, 704 bits in 704 clocks |
| PLL | `pll` | time bin = T_ref / (8·div), limited to 145–625 ps; `locked` after 4 steady reference periods |
| top | `spad_imager_top` | wires everything; `tgate_n` is the active-low gate pin |

Shared types are in `spad_pkg` (the `mode_e` enum and the widths).

### One 3D frame, as seen at the pins

1. Wait for `pll_locked`. Pulse `rs_init`, or pulse `rs_advance` to move to the next band.
2. Pulse `tdc_rst` high to clear every TDC.
3. Drive `tgate_n` low. Each pixel's first photon now starts its oscillator.
4. The falling edge of `stop` ends all conversions.
5. Raise `tgate_n`. A rising edge on `store` copies the armed rows' codes into the memories.
6. For each row: shift the row-decoder token to the row (`row_sin`, `row_shift`), pulse
   `ser_load`, and collect 704 bits of `sout` while `sout_valid` is high.

For test mode, set `mode=MODE_TEST` and give the START on `start_ext`. For 2D mode, set
`mode=MODE_2D` (and usually `rs_on=0`). In 2D mode the count is in `code[10:3]` and
`code[2:0]` is 0.

`clk` only runs the periphery (rolling shutter, row decoder, serialiser). The pixels are
asynchronous.

## Modelling choices and departures

- **Shared time-bin clock.** On the chip, each pixel's ring oscillator keeps its own time.
  Here, the ring model and the SPAD model in each pixel step on one clock, `timebase`,
  which the PLL model produces with a period of one bin. This clock is not a chip signal.
  Giving every pixel its own analog delays made the 64×64 model too large for Verilator.
  A consequence is that codes are quantised to the global bin grid rather than to the
  START edge: a code is within ±1 bin of `(t_stop − t_start)/t_bin`, and the testbenches
  check that bound.
- **Column buses.** The chip uses tri-state column buses. Here the pixel outputs are ANDed
  with their row select and ORed per column. This gives the same value whenever at most
  one row is selected, and the row decoder asserts that rule.
- **This design's own choices.** The following are chosen here, not taken from the sensor's
  published description:
  - the rolling-shutter band (8 rows, ring register, bypass);
  - the store pulse and its gating by the rolling shutter;
  - the serialiser's bit order and handshake;
  - the PLL's divider programming and lock rule;
  - the encoding of analog controls as numbers (`holdoff_ns`, `tbin_ps`);
  - counter wrap on overflow (no saturation);
  - code 0 for a pixel without a photon;
  - the placement of the 2D count in the upper bits;
  - all pin names.
- **Not modelled.** These parts have no logic function: the analog buffers that
  distribute the control voltages, the skew-balanced START/STOP trees, and the pads. The
  top uses plain wires for them. Process variation, jitter, DNL/INL and power are not
  modelled.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one prints
`TB_RESULT checks=N failures=M`. Build and run a testbench with, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_spad_imager_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/spad_pkg.sv tb/tb_spad_imager_top.sv
./obj_dir/Vtb_spad_imager_top
```

`tb_spad_imager_top` runs the whole chip at 8×8 pixels with a 4-row band. The PLL is
locked to 145 ps bins. The test runs these frames:

- three 3D frames, with the band advancing and wrapping;
- one frame whose STOP falls after more than 2048 bins, so the counter wraps;
- a test-mode frame;
- a 2D photon-counting frame.

Every frame is read out bit by bit through `sout`. The testbench checks each code against
a reference and against the ideal time difference, and counts that each corner case
actually occurred: missing photon, second photon, photon after STOP, photon while gated,
photon in the dead time.

The 64×64 default configuration passes lint and elaboration. Building a 64×64 simulation
with Verilator did not finish within half an hour of C++ compilation, so 8×8 is the
largest array size simulated.

Not brought out: a monitor pin showing one pixel's oscillator divided by 64. Inside the
pixel, this signal is bit 5 of the ripple counter.
