// tdc_glue: start/stop control of the pixel TDC (reversed start-stop scheme).
//
// The oscillator runs from START to the next falling edge of the global STOP. START is
// the rising edge of the pixel's SPAD output in 3D mode, or the global external START in
// test mode. Two edge-triggered flags, cleared by tdc_rst, make the conversion robust:
// - started is set by the START rising edge, so the width of the SPAD pulse does not
//   matter, and only the first photon of a frame counts;
// - stopped is set by the falling edge of STOP; once set, a later START cannot restart
//   the oscillator (overlapping or late START), and a pixel that never sees a START never
//   runs and keeps code 0 (missing START).
// In 3D mode a START is accepted only while the time gate is open (gate_en) and in every
// converting mode only while the pixel's row is activated by the rolling shutter. The
// flag sampling on the START edge means that the v_out rise caused by closing the gate
// is not taken as a photon. In 2D mode the oscillator stays off and the ripple counter
// counts SPAD pulses while the gate is open and the row active (cnt_en).
// The three modes, STOP's falling edge and the handled cases are the document's; the
// flag circuit that handles them is this design's.
module tdc_glue
  import spad_pkg::*;
(
  input  mode_e mode,
  input  logic  tdc_rst,    // clear both flags (frame start), active high
  input  logic  row_en,     // row activated by the rolling shutter
  input  logic  gate_en,    // time gate open
  input  logic  spad_out,   // SPAD output (3D START)
  input  logic  start_ext,  // external global START (test mode)
  input  logic  stop,       // global STOP, conversion ends on its falling edge
  output logic  vcro_en,    // oscillator runs
  output logic  count_2d,   // counter is clocked by the SPAD (photon counting)
  output logic  cnt_en      // counter first-stage enable
);
  timeunit 1ns; timeprecision 1ps;

  logic start_src, arm, started, stopped;

  assign start_src = (mode == MODE_TEST) ? start_ext : spad_out;
  assign arm       = row_en & ((mode == MODE_TEST) | ((mode == MODE_3D) & gate_en));

  always_ff @(posedge start_src or posedge tdc_rst)
    if (tdc_rst)  started <= 1'b0;
    else if (arm) started <= 1'b1;

  always_ff @(negedge stop or posedge tdc_rst)
    if (tdc_rst) stopped <= 1'b0;
    else         stopped <= 1'b1;

  assign vcro_en  = started & ~stopped;
  assign count_2d = (mode == MODE_2D);
  assign cnt_en   = count_2d ? (gate_en & row_en) : 1'b1;
endmodule
