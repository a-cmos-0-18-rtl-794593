// smart_pixel: one 2D/3D pixel of the imager.
//
// The pixel chains a SPAD with time-gated active quench/reset, the glue logic that turns
// its pulse (or the global START) and the global STOP into an oscillator enable, the
// 11-bit TDC, an 11-bit memory and the output buffer onto the column bus:
//   3D/test: code = number of time bins from START to the falling edge of STOP
//   2D:      code[10:3] = SPAD pulses counted while the gate is open and the row active
// Frame sequence (driven from outside): raise tdc_rst to clear the TDC, open the gate,
// let STOP fall to end the conversion, pulse store to copy the code into the memory,
// then select the row to put the stored code on col_out.
// The composition is the document's pixel; gate_en is the active-high time gate (the
// chip's TGATE pin is active low and is inverted in the top).
module smart_pixel
  import spad_pkg::*;
(
  input  mode_e       mode,
  input  logic        rst_n,       // memory reset
  input  logic        tdc_rst,     // TDC clear, active high
  input  logic        row_en,      // rolling-shutter row activation
  input  logic        row_sel,     // row decoder: read this row
  input  logic        gate_en,     // time gate open
  input  logic        photon,      // light reaching the SPAD
  input  logic        start_ext,   // global START (test mode)
  input  logic        stop,        // global STOP
  input  logic        store,       // copy TDC code into the memory
  input  logic [8:0]  holdoff_ns,  // SPAD dead time
  input  logic [15:0] tbin_ps,     // oscillator time bin
  input  logic        timebase,    // model time-bin clock
  output code_t       col_out      // contribution to the column bus
);
  timeunit 1ns; timeprecision 1ps;

  logic  spad_out, vcro_en, count_2d, cnt_en;
  code_t code, stored;

  spad_aqr u_spad (
    .timebase   (timebase),
    .tbin_ps    (tbin_ps),
    .photon     (photon),
    .v_gate     (gate_en),
    .holdoff_ns (holdoff_ns),
    .v_out      (spad_out)
  );

  tdc_glue u_glue (
    .mode      (mode),
    .tdc_rst   (tdc_rst),
    .row_en    (row_en),
    .gate_en   (gate_en),
    .spad_out  (spad_out),
    .start_ext (start_ext),
    .stop      (stop),
    .vcro_en   (vcro_en),
    .count_2d  (count_2d),
    .cnt_en    (cnt_en)
  );

  tdc u_tdc (
    .rst      (tdc_rst),
    .vcro_en  (vcro_en),
    .count_2d (count_2d),
    .cnt_en   (cnt_en),
    .event_in (spad_out),
    .timebase (timebase),
    .code     (code)
  );

  pixel_memory u_mem (
    .rst_n (rst_n),
    .store (store),
    .we    (row_en),
    .d     (code),
    .q     (stored)
  );

  pixel_out_buffer u_buf (.sel(row_sel), .d(stored), .bus(col_out));
endmodule
