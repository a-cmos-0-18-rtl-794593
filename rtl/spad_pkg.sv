// spad_pkg: types and constants shared by the 64x64 SPAD imager.
//
// The imager runs in one of three modes. In 3D mode each pixel's time-to-digital
// converter (TDC) is started by the first photon its SPAD detects and stopped by the
// falling edge of the global STOP (laser synchronisation) signal. Test mode is the same
// conversion, but START is a global external pulse instead of the SPAD. In 2D mode the
// SPAD pulses clock the TDC's ripple counter directly, so the pixel counts photons.
// The 11-bit code is an 8-bit coarse count of full oscillator periods above a 3-bit
// fine code taken from the 8 oscillator phases. The mode encoding is a local choice.
package spad_pkg;
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {
    MODE_TEST = 2'd0,   // global external START, global STOP
    MODE_3D   = 2'd1,   // START from the pixel's own SPAD, global STOP
    MODE_2D   = 2'd2    // photon counting in the ripple counter, oscillator off
  } mode_e;

  localparam int unsigned ROWS      = 64;  // array rows
  localparam int unsigned COLS      = 64;  // array columns
  localparam int unsigned CNT_BITS  = 8;   // ripple counter (coarse) bits
  localparam int unsigned FINE_BITS = 3;   // thermometric encoder (fine) bits
  localparam int unsigned PHASES    = 8;   // oscillator phases interpolated
  localparam int unsigned CODE_BITS = CNT_BITS + FINE_BITS;  // 11-bit pixel code

  typedef logic [CODE_BITS-1:0] code_t;
endpackage
