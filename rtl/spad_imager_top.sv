// spad_imager_top: 64x64 SPAD time-of-flight / photon-counting image sensor.
//
// Every pixel holds a SPAD and its own 11-bit TDC, so a whole depth frame is captured
// at once from one laser pulse. Around the array sit:
// - the PLL, which sets the oscillator time bin (145-625 ps) for all pixels from a
//   reference clock and a divider (pll_div), making the bin independent of process and
//   temperature; its control voltage reaches the pixels through ideal wires here;
// - the rolling shutter, which arms only a band of TDC rows per frame (rs_on = 0 arms all);
// - the row decoder, a shift register whose single token selects the row to read;
// - the data serialiser, which sends the selected row out on sout, 704 bits per row.
// One 3D frame, all signals driven by an external controller:
//   1. tdc_rst high then low (clears every TDC); rs_init/rs_advance choose the band;
//   2. tgate_n low opens the time gate; a pixel's first photon starts its oscillator;
//   3. the falling edge of stop ends every conversion: code = (stop - photon) / tbin;
//   4. a rising edge of store copies the codes of the armed rows into the pixel memories;
//   5. per row: shift the row-decoder token to it, pulse ser_load, read 704 bits of sout
//      (column 0 first, MSB first) while sout_valid is high.
// Test mode uses start_ext in place of the photons; 2D mode counts photons instead
// (code[10:3]). clk clocks only the digital periphery (row decoder, rolling shutter,
// serialiser); the pixels are asynchronous. The block set and the array size are the
// document's; pin names, the active-low gate pin (as in the document's waveforms) and
// the controller protocol are this design's.
module spad_imager_top
  import spad_pkg::*;
#(
  parameter int unsigned NR          = ROWS,
  parameter int unsigned NC          = COLS,
  parameter int unsigned ACTIVE_ROWS = 8
) (
  input  logic        clk,          // readout / control clock
  input  logic        rst_n,        // asynchronous reset of the digital periphery and memories
  input  mode_e       mode,         // test, 3D or 2D
  // acquisition
  input  logic        tdc_rst,      // clear all TDCs, active high
  input  logic        tgate_n,      // time gate, detectors enabled while low
  input  logic        start_ext,    // global START (test mode)
  input  logic        stop,         // global STOP, conversions end on its falling edge
  input  logic        store,        // copy codes into the pixel memories (rising edge)
  input  logic [8:0]  holdoff_ns,   // SPAD dead time (hold-off voltage)
  input  logic [NC-1:0] photon [NR],  // light reaching each pixel
  // PLL
  input  logic        ref_clk,
  input  logic [7:0]  pll_div,
  output logic        pll_locked,
  output logic [15:0] tbin_ps,      // time bin in use (control voltage)
  // rolling shutter
  input  logic        rs_init,
  input  logic        rs_advance,
  input  logic        rs_on,
  // row decoder
  input  logic        row_sin,
  input  logic        row_shift,
  // serial output
  input  logic        ser_load,
  output logic        sout,
  output logic        sout_valid,
  output logic        ser_busy
);
  timeunit 1ns; timeprecision 1ps;

  logic [NR-1:0] row_en, row_sel;
  logic          timebase;
  code_t         col_bus [NC];

  pll u_pll (
    .ref_clk (ref_clk),
    .div_n   (pll_div),
    .tbin_ps (tbin_ps),
    .locked  (pll_locked),
    .timebase (timebase)
  );

  rolling_shutter #(.NR(NR), .ACTIVE_ROWS(ACTIVE_ROWS)) u_rs (
    .clk     (clk),
    .rst_n   (rst_n),
    .init    (rs_init),
    .advance (rs_advance),
    .rs_on   (rs_on),
    .row_en  (row_en)
  );

  row_decoder #(.NR(NR)) u_rowdec (
    .clk   (clk),
    .rst_n (rst_n),
    .sin   (row_sin),
    .shift (row_shift),
    .q     (row_sel)
  );

  pixel_array #(.NR(NR), .NC(NC)) u_array (
    .mode       (mode),
    .rst_n      (rst_n),
    .tdc_rst    (tdc_rst),
    .gate_en    (~tgate_n),
    .start_ext  (start_ext),
    .stop       (stop),
    .store      (store),
    .holdoff_ns (holdoff_ns),
    .tbin_ps    (tbin_ps),
    .timebase   (timebase),
    .row_en     (row_en),
    .row_sel    (row_sel),
    .photon     (photon),
    .col_bus    (col_bus)
  );

  data_serialiser #(.NC(NC), .W(CODE_BITS)) u_ser (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (ser_load),
    .col_bus    (col_bus),
    .sout       (sout),
    .sout_valid (sout_valid),
    .busy       (ser_busy)
  );
endmodule
