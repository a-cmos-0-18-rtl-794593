// pixel_array: the ROWS x COLS array of 2D/3D smart pixels.
//
// All pixels share the mode, the TDC clear, the time gate, START, STOP, the store pulse
// and the two analog controls (dead time and oscillator time bin), which on the chip
// reach them through balanced distribution trees and analog buffers. Each row has its
// own rolling-shutter enable and its own read select. The pixels of a column share one
// column bus of 11 bits, onto which the selected row drives its stored codes; the bus is
// the OR of the pixels' outputs (see pixel_out_buffer). photon[r][c] is the light
// reaching pixel (r, c). The 64 x 64 size and the shared signals are the document's.
module pixel_array
  import spad_pkg::*;
#(
  parameter int unsigned NR = ROWS,
  parameter int unsigned NC = COLS
) (
  input  mode_e       mode,
  input  logic        rst_n,
  input  logic        tdc_rst,
  input  logic        gate_en,
  input  logic        start_ext,
  input  logic        stop,
  input  logic        store,
  input  logic [8:0]  holdoff_ns,
  input  logic [15:0] tbin_ps,
  input  logic        timebase,           // model time-bin clock
  input  logic [NR-1:0] row_en,             // rolling-shutter enables
  input  logic [NR-1:0] row_sel,            // read selects
  input  logic [NC-1:0] photon [NR],        // light per pixel
  output code_t         col_bus [NC]        // column buses
);
  timeunit 1ns; timeprecision 1ps;

  code_t pix_out [NR][NC];

  for (genvar r = 0; r < NR; r++) begin : g_row
    for (genvar c = 0; c < NC; c++) begin : g_col
      smart_pixel u_pix (
        .mode       (mode),
        .rst_n      (rst_n),
        .tdc_rst    (tdc_rst),
        .row_en     (row_en[r]),
        .row_sel    (row_sel[r]),
        .gate_en    (gate_en),
        .photon     (photon[r][c]),
        .start_ext  (start_ext),
        .stop       (stop),
        .store      (store),
        .holdoff_ns (holdoff_ns),
        .tbin_ps    (tbin_ps),
        .timebase   (timebase),
        .col_out    (pix_out[r][c])
      );
    end
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      col_bus[c] = '0;
      for (int r = 0; r < NR; r++)
        col_bus[c] = col_bus[c] | pix_out[r][c];
    end
  end
endmodule
