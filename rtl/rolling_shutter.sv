// rolling_shutter: rolling activation of the TDC rows.
//
// To limit the power drawn by the oscillators, only a band of ACTIVE_ROWS consecutive
// rows of TDCs is armed in a frame; the band then moves on, so a full depth map takes
// NR/ACTIVE_ROWS frames. The band is a ring register of NR row enables: init loads rows
// 0..ACTIVE_ROWS-1, advance rotates it by ACTIVE_ROWS rows (wrapping from the last row
// back to row 0). With rs_on low every row is enabled (2D imaging, or all TDCs at once).
// The document names the rolling-shutter activation and its purpose only; the band
// width, the ring register and the bypass are this design's choices.
module rolling_shutter #(
  parameter int unsigned NR          = 64,  // rows
  parameter int unsigned ACTIVE_ROWS = 8    // rows armed per frame
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,     // load the first band
  input  logic          advance,  // move to the next band
  input  logic          rs_on,    // 0: all rows enabled
  output logic [NR-1:0] row_en
);
  timeunit 1ns; timeprecision 1ps;

  logic [NR-1:0] band;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       band <= '0;
    else if (init)    band <= NR'((1 << ACTIVE_ROWS) - 1);
    else if (advance) band <= (band << ACTIVE_ROWS) | (band >> (NR - ACTIVE_ROWS));

  assign row_en = rs_on ? band : '1;
endmodule
