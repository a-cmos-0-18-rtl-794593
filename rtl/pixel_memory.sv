// pixel_memory: 11-bit in-pixel storage of the TDC code.
//
// At the end of a conversion or integration the global store pulse copies the TDC code
// into this register, so the array can be read out slowly while the next frame is being
// acquired. Only pixels in rows activated by the rolling shutter (we) are overwritten;
// other rows keep their previous frame. rst_n clears it asynchronously. The 11-bit
// in-pixel memory is the document's; the rising-edge store pulse, the row write enable
// and the reset are this design's choices.
module pixel_memory
  import spad_pkg::*;
(
  input  logic  rst_n,  // asynchronous clear, active low
  input  logic  store,  // capture on the rising edge
  input  logic  we,     // write enable (row active)
  input  code_t d,
  output code_t q
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge store or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
endmodule
