// pixel_out_buffer: the pixel's output buffer onto its column bus.
//
// When the row decoder selects the pixel's row (sel) the stored code is driven onto the
// column; otherwise the pixel does not drive it. On the chip these are tri-state buffers
// sharing one column wire. Here "not driving" is modelled as driving zeros and the
// column combines its 64 pixels with an OR, which gives the same bus value whenever at
// most one row is selected (the row decoder shifts a single token). The buffer's role
// is the document's; the AND-OR bus in place of a tri-state wire is this design's.
module pixel_out_buffer
  import spad_pkg::*;
(
  input  logic  sel,   // row selected for readout
  input  code_t d,     // stored code
  output code_t bus    // contribution to the column bus
);
  timeunit 1ns; timeprecision 1ps;

  assign bus = sel ? d : '0;
endmodule
