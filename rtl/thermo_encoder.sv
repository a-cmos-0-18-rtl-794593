// thermo_encoder: 8-phase to 3-bit fine-time encoder of the pixel TDC.
//
// The pseudo-differential ring oscillator offers 8 phases, phase k lagging phase 0 by k
// time bins, each high for half a period. Frozen at any instant, exactly four cyclically
// adjacent phases are high (a rotating thermometer code), and the most recent of them,
// phase m with phase m+1 (mod 8) still low, tells how many bins of the current period
// have elapsed. The encoder finds that single 1->0 transition and encodes its position
// m in binary. That the fine code comes from the phase pattern is the document's; the
// transition-detect structure is this design's. A pattern with no transition (all low
// or all high, which the oscillator never produces) encodes to 0.
// Purely combinational.
module thermo_encoder
  import spad_pkg::*;
(
  input  logic [PHASES-1:0]    phase,  // frozen oscillator phases, phase[0] is the counter clock
  output logic [FINE_BITS-1:0] fine    // elapsed bins within the current period
);
  timeunit 1ns; timeprecision 1ps;

  logic [PHASES-1:0] edge_hot;  // one-hot position of the leading phase

  always_comb begin
    for (int k = 0; k < PHASES; k++)
      edge_hot[k] = phase[k] & ~phase[(k + 1) % PHASES];
  end

  // one-hot to binary: OR of the indices whose bit is set
  always_comb begin
    fine = '0;
    for (int k = 0; k < PHASES; k++)
      if (edge_hot[k]) fine = fine | FINE_BITS'(k);
  end
endmodule
