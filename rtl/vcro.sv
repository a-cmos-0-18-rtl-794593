// vcro: behavioural model of the in-pixel voltage-controlled ring oscillator.
//
// Behavioural model: the real part is an analog pseudo-differential ring oscillator whose
// 8 phases, interpolated, split each period into 8 time bins. The model keeps the ring
// state m (0..7) and advances it by one on each rising edge of timebase while en is high;
// timebase is the simulation's time-bin clock made by the PLL model (period = one bin),
// standing in for the ring's own delay, so that no pixel needs a delay of its own. When
// en falls the ring freezes and its phases hold for the encoder; rst returns it to m = 0.
// Phase k is high when (m - k) mod 8 is 0..3, so phase 0 rises once per full period of
// 8 bins, which clocks the ripple counter. The number of bins counted is the number of
// timebase edges between the rise and the fall of en, within one bin of the ideal
// (stop - start) / tbin. The 8 phases are the document's; the freeze on disable, the
// reset state and the shared time base are this model's.
module vcro
  import spad_pkg::*;
(
  input  logic              timebase,  // model time-bin clock
  input  logic              en,        // run while high, freeze when low
  input  logic              rst,       // return to state 0, active high
  output logic [PHASES-1:0] phase      // phase[k] lags phase[0] by k bins
);
  timeunit 1ns; timeprecision 1ps;

  logic [FINE_BITS-1:0] m;

  always_ff @(posedge timebase or posedge rst)
    if (rst)     m <= '0;
    else if (en) m <= m + 1'b1;

  always_comb begin
    for (int k = 0; k < PHASES; k++)
      phase[k] = (FINE_BITS'(m - FINE_BITS'(k)) < FINE_BITS'(PHASES / 2));
  end
endmodule
