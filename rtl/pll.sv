// pll: behavioural model of the programmable PLL that sets the TDC time bin.
//
// Behavioural model (not synthesizable): the real part is an analog PLL whose oscillator
// is a replica of the pixel ring oscillator; locking it to a reference clock fixes the
// control voltage, and the analog buffers hand that voltage to every pixel, which makes
// the time bin independent of process and temperature. The model measures the period of
// ref_clk and, for the programmed divider div_n, gives the time bin that locks an
// 8-phase ring to div_n times the reference period: tbin = T_ref / (8 * div_n), rounded
// to the picosecond and limited to the oscillator's tuning range (145 ps to 625 ps).
// locked rises after LOCK_CYCLES reference periods in which period and divider stayed
// the same and the wanted bin was inside the range. Until lock, tbin_ps keeps its last
// value (initially TBIN_MAX_PS). The range is the document's; the divider, the lock rule
// and the encoding of the control voltage as a number of picoseconds are this model's.
// timebase is a clock of period tbin_ps. It is not a chip signal: it is the model's
// time base, on which the pixel models of the ring oscillator and the SPAD step, each
// edge standing for one delay of a pixel's own oscillator.
module pll #(
  parameter int unsigned TBIN_MIN_PS = 145,
  parameter int unsigned TBIN_MAX_PS = 625,
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic        ref_clk,
  input  logic [7:0]  div_n,    // loop divider
  output logic [15:0] tbin_ps,  // control voltage proxy: oscillator time bin
  output logic        locked,
  output logic        timebase  // model time-bin clock, period tbin_ps
);
  timeunit 1ns; timeprecision 1ps;

  realtime last_edge, period, last_period;
  int unsigned same, last_div;
  int unsigned want;  // wanted bin, ps

  initial begin
    timebase    = 1'b0;
    tbin_ps     = 16'(TBIN_MAX_PS);
    locked      = 1'b0;
    last_edge   = 0;
    period      = 0;
    last_period = 0;
    same        = 0;
    last_div    = 0;
  end

  always begin
    #((tbin_ps / 2) * 1ps);
    timebase = 1'b1;
    #((tbin_ps - tbin_ps / 2) * 1ps);
    timebase = 1'b0;
  end

  always begin
    @(posedge ref_clk);
    period    = $realtime - last_edge;
    last_edge = $realtime;
    if (div_n != 0 && period > 0) begin
      want = $rtoi((period / 1ps) / (8.0 * real'(div_n)) + 0.5);
      if ($rtoi(period / 1ps + 0.5) == $rtoi(last_period / 1ps + 0.5) &&
          int'(div_n) == last_div && want >= TBIN_MIN_PS && want <= TBIN_MAX_PS) begin
        if (same < LOCK_CYCLES) same = same + 1;
      end else begin
        same = 0;
      end
      if (want < TBIN_MIN_PS)      tbin_ps = 16'(TBIN_MIN_PS);
      else if (want > TBIN_MAX_PS) tbin_ps = 16'(TBIN_MAX_PS);
      else                         tbin_ps = 16'(want);
    end else begin
      same = 0;
    end
    last_period = period;
    last_div    = int'(div_n);
    locked      = (same >= LOCK_CYCLES);
  end
endmodule
