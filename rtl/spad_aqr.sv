// spad_aqr: behavioural model of the SPAD with time-gated active quenching/reset.
//
// Behavioural model: the real part is a 12 um SPAD and a transistor-level active
// quench/reset circuit. The model follows the document's description of its behaviour:
// - v_gate low disables the detector and holds v_out high;
// - after v_gate rises the detector is restored and v_out falls;
// - a photon hitting the armed detector makes v_out rise at once (avalanche, quench);
//   v_out stays high for the dead time, set by holdoff_ns (the V_hold-off control,
//   4 ns to 500 ns in the document), then the detector re-arms;
// - photons during the dead time, the restore or while gated off are lost.
// Only the photon edge is asynchronous. Gate, restore and dead time are timed on the
// shared model time-bin clock timebase (period tbin_ps): the gate is sampled once per bin,
// so v_out follows it one bin late, and the dead time lasts holdoff_ns*1000/tbin_ps bins
// (at least 1). These resolutions and the encoding of the hold-off voltage in ns are this
// model's choices.
module spad_aqr (
  input  logic        timebase,    // model time-bin clock
  input  logic [15:0] tbin_ps,     // its period, picoseconds
  input  logic        photon,      // rising edge = photon reaching the diode
  input  logic        v_gate,      // 1: detector enabled (time gate open)
  input  logic [8:0]  holdoff_ns,  // dead time, nanoseconds
  output logic        v_out        // detector output pulse
);
  timeunit 1ns; timeprecision 1ps;

  logic        gate_q;     // gate as seen by the restore circuit
  logic        fired;      // avalanche in progress / dead time
  logic        rearm;      // end of dead time
  logic [11:0] dead_cnt;   // bins of dead time elapsed
  logic [11:0] dead_bins;  // bins of dead time wanted

  always_comb begin
    dead_bins = 12'((32'(holdoff_ns) * 1000) / ((tbin_ps == 0) ? 32'd1 : 32'(tbin_ps)));
    if (dead_bins == 0) dead_bins = 12'd1;
  end

  // avalanche: asynchronous on the photon edge, only when armed
  always_ff @(posedge photon or posedge rearm)
    if (rearm)                     fired <= 1'b0;
    else if (gate_q && v_gate)     fired <= 1'b1;

  // gate sampling, dead-time timer
  always_ff @(posedge timebase) begin
    gate_q <= v_gate;
    rearm  <= 1'b0;
    if (fired && !rearm) begin
      if (dead_cnt + 1'b1 >= dead_bins) begin
        rearm    <= 1'b1;
        dead_cnt <= '0;
      end else begin
        dead_cnt <= dead_cnt + 1'b1;
      end
    end else begin
      dead_cnt <= '0;
    end
  end

  assign v_out = ~gate_q | fired;
endmodule
