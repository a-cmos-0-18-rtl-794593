// tb_spad_aqr: checks the SPAD / active quench-reset model.
//
// With a 1 ns time bin: v_out is high while gated off and falls after the gate opens;
// a photon makes v_out rise immediately and stay high for the dead time (holdoff_ns
// bins of 1 ns, within one bin); photons inside the dead time are lost; after the dead
// time a new photon fires again; closing the gate holds v_out high.
module tb_spad_aqr;
  timeunit 1ns; timeprecision 1ps;

  logic tbc = 0, photon = 0, v_gate = 0, v_out;
  logic [8:0] holdoff_ns = 9'd20;
  int checks = 0, failures = 0, rises = 0;
  realtime t_rise, t_fall;

  spad_aqr dut (.timebase(tbc), .tbin_ps(16'd1000), .photon(photon), .v_gate(v_gate),
                .holdoff_ns(holdoff_ns), .v_out(v_out));

  always #0.5 tbc = ~tbc;
  always @(posedge v_out) begin rises++; t_rise = $realtime; end

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  task automatic shoot();
    photon = 1; #0.2 photon = 0;
  endtask

  initial begin
    #5.2 check("gated off high", v_out == 1);
    v_gate = 1;
    #3 check("restored", v_out == 0);
    for (int i = 0; i < 6; i++) begin
      automatic int hold = $urandom_range(4, 60);
      realtime t0;
      int r0;
      holdoff_ns = 9'(hold);
      #1.3;
      r0 = rises;
      t0 = $realtime;
      shoot();
      #0.01 check("fires at once", v_out == 1 && rises == r0 + 1 && t_rise == t0);
      #(hold / 2.0) shoot();             // inside dead time: lost
      #0.01 check("dead time", rises == r0 + 1);
      wait (v_out == 0);
      t_fall = $realtime;
      check("dead time length", (t_fall - t0) >= hold - 1 && (t_fall - t0) <= hold + 2);
      if ((t_fall - t0) < hold - 1 || (t_fall - t0) > hold + 2)
        $display("  hold=%0d measured=%0t", hold, t_fall - t0);
    end
    holdoff_ns = 9'd10;
    #2 v_gate = 0;
    #3 check("gate off high", v_out == 1);
    begin
      int r0;
      r0 = rises;
      #2 shoot(); #5;
      check("gated photon lost", rises == r0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
