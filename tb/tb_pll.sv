// tb_pll: checks the PLL model: time bin = T_ref / (8 * div), lock, range limits and
// the period of the time-bin clock it produces.
module tb_pll;
  timeunit 1ns; timeprecision 1ps;

  logic ref_clk = 0;
  logic [7:0] div_n = 8'd20;
  logic [15:0] tbin_ps;
  logic locked, timebase;
  realtime t_ref_half = 11.6;   // 23.2 ns reference
  int checks = 0, failures = 0;

  pll dut (.*);

  always #(t_ref_half) ref_clk = ~ref_clk;

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s tbin=%0d locked=%b", what, tbin_ps, locked); end
  endtask

  task automatic expect_bin(int unsigned bin);
    realtime t0, t1;
    repeat (8) @(posedge ref_clk);
    #1;
    check("locked", locked == 1);
    check("bin", tbin_ps == 16'(bin));
    @(posedge timebase) t0 = $realtime;
    repeat (100) @(posedge timebase);
    t1 = $realtime;
    check("timebase period", (t1 - t0) > (bin * 100 - 2) * 1ps && (t1 - t0) < (bin * 100 + 2) * 1ps);
  endtask

  initial begin
    expect_bin(145);                       // 23.2 ns / (8 * 20)
    div_n = 8'd5;                          // 23.2 ns / 40 = 580 ps
    @(posedge ref_clk); #1 check("relock", locked == 0);
    expect_bin(580);
    div_n = 8'd2;                          // 1450 ps: out of range
    repeat (8) @(posedge ref_clk);
    #1 check("no lock out of range", locked == 0 && tbin_ps == 16'd625);
    div_n = 8'd40;                         // 72.5 ps: below range
    repeat (8) @(posedge ref_clk);
    #1 check("no lock below range", locked == 0 && tbin_ps == 16'd145);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
