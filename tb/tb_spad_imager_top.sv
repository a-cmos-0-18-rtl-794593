// tb_spad_imager_top: end-to-end test of the imager, at 8 x 8 pixels with a 4-row
// rolling-shutter band.
//
// The testbench plays the external controller and the scene. The PLL is locked to a
// 23.2 ns reference with divider 20, giving a 145 ps time bin. Photons and STOP edges
// are placed 30 ps after a rising edge of the model's time-bin clock, so a pixel whose
// first photon arrives e_p bins after the gate opened and whose STOP falls at bin S must
// read S - e_p (mod 2048) exactly; the result is also checked against the ideal
// (t_stop - t_photon) / 145 ps within one bin. Frames:
//   3D on band 0, 3D on band 1, 3D on band 0 again (band wraps), one frame with STOP
//   past 2048 bins, a test-mode frame with the external START, and a 2D photon-counting
//   frame with all rows armed.
// Each frame is read out row by row through the row decoder and the serialiser and
// every bit of SOUT is compared with a reference memory kept here; each row must take
// NC*11 clocks. Mechanisms counted (each must occur): PLL lock, band advance and wrap,
// unarmed rows keeping their data, a missing photon, a second photon ignored, a photon
// after STOP ignored, a photon while the gate is closed lost, a photon in the dead time
// lost, the counter wrap, and all three modes.
module tb_spad_imager_top;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  localparam int NR = 8, NC = 8, AR = 4;
  localparam int W  = CODE_BITS;

  logic clk = 0, rst_n = 1, tdc_rst = 0, tgate_n = 1, start_ext = 0, stop = 1, store = 0;
  mode_e mode = MODE_3D;
  logic [8:0]  holdoff_ns = 9'd4;
  logic [NC-1:0] photon [NR];
  logic ref_clk = 0;
  logic [7:0] pll_div = 8'd20;
  logic pll_locked;
  logic [15:0] tbin_ps;
  logic rs_init = 0, rs_advance = 0, rs_on = 1, row_sin = 0, row_shift = 0, ser_load = 0;
  logic sout, sout_valid, ser_busy;

  spad_imager_top #(.NR(NR), .NC(NC), .ACTIVE_ROWS(AR)) dut (.*);

  int checks = 0, failures = 0;
  int exp_mem [NR][NC];
  int ph1 [NR][NC];       // bin of the first photon, -1: none
  int ph2 [NR][NC];       // bin of an extra photon, -1: none
  int edge_no;            // time-bin clock edges since the gate opened
  realtime t_ph [NR][NC];
  realtime t_stop;
  logic [NR-1:0] band;    // rows armed in this frame

  // mechanisms
  int n_lock, n_advance, n_wrap, n_kept, n_missing, n_second, n_late, n_gated, n_dead;
  int n_cwrap, n_3d, n_test, n_2d;

  always #2.5 clk = ~clk;
  always #11.6 ref_clk = ~ref_clk;

  initial begin
    #5ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // wait for the next time-bin edge, then 30 ps
  task automatic next_bin();
    @(posedge dut.timebase);
    #0.03;
    edge_no++;
  endtask

  task automatic fire_photons();
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        photon[r][c] = (ph1[r][c] == edge_no) || (ph2[r][c] == edge_no);
        if (ph1[r][c] == edge_no) t_ph[r][c] = $realtime;
      end
  endtask

  task automatic clear_tdcs();
    @(negedge clk) tdc_rst = 1;
    @(negedge clk) tdc_rst = 0;
  endtask

  task automatic do_store();
    #2 store = 1; #2 store = 0;
    for (int r = 0; r < NR; r++) if (!band[r]) n_kept++;
  endtask

  // 3D (or test) frame: STOP falls at bin s; test mode STARTs at bin e_start
  task automatic frame_tof(int s, int e_start);
    int code;
    real err;
    band = rs_on ? dut.row_en : '1;
    clear_tdcs();
    tgate_n = 0;
    edge_no = 0;
    while (edge_no < s + 6) begin
      next_bin();
      fire_photons();
      if (edge_no == e_start && mode == MODE_TEST) start_ext = 1;
      if (edge_no == e_start + 50) start_ext = 0;
      if (edge_no == s) begin stop = 0; t_stop = $realtime; end
    end
    tgate_n = 1;
    foreach (photon[r]) photon[r] = '0;
    #5 stop = 1;
    do_store();
    for (int r = 0; r < NR; r++) begin
      if (!band[r]) continue;
      for (int c = 0; c < NC; c++) begin
        if (mode == MODE_TEST) code = s - e_start;
        else if (ph1[r][c] < 0 || ph1[r][c] > s) code = 0;
        else begin
          code = s - ph1[r][c];
          // against the ideal time difference, within one bin
          err = (t_stop - t_ph[r][c]) / (tbin_ps * 1ps) - real'(code);
          check("ideal", err <= 1.0 && err >= -1.0);
        end
        if (mode != MODE_TEST) begin
          if (ph1[r][c] < 0) n_missing++;
          if (ph1[r][c] > s) n_late++;
          if (ph2[r][c] >= 0 && ph1[r][c] <= s) n_second++;
        end
        if (code >= 2048) n_cwrap++;
        exp_mem[r][c] = code % 2048;
      end
    end
    if (mode == MODE_TEST) n_test++; else n_3d++;
  endtask

  // 2D frame: every row armed; pixel (r,c) sees cnt[r][c] photons 40 bins apart
  task automatic frame_2d();
    int cnt [NR][NC];
    mode = MODE_2D;
    rs_on = 0;
    #1 band = '1;
    clear_tdcs();
    edge_no = 0;
    // a photon while the gate is still closed: lost
    photon[1][1] = 1; #1 photon[1][1] = 0; n_gated++;
    tgate_n = 0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) cnt[r][c] = $urandom_range(0, 12);
    while (edge_no < 40 * 13 + 20) begin
      next_bin();
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++) begin
          int k = edge_no - 10 - (r + c) % 5;
          photon[r][c] = (k >= 0 && k % 40 == 0 && k / 40 < cnt[r][c]) ||
                         // one photon 5 bins into the dead time of pixel (0,0)
                         (r == 0 && c == 0 && cnt[0][0] > 0 && k == 5);
        end
    end
    if (cnt[0][0] > 0) n_dead++;
    foreach (photon[r]) photon[r] = '0;
    next_bin();
    tgate_n = 1;
    do_store();
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) exp_mem[r][c] = cnt[r][c] << 3;
    n_2d++;
    rs_on = 1;
    mode = MODE_3D;
  endtask

  task automatic readout();
    for (int r = 0; r < NR; r++) begin
      int bits, cycles, bad;
      @(negedge clk) row_sin = (r == 0); row_shift = 1;
      @(negedge clk) row_sin = 0; row_shift = 0;
      check("one row selected", dut.row_sel == (NR'(1) << r));
      ser_load = 1;
      @(negedge clk) ser_load = 0;
      bits = 0; cycles = 0; bad = 0;
      while (bits < NC * W && cycles < NC * W + 10) begin
        @(posedge clk); #0.1;
        cycles++;
        if (sout_valid) begin
          if (sout !== 1'((exp_mem[r][bits / W] >> (W - 1 - bits % W)) & 1)) bad++;
          bits++;
        end
      end
      check($sformatf("row %0d data", r), bad == 0);
      check($sformatf("row %0d length", r), bits == NC * W && cycles == NC * W);
      if (bad != 0)
        for (int c = 0; c < NC; c++) $display("  r%0d c%0d expected %0d", r, c, exp_mem[r][c]);
    end
    @(negedge clk) row_shift = 1;          // token leaves the last row
    @(negedge clk) row_shift = 0;
  endtask

  task automatic plan_photons(int s, bit extras);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        int pick = $urandom_range(0, 9);
        ph2[r][c] = -1;
        if (pick == 0)      ph1[r][c] = -1;                    // no photon
        else if (pick == 1 && extras) ph1[r][c] = s + 3;       // after STOP
        else                ph1[r][c] = $urandom_range(4, s - 1);
        if (pick == 2 && ph1[r][c] >= 0 && ph1[r][c] + 40 < s) ph2[r][c] = ph1[r][c] + 40;
      end
    if (s > 2048) ph1[0][0] = 10;          // longer than the 11-bit range: wraps
  endtask

  initial begin
    foreach (photon[r]) photon[r] = '0;
    foreach (exp_mem[r, c]) exp_mem[r][c] = 0;
    #1 rst_n = 0; #20 rst_n = 1;
    wait (pll_locked);
    n_lock++;
    check("time bin 145 ps", tbin_ps == 16'd145);
    @(negedge clk) rs_init = 1; @(negedge clk) rs_init = 0;
    // 3D, band 0
    plan_photons(1900, 1);
    frame_tof(1900, 0);
    readout();
    // 3D, band 1
    @(negedge clk) rs_advance = 1; @(negedge clk) rs_advance = 0; n_advance++;
    plan_photons(1000, 1);
    frame_tof(1000, 0);
    readout();
    // 3D, band 0 again, STOP after 2100 bins: early photons wrap
    @(negedge clk) rs_advance = 1; @(negedge clk) rs_advance = 0; n_advance++;
    if (dut.row_en[0]) n_wrap++;
    plan_photons(2100, 0);
    frame_tof(2100, 0);
    readout();
    // test mode, band 0
    mode = MODE_TEST;
    plan_photons(700, 0);
    frame_tof(700, 123);
    mode = MODE_3D;
    readout();
    // 2D
    frame_2d();
    readout();

    check("mechanism: PLL lock",           n_lock > 0);
    check("mechanism: band advance",       n_advance > 0);
    check("mechanism: band wrap",          n_wrap > 0);
    check("mechanism: unarmed rows kept",  n_kept > 0);
    check("mechanism: missing photon",     n_missing > 0);
    check("mechanism: second photon",      n_second > 0);
    check("mechanism: photon after STOP",  n_late > 0);
    check("mechanism: gated-off photon",   n_gated > 0);
    check("mechanism: dead-time photon",   n_dead > 0);
    check("mechanism: counter wrap",       n_cwrap > 0);
    check("mechanism: 3D mode",            n_3d > 0);
    check("mechanism: test mode",          n_test > 0);
    check("mechanism: 2D mode",            n_2d > 0);
    $display("mechanisms: lock=%0d advance=%0d wrap=%0d kept=%0d missing=%0d second=%0d late=%0d gated=%0d dead=%0d cwrap=%0d 3d=%0d test=%0d 2d=%0d",
             n_lock, n_advance, n_wrap, n_kept, n_missing, n_second, n_late, n_gated,
             n_dead, n_cwrap, n_3d, n_test, n_2d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
