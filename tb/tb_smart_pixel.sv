// tb_smart_pixel: frame-level checks of one 2D/3D pixel.
//
// Time bin 1 ns (time-bin clock rising at k + 0.5 ns). Photons and STOP edges are put at
// k + 0.2 ns, so the expected code of a 3D or test conversion is exactly the whole
// number of nanoseconds from START to the falling edge of STOP. Checked: 3D frames at
// random delays, a missing photon (code 0), test mode with the external START, 2D
// photon counting with photons spaced beyond the dead time, photons lost in the dead
// time, a disabled row keeping its old value, and the output buffer only driving when
// the row is selected.
module tb_smart_pixel;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  mode_e mode = MODE_3D;
  logic rst_n = 1, tdc_rst = 0, row_en = 1, row_sel = 0, gate_en = 0, photon = 0;
  logic start_ext = 0, stop = 1, store = 0, tbc = 0;
  logic [8:0] holdoff_ns = 9'd10;
  code_t col_out;
  int checks = 0, failures = 0;

  smart_pixel dut (.mode(mode), .rst_n(rst_n), .tdc_rst(tdc_rst), .row_en(row_en),
                   .row_sel(row_sel), .gate_en(gate_en), .photon(photon),
                   .start_ext(start_ext), .stop(stop), .store(store),
                   .holdoff_ns(holdoff_ns), .tbin_ps(16'd1000), .timebase(tbc),
                   .col_out(col_out));

  always #0.5 tbc = ~tbc;

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // move to the next k + 0.2 ns
  task automatic align();
    realtime t;
    t = $realtime;
    #($floor(t - 0.2) + 1.2 - t);
  endtask

  task automatic begin_frame();
    stop = 1; gate_en = 0;
    #3 tdc_rst = 1; #2 tdc_rst = 0;
    gate_en = 1;
    #5;                                    // restore
    align();
  endtask

  task automatic end_frame(int code_exp, string what);
    #2 store = 1; #1 store = 0;
    gate_en = 0;
    #1 checks++;
    if (col_out !== '0) begin failures++; $display("FAIL %s: drives unselected", what); end
    row_sel = 1;
    #1 checks++;
    if (col_out !== code_t'(code_exp)) begin
      failures++;
      $display("FAIL %s: code %0d expected %0d", what, col_out, code_exp);
    end
    row_sel = 0;
  endtask

  task automatic frame_3d(int d);
    begin_frame();
    #3 photon = 1; #0.1 photon = 0;
    #(d - 0.1) stop = 0;
    end_frame(d, "3D");
  endtask

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    align();
    frame_3d(1);
    frame_3d(8);
    frame_3d(300);
    for (int i = 0; i < 8; i++) frame_3d($urandom_range(1, 2047));
    // missing photon
    begin_frame();
    #200 stop = 0;
    end_frame(0, "no photon");
    // test mode: external START, photons ignored
    mode = MODE_TEST;
    begin_frame();
    #2 photon = 1; #0.1 photon = 0;
    #0.9 start_ext = 1; #30 start_ext = 0;   // wide START
    #70 stop = 0;
    end_frame(100, "test");
    // 2D photon counting, 1 photon every 20 ns, 10 ns dead time
    mode = MODE_2D;
    begin_frame();
    for (int i = 0; i < 37; i++) begin
      #19.9 photon = 1; #0.1 photon = 0;
      if (i == 5) begin #3 photon = 1; #0.1 photon = 0; end   // in dead time: lost
    end
    end_frame(37 << 3, "2D");
    // row not activated: memory keeps the previous frame
    row_en = 0;
    begin_frame();
    #5 photon = 1; #0.1 photon = 0;
    end_frame(37 << 3, "row off");
    row_en = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
