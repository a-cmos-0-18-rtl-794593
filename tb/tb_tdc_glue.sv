// tb_tdc_glue: checks the start/stop glue of the pixel TDC in all three modes.
//
// Scenarios: normal 3D start then STOP fall; narrow and wide SPAD pulses; a second
// photon; a photon after STOP (overlap); no photon at all; gate closed; row disabled;
// test mode with the external START (SPAD ignored); 2D mode counter control.
// The oscillator enable is compared with the interval expected for each case.
module tb_tdc_glue;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  mode_e mode = MODE_3D;
  logic tdc_rst = 0, row_en = 1, gate_en = 1, spad_out = 0, start_ext = 0, stop = 1;
  logic vcro_en, count_2d, cnt_en;
  int checks = 0, failures = 0;

  tdc_glue dut (.*);

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %t", what, got, exp, $time);
    end
  endtask

  task automatic clear();
    stop = 1; spad_out = 0; start_ext = 0;
    #1 tdc_rst = 1; #1 tdc_rst = 0; #1;
  endtask

  initial begin
    // 1: 3D, photon then STOP falls
    clear();
    check("idle", vcro_en, 0);
    #5 spad_out = 1; #1 check("started", vcro_en, 1);
    #2 spad_out = 0;                       // narrow pulse
    #10 check("still running", vcro_en, 1);
    spad_out = 1; #1 spad_out = 0;         // second photon, no effect
    check("second photon", vcro_en, 1);
    #5 stop = 0; #1 check("stopped", vcro_en, 0);
    stop = 1; #1 check("stop rising", vcro_en, 0);
    // 2: STOP falls first, photon afterwards (overlap / late start)
    clear();
    stop = 0; #2 stop = 1;
    #2 spad_out = 1; #1 check("late start ignored", vcro_en, 0);
    #50 spad_out = 0;                      // wide pulse
    // 3: no photon
    clear();
    #20 stop = 0; #1 check("no start", vcro_en, 0);
    // 4: gate closed
    clear();
    gate_en = 0; #1 spad_out = 1; #1 check("gate closed", vcro_en, 0);
    spad_out = 0; gate_en = 1;
    // 5: row not activated
    clear();
    row_en = 0; #1 spad_out = 1; #1 check("row disabled", vcro_en, 0);
    spad_out = 0; row_en = 1;
    // 6: test mode: START from outside, SPAD ignored, gate ignored
    mode = MODE_TEST;
    clear();
    gate_en = 0;
    spad_out = 1; #1 check("test ignores spad", vcro_en, 0);
    spad_out = 0;
    start_ext = 1; #1 check("test start", vcro_en, 1);
    start_ext = 0; #10 stop = 0; #1 check("test stop", vcro_en, 0);
    check("test count_2d", count_2d, 0);
    check("test cnt_en", cnt_en, 1);
    gate_en = 1;
    // 7: 2D mode
    mode = MODE_2D;
    clear();
    spad_out = 1; #1 check("2D no vcro", vcro_en, 0);
    spad_out = 0;
    check("2D count_2d", count_2d, 1);
    check("2D cnt_en", cnt_en, 1);
    gate_en = 0; #1 check("2D gate off", cnt_en, 0);
    gate_en = 1; row_en = 0; #1 check("2D row off", cnt_en, 0);
    row_en = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
