// tb_tdc: checks the 11-bit TDC (ring model, encoder, ripple counter) end to end.
//
// 3D: the oscillator is enabled for a random number N of time-bin clock edges (0..2047);
// the code must equal N. Longer runs must wrap modulo 2048. 2D: SPAD pulses on event_in
// with the counter enabled must give code = count << 3, and pulses while disabled must
// not count.
module tb_tdc;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  logic tbc = 0, rst = 0, vcro_en = 0, count_2d = 0, cnt_en = 1, event_in = 0;
  code_t code;
  int checks = 0, failures = 0;

  tdc dut (.rst(rst), .vcro_en(vcro_en), .count_2d(count_2d), .cnt_en(cnt_en),
           .event_in(event_in), .timebase(tbc), .code(code));

  always #0.5 tbc = ~tbc;

  initial begin
    #2ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    @(negedge tbc) rst = 1; @(negedge tbc) rst = 0;
    vcro_en = 1;
    repeat (n) @(negedge tbc);
    vcro_en = 0;
    repeat (2) @(negedge tbc);
    checks++;
    if (code !== code_t'(n % 2048)) begin
      failures++;
      $display("FAIL n=%0d code=%0d", n, code);
    end
  endtask

  initial begin
    run(0); run(1); run(7); run(8); run(9); run(2047);
    for (int i = 0; i < 20; i++) run($urandom_range(0, 2047));
    run(2048 + 5);                         // wraps
    // 2D photon counting
    count_2d = 1;
    @(negedge tbc) rst = 1; @(negedge tbc) rst = 0;
    begin
      automatic int n = $urandom_range(1, 255);
      repeat (n) begin #2 event_in = 1; #2 event_in = 0; end
      cnt_en = 0;
      repeat (7) begin #2 event_in = 1; #2 event_in = 0; end
      cnt_en = 1;
      #5 checks++;
      if (code !== code_t'(n << 3)) begin
        failures++;
        $display("FAIL 2D n=%0d code=%0d", n, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
