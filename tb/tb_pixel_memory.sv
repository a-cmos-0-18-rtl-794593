// tb_pixel_memory: checks the 11-bit in-pixel store.
//
// Random codes are stored on the rising edge of store when the write enable is high and
// must be held unchanged when it is low or when the input changes between pulses; reset
// clears the memory.
module tb_pixel_memory;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  logic rst_n = 1, store = 0, we = 1;
  code_t d = '0, q, expect_q;
  int checks = 0, failures = 0;

  pixel_memory dut (.*);

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    expect_q = '0;
    checks++; if (q !== expect_q) failures++;
    for (int i = 0; i < 40; i++) begin
      d  = code_t'($urandom);
      we = ($urandom_range(0, 2) != 0);
      #1 store = 1; #1 store = 0;
      if (we) expect_q = d;
      d = code_t'($urandom);               // input moves after the pulse
      #1 checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL i=%0d q=%0d expected %0d", i, q, expect_q);
      end
    end
    rst_n = 0; #1 checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
