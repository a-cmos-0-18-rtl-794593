// tb_pixel_out_buffer: checks that the pixel drives its column only when selected.
module tb_pixel_out_buffer;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  logic sel = 0;
  code_t d = '0, bus;
  int checks = 0, failures = 0;

  pixel_out_buffer dut (.*);

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      d   = code_t'($urandom);
      sel = $urandom_range(0, 1);
      #1 checks++;
      if (bus !== (sel ? d : code_t'(0))) begin
        failures++;
        $display("FAIL sel=%b d=%0d bus=%0d", sel, d, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
