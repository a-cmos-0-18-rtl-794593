// tb_thermo_encoder: exhaustive check of the 8-phase fine-time encoder.
//
// For each ring state m = 0..7 the phase pattern of an 8-phase ring (phase k high when
// (m - k) mod 8 is 0..3) is built here independently and the encoder must return m.
// Invalid all-low / all-high patterns must give 0.
module tb_thermo_encoder;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  logic [7:0] phase;
  logic [2:0] fine;
  int checks = 0, failures = 0;

  thermo_encoder dut (.phase(phase), .fine(fine));

  initial begin
    #1000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      for (int k = 0; k < 8; k++) phase[k] = (((m - k + 8) % 8) < 4);
      #1;
      checks++;
      if (fine !== 3'(m)) begin
        failures++;
        $display("FAIL m=%0d phase=%b fine=%0d", m, phase, fine);
      end
    end
    phase = 8'h00; #1; checks++; if (fine !== 3'd0) failures++;
    phase = 8'hff; #1; checks++; if (fine !== 3'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
