// tb_vcro: checks the ring-oscillator model's phases, run/freeze and reset.
//
// Runs the ring for a random number of time-bin clock edges, freezes it, and checks that
// the phase pattern is the one of state (edges mod 8), that it holds while frozen, that
// phase 0 rose once per 8 edges, and that reset returns to state 0.
module tb_vcro;
  timeunit 1ns; timeprecision 1ps;

  logic tb_clk = 0, en = 0, rst = 0;
  logic [7:0] phase;
  int checks = 0, failures = 0, p0_rises = 0;

  vcro dut (.timebase(tb_clk), .en(en), .rst(rst), .phase(phase));

  always #0.5 tb_clk = ~tb_clk;
  always @(posedge phase[0]) if (!rst) p0_rises++;

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pattern(int m);
    for (int k = 0; k < 8; k++) pattern[k] = (((m - k + 8) % 8) < 4);
  endfunction

  initial begin
    for (int t = 0; t < 30; t++) begin
      automatic int n = $urandom_range(0, 100);
      #0.1 rst = 1; @(negedge tb_clk); rst = 0; p0_rises = 0;
      checks++; if (phase !== pattern(0)) failures++;
      en = 1;
      repeat (n) @(negedge tb_clk);
      en = 0;
      repeat (3) @(negedge tb_clk);   // frozen
      checks++;
      if (phase !== pattern(n % 8) || p0_rises != n / 8) begin
        failures++;
        $display("FAIL n=%0d phase=%b rises=%0d", n, phase, p0_rises);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
