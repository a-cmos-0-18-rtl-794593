// tb_row_decoder: checks the shift-register row selector.
//
// A single token is shifted in and walked through all rows; after k+1 shifts exactly row
// k must be selected. Clocks with shift low must hold the selection, and the token must
// leave after the last row.
module tb_row_decoder;
  timeunit 1ns; timeprecision 1ps;

  localparam int NR = 64;
  logic clk = 0, rst_n = 1, sin = 0, shift = 0;
  logic [NR-1:0] q;
  int checks = 0, failures = 0;

  row_decoder #(.NR(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100us;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    checks++; if (q !== '0) failures++;
    @(negedge clk) sin = 1; shift = 1;
    @(negedge clk) sin = 0;
    for (int k = 0; k < NR; k++) begin
      checks++;
      if (q !== (NR'(1) << k)) begin
        failures++;
        $display("FAIL row %0d q=%h", k, q);
      end
      shift = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++; if (q !== (NR'(1) << k)) failures++;
      shift = 1;
      @(negedge clk);
    end
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
