// tb_rolling_shutter: checks the rolling activation band of TDC rows.
//
// After init rows 0..7 are armed; each advance moves the band by 8 rows and wraps after
// the last band; rs_on = 0 arms every row.
module tb_rolling_shutter;
  timeunit 1ns; timeprecision 1ps;

  localparam int NR = 64, AR = 8;
  logic clk = 0, rst_n = 1, init = 0, advance = 0, rs_on = 1;
  logic [NR-1:0] row_en, expect_en;
  int checks = 0, failures = 0;

  rolling_shutter #(.NR(NR), .ACTIVE_ROWS(AR)) dut (.*);

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
    @(negedge clk) init = 1; @(negedge clk) init = 0;
    for (int b = 0; b < 2 * NR / AR + 1; b++) begin
      expect_en = '0;
      for (int r = 0; r < NR; r++)
        if (r / AR == b % (NR / AR)) expect_en[r] = 1'b1;
      checks++;
      if (row_en !== expect_en) begin
        failures++;
        $display("FAIL band %0d row_en=%h", b, row_en);
      end
      @(negedge clk) advance = 1; @(negedge clk) advance = 0;
    end
    rs_on = 0; #1 checks++; if (row_en !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
