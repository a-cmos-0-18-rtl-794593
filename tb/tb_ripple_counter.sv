// tb_ripple_counter: checks the 8-bit ripple counter against a reference count.
//
// Random bursts of rising edges, with the toggle enable randomly on or off per edge,
// are counted by a reference model; the counter must match after each burst, wrap at
// 256, and clear asynchronously.
module tb_ripple_counter;
  timeunit 1ns; timeprecision 1ps;

  logic clk_in = 0, tog_en = 1, clr = 0;
  logic [7:0] q;
  int unsigned ref_cnt = 0;
  int checks = 0, failures = 0;

  ripple_counter #(.W(8)) dut (.clk_in(clk_in), .tog_en(tog_en), .clr(clr), .q(q));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #2 clk_in = 1;
    #2 clk_in = 0;
  endtask

  initial begin
    #1 clr = 1;
    #5 clr = 0;
    #5;
    checks++; if (q !== 8'd0) failures++;
    for (int burst = 0; burst < 20; burst++) begin
      automatic int n = $urandom_range(1, 60);
      for (int i = 0; i < n; i++) begin
        tog_en = ($urandom_range(0, 3) != 0);
        pulse();
        if (tog_en) ref_cnt = (ref_cnt + 1) % 256;
      end
      #5;
      checks++;
      if (q !== 8'(ref_cnt)) begin
        failures++;
        $display("FAIL burst %0d q=%0d expected %0d", burst, q, ref_cnt);
      end
    end
    // wrap-around
    tog_en = 1;
    clr = 1; #2 clr = 0; ref_cnt = 0;
    repeat (260) pulse();
    #5 checks++;
    if (q !== 8'd4) begin failures++; $display("FAIL wrap q=%0d", q); end
    // asynchronous clear
    clr = 1; #1;
    checks++; if (q !== 8'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
