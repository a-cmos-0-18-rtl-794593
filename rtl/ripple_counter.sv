// ripple_counter: asynchronous 8-bit up counter of the pixel TDC.
//
// A chain of toggle flip-flops: bit 0 toggles on each rising edge of clk_in while
// tog_en is high, and every further bit toggles on the falling edge of the bit below
// it, so the count rises by one per clk_in edge with no global clock. In 3D and test
// mode clk_in is oscillator phase 0 and the counter holds the number of completed
// oscillator periods (the coarse part of the time code); in 2D mode clk_in is the SPAD
// output and the counter holds the photon count. The counter wraps at 2^W. clr clears
// it asynchronously and dominates. That the counter is an 8-bit ripple counter is the
// document's; the enable on the first stage and the wrap are this design's choices.
module ripple_counter #(
  parameter int unsigned W = 8     // counter bits
) (
  input  logic         clk_in,     // counted edges (rising)
  input  logic         tog_en,     // first stage toggles only while high
  input  logic         clr,        // asynchronous clear, active high
  output logic [W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  // each stage is a separate flip-flop with its own clock
  for (genvar i = 0; i < W; i++) begin : g_stage
    logic b;
    if (i == 0) begin : g_first
      always_ff @(posedge clk_in or posedge clr)
        if (clr)         b <= 1'b0;
        else if (tog_en) b <= ~b;
    end else begin : g_next
      always_ff @(negedge g_stage[i-1].b or posedge clr)
        if (clr) b <= 1'b0;
        else     b <= ~b;
    end
    assign q[i] = b;
  end
endmodule
