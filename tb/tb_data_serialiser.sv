// tb_data_serialiser: checks the row serialiser's bit order, length and timing.
//
// Random column codes are loaded; the bits seen on sout while sout_valid is high must be
// column 0 first, MSB first, exactly NC*W of them on consecutive clocks, the first on the
// clock after the one that captures the load. A load while busy must be ignored. Two rows in a row.
module tb_data_serialiser;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  localparam int NC = 64, W = 11;
  logic clk = 0, rst_n = 1, load = 0;
  logic [W-1:0] col_bus [NC];
  logic sout, sout_valid, busy;
  int checks = 0, failures = 0;

  data_serialiser #(.NC(NC), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_row();
    logic [W-1:0] sent [NC];
    int nbits, first_cycle, cyc, bad;
    foreach (col_bus[c]) begin col_bus[c] = W'($urandom); sent[c] = col_bus[c]; end
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    foreach (col_bus[c]) col_bus[c] = W'($urandom);   // bus may change after load
    nbits = 0; cyc = 0; first_cycle = -1; bad = 0;
    while (nbits < NC * W && cyc < NC * W + 20) begin
      @(posedge clk); #1;
      cyc++;
      if (cyc == 100) begin load = 1; end           // ignored while busy
      if (cyc == 101) begin load = 0; end
      if (sout_valid) begin
        if (first_cycle < 0) first_cycle = cyc;
        if (sout !== sent[nbits / W][W - 1 - nbits % W]) bad++;
        nbits++;
      end
    end
    @(posedge clk); #1;
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d wrong bits", bad); end
    checks++; if (nbits != NC * W) begin failures++; $display("FAIL %0d bits", nbits); end
    checks++; if (first_cycle != 1) begin failures++; $display("FAIL first bit at %0d", first_cycle); end
    checks++; if (cyc != first_cycle + NC * W - 1) begin failures++; $display("FAIL gaps"); end
    checks++; if (sout_valid || busy) begin failures++; $display("FAIL not idle"); end
  endtask

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    one_row();
    one_row();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
