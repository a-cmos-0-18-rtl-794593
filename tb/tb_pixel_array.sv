// tb_pixel_array: checks a 3 x 4 pixel array: shared START/STOP, per-row arming and
// per-row reading onto the shared column buses.
//
// Time bin 1 ns (time-bin clock rising at k + 0.5 ns); photons reach pixel (r, c) at
// k + 0.2 ns, so a pixel's code is the whole number of ns from its photon to the fall of
// STOP. Rows 0 and 2 are armed, row 1 is not and must read 0. Each row is then selected
// in turn and every column bus must carry that row's codes; with no row selected the
// buses must be 0.
module tb_pixel_array;
  timeunit 1ns; timeprecision 1ps;
  import spad_pkg::*;

  localparam int NR = 3, NC = 4;
  mode_e mode = MODE_3D;
  logic rst_n = 1, tdc_rst = 0, gate_en = 0, start_ext = 0, stop = 1, store = 0, tbc = 0;
  logic [8:0] holdoff_ns = 9'd10;
  logic [NR-1:0] row_en = 3'b101, row_sel = '0;
  logic [NC-1:0] photon [NR];
  code_t col_bus [NC];
  int delay_ns [NR][NC];
  int checks = 0, failures = 0;

  pixel_array #(.NR(NR), .NC(NC)) dut (.mode(mode), .rst_n(rst_n), .tdc_rst(tdc_rst),
    .gate_en(gate_en), .start_ext(start_ext), .stop(stop), .store(store),
    .holdoff_ns(holdoff_ns), .tbin_ps(16'd1000), .timebase(tbc), .row_en(row_en),
    .row_sel(row_sel), .photon(photon), .col_bus(col_bus));

  always #0.5 tbc = ~tbc;

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (photon[r]) photon[r] = '0;
    #1 rst_n = 0; #1 rst_n = 1;
    #1 tdc_rst = 1; #1 tdc_rst = 0;
    gate_en = 1;
    #5.2;                                  // now at 10.2 ns
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) delay_ns[r][c] = $urandom_range(1, 300);
    // photon of pixel (r,c) at 10.2 + 300 - delay; STOP at 310.2
    for (int t = 300; t > 0; t--) begin
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++) photon[r][c] = (delay_ns[r][c] == t);
      #1;
    end
    stop = 0;
    foreach (photon[r]) photon[r] = '0;
    #2 store = 1; #1 store = 0; gate_en = 0;
    #1;
    for (int c = 0; c < NC; c++) begin
      checks++; if (col_bus[c] !== '0) failures++;
    end
    for (int r = 0; r < NR; r++) begin
      row_sel = NR'(1) << r;
      #1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (col_bus[c] !== (row_en[r] ? code_t'(delay_ns[r][c]) : code_t'(0))) begin
          failures++;
          $display("FAIL r%0d c%0d: %0d expected %0d", r, c, col_bus[c], delay_ns[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
