// data_serialiser: sends the selected row out on the single serial pin SOUT.
//
// A load pulse (accepted while idle) captures the NC column buses, column 0 first and
// each code most significant bit first, into a shift register. From the next clock,
// one bit per clock appears on sout, with sout_valid high, for NC*W clocks; busy is
// high from the load until the last bit. A 64-column row of 11-bit codes takes 704
// clocks. The serial readout of each frame through SOUT is the document's; the bit
// order, the load/valid handshake and the registered output are this design's.
module data_serialiser
  import spad_pkg::*;
#(
  parameter int unsigned NC = COLS,       // columns per row
  parameter int unsigned W  = CODE_BITS   // bits per pixel
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,           // capture the column buses
  input  logic [W-1:0] col_bus [NC],
  output logic  sout,
  output logic  sout_valid,
  output logic  busy
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NBITS = NC * W;

  logic [NBITS-1:0]         sreg;
  logic [$clog2(NBITS+1)-1:0] left;   // bits still to send
  logic [NBITS-1:0]         flat;

  always_comb begin
    for (int c = 0; c < NC; c++)
      flat[NBITS-1-c*W -: W] = col_bus[c];
  end

  assign busy = (left != 0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sreg       <= '0;
      left       <= '0;
      sout       <= 1'b0;
      sout_valid <= 1'b0;
    end else if (load && !busy) begin
      sreg       <= flat;
      left       <= ($bits(left))'(NBITS);
      sout_valid <= 1'b0;
    end else if (busy) begin
      sout       <= sreg[NBITS-1];
      sreg       <= {sreg[NBITS-2:0], 1'b0};
      left       <= left - 1'b1;
      sout_valid <= 1'b1;
    end else begin
      sout_valid <= 1'b0;
    end
endmodule
