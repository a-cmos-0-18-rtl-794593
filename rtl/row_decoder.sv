// row_decoder: serial-in parallel-out shift register that selects the row being read.
//
// A token entered at sin moves one row down on every clock with shift high; q[r] high
// connects row r's pixel buffers to the column buses. Compared with a gate-based
// decoder it needs no address logic and no two decoded outputs overlap while the token
// moves. To read a frame the controller shifts in a single 1 and then advances it once
// per row. rst_n clears the register asynchronously (no row selected). The shift
// register itself is the document's choice; reset and clocking are this design's.
// An assertion checks that at most one row is ever selected.
module row_decoder #(
  parameter int unsigned NR = 64   // rows
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sin,     // serial input (the token)
  input  logic          shift,   // advance one row
  output logic [NR-1:0] q        // row selects
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[NR-2:0], sin};

  a_one_row : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(q))
    else $error("row_decoder: more than one row selected");
endmodule
