// tdc: in-pixel 11-bit time-to-digital converter.
//
// A voltage-controlled ring oscillator (VCRO), a thermometric encoder and an 8-bit
// ripple counter. While vcro_en is high the oscillator runs; the ripple counter counts
// its full periods on phase 0 (coarse part, code[10:3]) and the encoder turns the frozen
// phases into the bins elapsed inside the last period (fine part, code[2:0]). With a
// time bin of 145 ps the 2048 codes span 297 ns. In 2D mode (count_2d) the counter's
// clock is the SPAD output instead, so code[10:3] is the photon count and code[2:0] is 0
// because the oscillator stays in reset. rst clears counter and oscillator.
// The structure and bit split are the document's; the clock multiplexer for 2D mode
// and placing the photon count in the upper bits are this design's choices.
module tdc
  import spad_pkg::*;
(
  input  logic        rst,       // clear, active high
  input  logic        vcro_en,   // oscillator runs (START seen, STOP not yet)
  input  logic        count_2d,  // 2D mode: count event_in
  input  logic        cnt_en,    // counter first-stage enable
  input  logic        event_in,  // SPAD output
  input  logic        timebase,  // model time-bin clock (see vcro)
  output code_t       code
);
  timeunit 1ns; timeprecision 1ps;

  logic [PHASES-1:0]    phase;
  logic [FINE_BITS-1:0] fine;
  logic [CNT_BITS-1:0]  coarse;
  logic                 cnt_clk;

  vcro u_vcro (
    .en      (vcro_en & ~count_2d),
    .rst     (rst | count_2d),
    .timebase (timebase),
    .phase   (phase)
  );

  thermo_encoder u_enc (.phase(phase), .fine(fine));

  assign cnt_clk = count_2d ? event_in : phase[0];

  ripple_counter #(.W(CNT_BITS)) u_cnt (
    .clk_in (cnt_clk),
    .tog_en (cnt_en),
    .clr    (rst),
    .q      (coarse)
  );

  assign code = {coarse, fine};
endmodule
