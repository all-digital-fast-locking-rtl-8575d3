`timescale 1ps/1ps
// output_clock_gen: output clock generator, a D flip-flop with D tied high
// and an asynchronous reset.
//
// The one-shot pulse, after the matching delay, clocks the flip-flop and
// starts the output high phase; the same pulse after the programmed delay
// through the coarse and fine lines (Out_fine) resets it and ends the high
// phase. The high time is therefore the programmed delay, a fraction of the
// measured period. Out_fine resets while it is high, as in the published
// waveform; because a flip-flop (not an SR latch) is used, a reset pulse that
// overlaps the next set pulse does no harm beyond delaying that rising edge.
// en (output generation) qualifies the set, and rst_n clears the output. The
// flip-flop with asynchronous reset is the published circuit; the enable is
// this design's choice.
module output_clock_gen (
  input  logic rst_n,         // global reset, active low
  input  logic en,            // output generation
  input  logic out_matching,  // set pulse (clock)
  input  logic out_fine,      // reset pulse, active high
  output logic clk_out        // output clock
);
  logic clr;  // asynchronous clear: global reset or Out_fine

  assign clr = ~rst_n | out_fine;

  always_ff @(posedge out_matching or posedge clr) begin
    if (clr)     clk_out <= 1'b0;
    else if (en) clk_out <= 1'b1;
  end
endmodule
