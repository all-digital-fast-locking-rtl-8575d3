`timescale 1ps/1ps
// mux1: 16-to-4 multiplexer between the coarse delay line and the coarse
// detector / MUX2.
//
// Group g passes taps 4g, 4g+1, 4g+2 and 4g+3 to outputs y[0..3]: group 0 is
// Input, Out1, Out2, Out3; group 1 is Out4..Out7; group 2 Out8..Out11; group 3
// Out12..Out15. In silicon each input is a tri-state buffer and only the four
// buffers of the selected group are on; here that is a plain multiplexer with
// a 2-bit binary select. Purely combinational. The grouping is the published
// one; the binary select encoding is this design's choice.
module mux1 (
  input  logic [15:0] tap,      // CDL taps, tap[0] = line input
  input  logic [1:0]  grp_sel,  // group select
  output logic [3:0]  y         // taps 4g .. 4g+3
);
  always_comb begin
    unique case (grp_sel)
      2'd0: y = tap[3:0];
      2'd1: y = tap[7:4];
      2'd2: y = tap[11:8];
      2'd3: y = tap[15:12];
    endcase
  end
endmodule
