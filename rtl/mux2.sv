`timescale 1ps/1ps
// mux2: 4-to-1 multiplexer that picks one MUX1 output as Input_fine, the
// input of the fine delay line.
//
// In silicon four tri-state buffers with one enabled; here a combinational
// multiplexer with a 2-bit binary select (sel = offset of the tap inside the
// MUX1 group). The 4-to-1 structure is the published one; the select encoding
// is this design's choice.
module mux2 (
  input  logic [3:0] d,    // MUX1 outputs
  input  logic [1:0] sel,  // which one
  output logic       y     // to the fine delay line
);
  assign y = d[sel];
endmodule
