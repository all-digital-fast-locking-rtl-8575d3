`timescale 1ps/1ps
// input_mux: the multiplexer in front of the coarse delay line.
//
// While the period is being measured it feeds REF into the coarse delay line;
// in output generation it feeds the one-shot pulse train instead, so the same
// delay lines that measured the period now delay the pulse that ends each
// output high phase. Combinational. Follows the published design.
module input_mux (
  input  logic ref_i,      // REF
  input  logic pulse,      // one-shot pulse train
  input  logic sel_pulse,  // 1 in output generation
  output logic y           // CDL input
);
  assign y = sel_pulse ? pulse : ref_i;
endmodule
