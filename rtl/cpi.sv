`timescale 1ps/1ps
// cpi: coarse pulsewidth identification circuit.
//
// During the first REF pulse after reset it finds which quarter of the coarse
// delay line the REF high time falls in. The taps Out4, Out8 and Out12 each
// trigger one flip-flop that records whether REF was still high when the
// delayed edge arrived (a flip-flop clocked by REF gated with the tap). When
// REF falls, FC_FINISH is set and blocks every further trigger, so the result
// is frozen for the rest of the detection. The three flip-flops form a
// thermometer code that is turned into the one-hot pulsewidth code F4..F1:
//   F1: width < 4 tau_c, F2: 4..8, F3: 8..12, F4: >= 12 tau_c.
// After reset {F4..F1, FC_FINISH} = {0001, 0}. All flip-flops are cleared by
// rst_n. The codes, the gating by FC_FINISH and the reset value follow the
// published circuit; writing the gated clocks as tap-clocked flip-flops with
// a REF qualifier is this design's choice.
module cpi (
  input  logic       rst_n,      // asynchronous reset, active low
  input  logic       ref_i,      // REF
  input  logic       out4,       // CDL tap after 4 cells
  input  logic       out8,       // CDL tap after 8 cells
  input  logic       out12,      // CDL tap after 12 cells
  output logic [3:0] f,          // F4..F1, one-hot
  output logic       fc_finish   // identification complete
);
  logic q4, q8, q12;  // REF still high at Out4 / Out8 / Out12

  // FC_FINISH: set by the falling edge of the (not yet blocked) REF.
  always_ff @(negedge ref_i or negedge rst_n) begin
    if (!rst_n) fc_finish <= 1'b0;
    else        fc_finish <= 1'b1;
  end

  always_ff @(posedge out4 or negedge rst_n) begin
    if (!rst_n)                     q4 <= 1'b0;
    else if (ref_i && !fc_finish)   q4 <= 1'b1;
  end

  always_ff @(posedge out8 or negedge rst_n) begin
    if (!rst_n)                     q8 <= 1'b0;
    else if (ref_i && !fc_finish)   q8 <= 1'b1;
  end

  always_ff @(posedge out12 or negedge rst_n) begin
    if (!rst_n)                     q12 <= 1'b0;
    else if (ref_i && !fc_finish)   q12 <= 1'b1;
  end

  // thermometer {q12, q8, q4} to one-hot F
  assign f[0] = ~q4;
  assign f[1] = q4 & ~q8;
  assign f[2] = q8 & ~q12;
  assign f[3] = q12;
endmodule
