`timescale 1ps/1ps
// one_shot: behavioural model of the one-shot pulse generator (analog part,
// not synthesizable).
//
// On every rising edge of the input clock it emits one pulse of fixed width
// PW_PS, independent of the input frequency and duty cycle. In output
// generation the pulse's leading edge sets the output clock (through the
// matching delay line) and, after the programmed delay, resets it. The
// fixed-width pulse is from the published design; the 120 ps width is this
// model's choice, kept below 5/16 of a 600 MHz period so that a delayed reset
// pulse never overlaps the next set pulse.
module one_shot #(
  parameter int unsigned PW_PS = 120  // pulse width in ps
) (
  input  logic clk,   // input clock
  output logic pulse  // pulse train, one pulse per input period
);
  initial pulse = 1'b0;
  always @(posedge clk) begin
    pulse <= 1'b1;
    pulse <= #(PW_PS) 1'b0;
  end
endmodule
