`timescale 1ps/1ps
// clk_div2: divide-by-two that turns the input clock into the reference REF.
//
// REF toggles on every rising edge of the input clock, so its high time is
// exactly one input period and its duty cycle is 50 % whatever the duty cycle
// of the input. Measuring the high time of REF therefore measures the input
// period. REF is cleared by reset and held while en is low; the controller
// uses that to gate REF once the output clock is being generated. Dividing by
// two is from the published design; the edge used and the enable are this
// design's choices.
module clk_div2 (
  input  logic clk,    // input clock
  input  logic rst_n,  // asynchronous reset, active low
  input  logic en,     // toggle enable
  output logic ref_o   // REF
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ref_o <= 1'b0;
    else if (en) ref_o <= ~ref_o;
  end
endmodule
