`timescale 1ps/1ps
// duty_cycle_setting: scales the measured period by the programmed duty
// cycle without a look-up table.
//
// The period code P = {Bc4..Bc1, Bf2, Bf1} counts fine cells (tau_f). With the
// setting code {a, c, d} and b = not a, the result is
//   P * (a/2 + b/4 + c/8 + d/16),
// which covers 5/16 .. 11/16 (31.25 % .. 68.75 %) in steps of 1/16. Bit
// positions are numbered 0..9 with position i weighing 2^(i-4) fine cells, so
// P sits at [4:9] and a right shift by k moves it to [4-k:9-k]:
//   P>>4 and d -> [0:5], position 0 dropped -> [1:5]
//   P>>3 and c -> [1:6]
//   first adder (6 bits): [1:5] + [1:6] -> [1:7], position 1 dropped -> [2:7]
//   P>>2 and b, P>>1 and a: never both, so one 7-bit operand [2:8]
//   second adder (7 bits): [2:7] + [2:8] -> [2:9]
// Dropping positions 0 and 1 loses less than a quarter of a fine cell. result
// holds [2:9] (two fractional bits); delay_int holds the integer part [4:9],
// the delay in fine cells that the control circuit turns back into MUX1,
// MUX2 and FDL selections. Combinational. The shift, gating and adder
// structure and the dropped bits follow the published circuit; truncating
// [2:3] for the delay is this design's choice.
module duty_cycle_setting
  import pwcc_pkg::*;
(
  input  logic [CODE_W-1:0] period,  // P in fine cells
  input  duty_code_t code,       // {a, c, d}
  output logic [7:0] result,     // positions [2:9]
  output logic [CODE_W-1:0] delay_int  // positions [4:9]
);
  logic [4:0] t_d;   // positions [1:5]
  logic [5:0] t_c;   // positions [1:6]
  logic [6:0] sum1;  // positions [1:7]
  logic [5:0] s1;    // positions [2:7]
  logic [6:0] t_ab;  // positions [2:8]

  assign t_d  = code.d ? period[5:1] : 5'd0;
  assign t_c  = code.c ? period      : 6'd0;
  assign sum1 = 7'(t_d) + 7'(t_c);
  assign s1   = sum1[6:1];
  // a: P>>1 at [3:8]; b = not a: P>>2 at [2:7]
  assign t_ab = code.a ? {period, 1'b0} : {1'b0, period};
  assign result    = 8'(s1) + 8'(t_ab);
  assign delay_int = result[7:2];
endmodule
