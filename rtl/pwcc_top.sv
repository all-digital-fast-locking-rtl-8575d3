`timescale 1ps/1ps
// pwcc_top: all-digital pulsewidth-control circuit with programmable duty
// cycle.
//
// The input clock is divided by two into REF, whose high time equals one
// input period. That high time is measured in three steps: the CPI finds the
// quarter of the 16-cell coarse delay line it falls in, the coarse detector
// finds the coarse cell, and the serial fine detector resolves it to a
// quarter cell, giving the period as a 6-bit count of fine cells. The
// duty-cycle setting circuit multiplies that count by 5/16 .. 11/16. The
// same delay lines are then reused: the one-shot pulse of each input cycle
// sets the output flip-flop directly and resets it after travelling the
// programmed number of coarse and fine cells, so the output high time is the
// chosen fraction of the period. The output runs 7 to 11 input cycles after
// reset is released (see fsm_control) and continues until the next reset.
//
// Interface: clk_in (200-600 MHz at the default cell delays), rst_n active
// low, duty_code {a,c,d} as in the duty-cycle table (001 = 31.25 % ...
// 111 = 68.75 %, 100 = 50 %). locked, period_code and delay_code are for
// observation. The delay lines and the one-shot are behavioural models with
// the delays TAU_C_PS, TAU_F_PS = TAU_C_PS/4 and ONESHOT_PS; the multiplexers
// are zero-delay, which is why no separate matching delay line is needed
// here: the set path and the reset path see the same (zero) multiplexer
// delay. The block structure follows the published design; the numeric
// delays, reset polarity and handshakes between blocks are this design's.
module pwcc_top
  import pwcc_pkg::*;
#(
  parameter int unsigned TAU_C_PS   = 320,           // coarse cell delay
  parameter int unsigned TAU_F_PS   = TAU_C_PS / 4,  // fine cell delay
  parameter int unsigned ONESHOT_PS = 120            // one-shot pulse width
) (
  input  logic       clk_in,       // input clock
  input  logic       rst_n,        // RESET, active low
  input  duty_code_t duty_code,    // duty-cycle setting code {a,c,d}
  output logic       clk_out,      // output clock
  output logic       locked,       // output generation running
  output logic [5:0] period_code,  // measured period, fine cells
  output logic [5:0] delay_code    // latched high time, fine cells
);
  logic        ref_s, ref1, pulse, cdl_in;
  logic [15:0] tap;
  logic [3:0]  f, bc, grp_en, mux1_y;
  logic        fc_finish;
  logic [1:0]  mux1_sel, mux2_sel, fdl_cells, fine_cells, bf;
  logic        input_fine, fdl_out;
  logic        div_en, sel_pulse, out_en, coarse_en, fine_en, step;
  logic        fine_finish;
  logic [5:0]  delay_int, delay_q;

  clk_div2 u_div2 (.clk(clk_in), .rst_n, .en(div_en), .ref_o(ref_s));

  one_shot #(.PW_PS(ONESHOT_PS)) u_one_shot (.clk(clk_in), .pulse);

  input_mux u_mux (.ref_i(ref_s), .pulse, .sel_pulse, .y(cdl_in));

  coarse_delay_line #(.TAU_C_PS(TAU_C_PS)) u_cdl (
    .din(cdl_in), .grp_en, .tap);

  cpi u_cpi (
    .rst_n, .ref_i(ref_s), .out4(tap[4]), .out8(tap[8]), .out12(tap[12]),
    .f, .fc_finish);

  mux1 u_mux1 (.tap, .grp_sel(mux1_sel), .y(mux1_y));

  coarse_detector u_coarse (
    .rst_n, .en(coarse_en), .ref_i(ref_s), .tap_sel(mux1_y), .f,
    .a(), .bc);

  mux2 u_mux2 (.d(mux1_y), .sel(mux2_sel), .y(input_fine));

  fine_delay_line #(.TAU_F_PS(TAU_F_PS)) u_fdl (
    .din(input_fine), .cells(fdl_cells), .dout(fdl_out));

  assign ref1 = ~ref_s;

  fine_detector u_fine (
    .clk(clk_in), .rst_n, .en(fine_en), .step, .ref1, .input_buf(fdl_out),
    .cells(fine_cells), .finish_now(fine_finish), .fd_finish(), .bf);

  assign period_code = {bc, bf};

  duty_cycle_setting u_duty (
    .period(period_code), .code(duty_code), .result(),
    .delay_int);

  fsm_control u_fsm (
    .clk(clk_in), .rst_n, .ref_i(ref_s), .fc_finish, .f, .bc,
    .fine_finish, .fine_cells, .delay_int, .state(), .grp_en, .mux1_sel,
    .mux2_sel, .fdl_cells, .div_en, .sel_pulse, .out_en, .coarse_en,
    .fine_en, .step, .delay_q);

  output_clock_gen u_out (
    .rst_n, .en(out_en), .out_matching(pulse), .out_fine(fdl_out),
    .clk_out);

  assign locked     = out_en;
  assign delay_code = delay_q;
endmodule
