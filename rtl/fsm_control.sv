`timescale 1ps/1ps
// fsm_control: finite state machine and control circuit.
//
// States (see pwcc_pkg::state_t): reset -> coarse pulsewidth identifying ->
// coarse detection -> fine detection -> duty-cycle setting -> output
// generation, which lasts until the next reset. The FSM runs on the input
// clock. REF toggles on every input edge, so an edge at which REF is low
// starts a new REF period (period_start); identification, coarse detection
// and each fine step last one REF period (two input cycles) and change state
// only at such an edge, while duty-cycle setting lasts one input cycle. From
// reset release to output generation this takes 2 + 2 + (2..6) + 1 = 7..11
// input cycles.
//
// The control outputs are:
//  - grp_en: all coarse cell groups on during reset and identification, then
//    only the groups up to the one the CPI found (the rest are powered off);
//  - mux1_sel / mux2_sel / fdl_cells: during detection the CPI group, the
//    coarse offset Bc[1:0] and the fine path under test; in output generation
//    the same three fields of the latched duty-cycle result, whose integer
//    part counts fine cells (4 fine cells = 1 coarse cell);
//  - div_en low gates REF in output generation; sel_pulse switches the delay
//    line input from REF to the one-shot pulse; out_en enables the output
//    flip-flop;
//  - coarse_en / fine_en / step enable the detectors.
// The duty-cycle result is registered when duty-cycle setting ends. The state
// sequence and the actions per state follow the published flow chart; the
// exact clocking and the encodings are this design's choices.
module fsm_control
  import pwcc_pkg::*;
(
  input  logic       clk,          // input clock
  input  logic       rst_n,        // asynchronous reset, active low
  input  logic       ref_i,        // REF, for the period phase
  input  logic       fc_finish,    // CPI done
  input  logic [3:0] f,            // CPI code F4..F1
  input  logic [3:0] bc,           // coarse code Bc4..Bc1
  input  logic       fine_finish,  // fine detection ends at this step
  input  logic [1:0] fine_cells,   // fine path under test
  input  logic [5:0] delay_int,    // duty-cycle setting result, fine cells
  output state_t     state,        // current state
  output logic [3:0] grp_en,       // CDL group power enables
  output logic [1:0] mux1_sel,     // MUX1 group
  output logic [1:0] mux2_sel,     // MUX2 input
  output logic [1:0] fdl_cells,    // FDL path length
  output logic       div_en,       // REF enable
  output logic       sel_pulse,    // CDL input = one-shot pulse
  output logic       out_en,       // output flip-flop enable
  output logic       coarse_en,    // coarse detector enable
  output logic       fine_en,      // fine detector enable
  output logic       step,         // end of a REF period
  output logic [5:0] delay_q       // latched duty-cycle result
);
  state_t     state_d;
  logic       period_start;
  logic [1:0] grp;

  assign period_start = ~ref_i;

  always_comb begin
    unique casez (f)
      4'b1???: grp = 2'd3;
      4'b01??: grp = 2'd2;
      4'b001?: grp = 2'd1;
      default: grp = 2'd0;
    endcase
  end

  always_comb begin
    state_d = state;
    unique case (state)
      S_RESET:  if (period_start)              state_d = S_CPI;
      S_CPI:    if (period_start && fc_finish) state_d = S_COARSE;
      S_COARSE: if (period_start)              state_d = S_FINE;
      S_FINE:   if (fine_finish)               state_d = S_DUTY;
      S_DUTY:                                  state_d = S_OUTPUT;
      S_OUTPUT:                                state_d = S_OUTPUT;
      default:                                 state_d = S_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_RESET;
      delay_q <= '0;
    end else begin
      state <= state_d;
      if (state == S_DUTY) delay_q <= delay_int;
    end
  end

  always_comb begin
    if (state == S_RESET || state == S_CPI) grp_en = 4'b1111;
    else                                    grp_en = 4'((5'd2 << grp) - 5'd1);
  end

  assign sel_pulse = (state == S_OUTPUT);
  assign out_en    = (state == S_OUTPUT);
  assign div_en    = (state != S_OUTPUT);
  assign coarse_en = (state == S_COARSE);
  assign fine_en   = (state == S_FINE);
  assign step      = period_start;
  assign mux1_sel  = sel_pulse ? delay_q[5:4] : grp;
  assign mux2_sel  = sel_pulse ? delay_q[3:2] : bc[1:0];
  assign fdl_cells = sel_pulse ? delay_q[1:0] : fine_cells;

  // Output generation is left only through reset.
  a_output_holds: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_OUTPUT |=> state == S_OUTPUT);
  // Fine detection lasts at most three REF periods.
  a_fine_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_COARSE ##1 state == S_FINE |-> ##[1:6] state != S_FINE);
endmodule
