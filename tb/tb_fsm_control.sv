`timescale 1ps/1ps
// tb_fsm_control: drives the controller with a REF made by dividing the clock
// by two (held while div_en is low), a CPI that finishes after the first REF
// pulse, and a fine detector that finishes after n = 1..3 REF periods. Checks
// the state at every cycle (2 cycles identification, 2 coarse, 2n fine, 1
// duty setting, then output generation for good, 7..11 cycles in all) and the
// control outputs in each state: group power, detector enables, REF gating,
// the delay-line input select, and the MUX1/MUX2/FDL selects taken from the
// detection results and then from the latched duty-cycle result.
module tb_fsm_control;
  import pwcc_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1, ref_s = 1'b0;
  logic       fc_finish = 1'b0, fine_finish;
  logic [3:0] f = 4'b0100, bc = 4'b1010;
  logic [1:0] fine_cells = 2'd2;
  logic [5:0] delay_int = 6'd27;
  state_t     state;
  logic [3:0] grp_en;
  logic [1:0] mux1_sel, mux2_sel, fdl_cells;
  logic       div_en, sel_pulse, out_en, coarse_en, fine_en, step;
  logic [5:0] delay_q;
  int checks = 0, failures = 0;
  int n_fine = 1, fine_steps = 0;

  fsm_control dut (.clk, .rst_n, .ref_i(ref_s), .fc_finish, .f, .bc,
                   .fine_finish, .fine_cells, .delay_int, .state, .grp_en,
                   .mux1_sel, .mux2_sel, .fdl_cells, .div_en, .sel_pulse,
                   .out_en, .coarse_en, .fine_en, .step, .delay_q);

  always begin clk = 1'b1; #1000; clk = 1'b0; #1000; end

  always @(posedge clk or negedge rst_n)
    if (!rst_n) ref_s <= 1'b0; else if (div_en) ref_s <= ~ref_s;
  always @(negedge ref_s or negedge rst_n)
    if (!rst_n) fc_finish <= 1'b0; else fc_finish <= 1'b1;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) fine_steps <= 0; else if (fine_en && step) fine_steps <= fine_steps + 1;
  assign fine_finish = fine_en && step && (fine_steps == n_fine - 1);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t n=%0d: %s", $time, n_fine, what); end
  endtask

  task automatic run(input int n, input logic [3:0] f_in, input logic [5:0] d_in);
    state_t want;
    logic   ref_hold;
    logic [3:0] mask;
    int g;
    n_fine = n; f = f_in; delay_int = d_in;
    g = f_in[3] ? 3 : f_in[2] ? 2 : f_in[1] ? 1 : 0;
    mask = 4'((2 << g) - 1);
    @(negedge clk) rst_n = 1'b0;
    #10 check(state == S_RESET && grp_en == 4'b1111 && !sel_pulse, "reset state");
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 5 + 2 * n + 4; c++) begin
      @(posedge clk); #1;
      if      (c < 2)         want = S_CPI;
      else if (c < 4)         want = S_COARSE;
      else if (c < 4 + 2 * n) want = S_FINE;
      else if (c < 5 + 2 * n) want = S_DUTY;
      else                    want = S_OUTPUT;
      check(state == want, $sformatf("cycle %0d: state %s expected %s", c, state.name(), want.name()));
      check(coarse_en == (want == S_COARSE) && fine_en == (want == S_FINE), "detector enables");
      check(grp_en == ((want == S_CPI) ? 4'b1111 : mask), $sformatf("grp_en %b", grp_en));
      if (want != S_OUTPUT) begin
        check(div_en && !sel_pulse && !out_en, "detection: REF on, MUX on REF");
        check(mux1_sel == 2'(g) && mux2_sel == bc[1:0] && fdl_cells == fine_cells,
              "detection selects");
      end else begin
        check(!div_en && sel_pulse && out_en, "output: REF gated, MUX on pulse");
        check(delay_q == d_in, "duty result latched");
        check(mux1_sel == d_in[5:4] && mux2_sel == d_in[3:2] && fdl_cells == d_in[1:0],
              "output selects from the duty result");
        if (c == 6 + 2 * n) ref_hold = ref_s;
        if (c > 6 + 2 * n) check(ref_s == ref_hold, "REF held");
      end
    end
    // a change of the duty input after locking must not move the selects
    delay_int = ~d_in;
    @(posedge clk); #1;
    check(delay_q == d_in, "result stays latched");
  endtask

  initial begin
    run(1, 4'b0100, 6'd27);
    run(2, 4'b0010, 6'd13);
    run(3, 4'b1000, 6'd43);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
