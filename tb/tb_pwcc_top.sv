`timescale 1ps/1ps
// tb_pwcc_top: end-to-end test of the pulsewidth-control circuit at its
// default parameters (tau_c = 320 ps, tau_f = 80 ps).
//
// For input periods across 200-600 MHz, input duty cycles of 30, 50 and 70 %
// and all seven duty-cycle codes, the test resets the circuit and checks:
//  - the lock time, counted in input cycles from the first edge after reset
//    release to output generation: 7, 9 or 11 cycles, as the serial fine
//    detection needs one, two or three REF periods;
//  - the measured period code: the number of fine cells whose total delay is
//    still below the period, ceil(T/tau_f) - 1;
//  - the latched delay: P*k/16 rounded down, or one less where the dropped
//    low-order adder bits cost one step;
//  - the output clock: rising edges one input period apart, high time equal
//    to the latched delay in fine cells, and duty within two fine cells of
//    k/16.
// It also counts each mechanism (each CPI group, each fine outcome, each
// code, each input duty, REF gating, cell power-down) and fails if one never
// happened.
module tb_pwcc_top;
  import pwcc_pkg::*;

  localparam int TAU_F = 80;

  logic       clk_in = 1'b0;
  logic       rst_n  = 1'b1;
  duty_code_t duty_code = '0;
  logic       clk_out, locked;
  logic [5:0] period_code, delay_code;

  int checks = 0, failures = 0;
  int t_period = 2010;  // input period, ps
  int t_high   = 1005;  // input high time, ps

  pwcc_top dut (.clk_in, .rst_n, .duty_code, .clk_out, .locked, .period_code,
                .delay_code);

  always begin
    clk_in = 1'b1; #(t_high);
    clk_in = 1'b0; #(t_period - t_high);
  end

  // watchdog
  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL T=%0d code=%03b: %s", t_period, duty_code, what);
    end
  endtask

  int seen_grp[4];
  int seen_bf[4];
  int seen_code[8];
  int seen_lock[12];
  int seen_in_duty[3];
  int seen_ref_gated = 0, seen_power_down = 0;

  task automatic run_one(input int period, input int duty_pct, input int code);
    int lock_cycles, p_ref, k, exact16, r_lo, r_hi;
    time t_rise0, t_rise1, t_fall;
    int hi, err;
    t_period  = period;
    t_high    = period * duty_pct / 100;
    duty_code = duty_code_t'(code[2:0]);
    @(negedge clk_in);
    rst_n = 1'b0;
    repeat (6) @(negedge clk_in);
    rst_n = 1'b1;
    lock_cycles = 0;
    do begin
      @(posedge clk_in);
      #1;
      lock_cycles++;
    end while (!locked && lock_cycles < 40);
    lock_cycles--;  // the first edge after release is cycle 0
    // expected period code and fine outcome
    p_ref = (period + TAU_F - 1) / TAU_F - 1;
    check(period_code == 6'(p_ref), $sformatf("period code %0d, expected %0d", period_code, p_ref));
    case (p_ref % 4)
      3: check(lock_cycles == 7,  $sformatf("lock %0d cycles, expected 7", lock_cycles));
      2: check(lock_cycles == 9,  $sformatf("lock %0d cycles, expected 9", lock_cycles));
      default: check(lock_cycles == 11, $sformatf("lock %0d cycles, expected 11", lock_cycles));
    endcase
    check(lock_cycles >= 7 && lock_cycles <= 11, "lock time outside 7..11 cycles");
    // expected delay: k/16 of the period code
    k = (code[2] ? 8 : 4) + (code[1] ? 2 : 0) + (code[0] ? 1 : 0);
    exact16 = p_ref * k;
    r_hi = exact16 / 16;
    r_lo = (r_hi > 0) ? r_hi - 1 : 0;
    check(int'(delay_code) >= r_lo && int'(delay_code) <= r_hi,
          $sformatf("delay code %0d, expected %0d..%0d", delay_code, r_lo, r_hi));
    // output waveform, after two settling cycles
    repeat (3) @(posedge clk_in);
    @(posedge clk_out); t_rise0 = $time;
    @(negedge clk_out); t_fall  = $time;
    @(posedge clk_out); t_rise1 = $time;
    hi = int'(t_fall - t_rise0);
    check(int'(t_rise1 - t_rise0) == period, $sformatf("output period %0d", t_rise1 - t_rise0));
    check(hi == int'(delay_code) * TAU_F, $sformatf("high time %0d, expected %0d", hi, delay_code * TAU_F));
    err = hi * 16 - period * k;  // in 1/16 ps
    if (err < 0) err = -err;
    check(err <= 2 * TAU_F * 16, $sformatf("duty error %0d/16 ps", err));
    // mechanisms
    seen_grp[dut.u_fsm.grp]++;
    seen_bf[period_code[1:0]]++;
    seen_code[code]++;
    seen_lock[lock_cycles]++;
    seen_in_duty[duty_pct == 30 ? 0 : duty_pct == 50 ? 1 : 2]++;
    if (dut.ref_s == 1'b0 && dut.div_en == 1'b0) seen_ref_gated++;
    if (dut.grp_en != 4'b1111) seen_power_down++;
  endtask

  int periods[] = '{1670, 1730, 2010, 2090, 2170, 2250, 3010, 3370, 3450,
                    4010, 4850, 4930, 4970, 5010};
  int in_duty[] = '{30, 50, 70};

  initial begin
    foreach (periods[i])
      foreach (in_duty[j])
        for (int c = 1; c < 8; c++)
          run_one(periods[i], in_duty[j], c);
    for (int g = 1; g < 4; g++)
      check(seen_grp[g] > 0, $sformatf("CPI group %0d never seen", g));
    for (int b = 0; b < 4; b++)
      check(seen_bf[b] > 0, $sformatf("fine outcome %0d never seen", b));
    for (int c = 1; c < 8; c++)
      check(seen_code[c] > 0, $sformatf("duty code %0d never used", c));
    check(seen_lock[7] > 0 && seen_lock[9] > 0 && seen_lock[11] > 0, "lock times 7/9/11 not all seen");
    for (int j = 0; j < 3; j++)
      check(seen_in_duty[j] > 0, "input duty not exercised");
    check(seen_ref_gated > 0, "REF gating never seen");
    check(seen_power_down > 0, "coarse cell power-down never seen");
    $display("groups F2/F3/F4: %0d %0d %0d; fine Bf 0..3: %0d %0d %0d %0d; lock 7/9/11: %0d %0d %0d",
             seen_grp[1], seen_grp[2], seen_grp[3], seen_bf[0], seen_bf[1], seen_bf[2], seen_bf[3],
             seen_lock[7], seen_lock[9], seen_lock[11]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
