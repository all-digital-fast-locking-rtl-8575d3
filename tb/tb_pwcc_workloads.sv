`timescale 1ps/1ps
// tb_pwcc_workloads: the operating points at which the circuit's output was
// characterised, run on pwcc_top at its default parameters:
//  - 200 MHz and 600 MHz, 50 % in, 50 % out;
//  - 200 MHz, 37.5 % out, with 30 % and 70 % input duty cycles;
//  - 500 MHz, 50 % in, every output duty from 31.25 % to 68.75 %;
//  - lock time at 200 MHz.
// For each it checks that the output locks within 7..11 input cycles, runs
// at the input period, and has a high time below the target by less than two
// fine cells (the quantisation bound: one cell of period measurement, one
// cell of rounding down, a quarter cell of dropped adder bits). It prints the
// measured duty cycle and its error for each point.
module tb_pwcc_workloads;
  import pwcc_pkg::*;

  localparam int TAU_F = 80;

  logic       clk_in = 1'b0;
  logic       rst_n  = 1'b1;
  duty_code_t duty_code = '0;
  logic       clk_out, locked;
  logic [5:0] period_code, delay_code;

  int checks = 0, failures = 0;
  int t_period = 5000, t_high = 2500;

  pwcc_top dut (.clk_in, .rst_n, .duty_code, .clk_out, .locked, .period_code,
                .delay_code);

  always begin
    clk_in = 1'b1; #(t_high);
    clk_in = 1'b0; #(t_period - t_high);
  end

  initial begin
    #(10_000_000);
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

  task automatic run(input string name, input int period, input int in_pct, input int code);
    int lock_cycles, k, hi, err;
    time t_r0, t_f, t_r1;
    t_period  = period;
    t_high    = period * in_pct / 100;
    duty_code = duty_code_t'(3'(code));
    @(negedge clk_in) rst_n = 1'b0;
    repeat (6) @(negedge clk_in);
    rst_n = 1'b1;
    lock_cycles = -1;
    do begin
      @(posedge clk_in); #1;
      lock_cycles++;
    end while (!locked && lock_cycles < 40);
    check(lock_cycles >= 7 && lock_cycles <= 11, $sformatf("lock %0d cycles", lock_cycles));
    repeat (3) @(posedge clk_in);
    @(posedge clk_out); t_r0 = $time;
    @(negedge clk_out); t_f  = $time;
    @(posedge clk_out); t_r1 = $time;
    k   = (code[2] ? 8 : 4) + (code[1] ? 2 : 0) + (code[0] ? 1 : 0);
    hi  = int'(t_f - t_r0);
    err = hi * 16 - period * k;  // 1/16 ps, target minus measured is -err
    check(int'(t_r1 - t_r0) == period, "output period");
    check(err <= 0 && -err < 2 * TAU_F * 16, $sformatf("high time %0d ps vs target %0d/16 ps", hi, period * k));
    $display("%-28s %4d MHz in %0d%%: lock %2d cycles, P=%0d, out %6.2f%% (target %6.2f%%, error %5.2f%%)",
             name, 1_000_000 / period, in_pct, lock_cycles, period_code,
             100.0 * hi / period, 100.0 * k / 16, 100.0 * err / 16 / period);
  endtask

  initial begin
    run("50/50 at 200 MHz", 5000, 50, 3'b100);
    run("50/50 at 600 MHz", 1667, 50, 3'b100);
    run("37.5% out, 30% in", 5000, 30, 3'b010);
    run("37.5% out, 70% in", 5000, 70, 3'b010);
    for (int c = 1; c < 8; c++) run("500 MHz duty sweep", 2000, 50, c);
    for (int c = 1; c < 8; c++) run("600 MHz duty sweep", 1667, 50, c);
    for (int c = 1; c < 8; c++) run("200 MHz duty sweep", 5000, 50, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
