`timescale 1ps/1ps
// tb_one_shot: checks one pulse of the set width per rising input edge, for
// input duty cycles of 30 % and 70 % and two input periods.
module tb_one_shot;
  localparam int PW = 120;
  logic clk = 1'b0, pulse;
  int checks = 0, failures = 0;
  int t_per = 2000, t_hi = 600;

  one_shot #(.PW_PS(PW)) dut (.clk, .pulse);

  always begin clk = 1'b1; #(t_hi); clk = 1'b0; #(t_per - t_hi); end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int n_pulses = 0;
  always @(posedge pulse) n_pulses++;

  task automatic measure(input int per, input int hi);
    time t_clk, t_r, t_f;
    int n0;
    t_per = per; t_hi = hi;
    repeat (3) @(posedge clk);
    #1 n0 = n_pulses;
    @(posedge clk); t_clk = $time;
    @(posedge pulse); t_r = $time;
    @(negedge pulse); t_f = $time;
    check(t_r == t_clk, "pulse starts at the input rising edge");
    check(t_f - t_r == PW, $sformatf("pulse width %0d", t_f - t_r));
    repeat (4) @(posedge clk);
    #(per / 2);
    check(n_pulses - n0 == 5, $sformatf("one pulse per cycle (%0d)", n_pulses - n0));
  endtask

  initial begin
    measure(2000, 600);
    measure(2000, 1400);
    measure(5000, 1500);
    measure(1670, 1169);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
