`timescale 1ps/1ps
// tb_output_clock_gen: the set pulse raises the output, the delayed reset
// pulse lowers it, nothing happens while disabled, and rst_n clears it. The
// high time must equal the spacing of the two pulses.
module tb_output_clock_gen;
  logic rst_n = 1'b1, en = 1'b0, out_matching = 1'b0, out_fine = 1'b0, clk_out;
  int checks = 0, failures = 0;

  output_clock_gen dut (.rst_n, .en, .out_matching, .out_fine, .clk_out);

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

  // one output period: set pulse at 0, reset pulse at dly
  task automatic cycle(input int dly, input int per);
    time t_r;
    out_matching = 1'b1; #120; out_matching = 1'b0;
    #(dly - 120);
    out_fine = 1'b1; #120; out_fine = 1'b0;
    #(per - dly - 120);
  endtask

  time t_rise, t_fall;
  always @(posedge clk_out) t_rise = $time;
  always @(negedge clk_out) t_fall = $time;

  initial begin
    #10 rst_n = 1'b0;
    #10 check(clk_out == 1'b0, "reset clears");
    rst_n = 1'b1;
    #100;
    out_matching = 1'b1; #120; out_matching = 1'b0;
    #100 check(clk_out == 1'b0, "no set while disabled");
    #2000;
    en = 1'b1;
    for (int k = 5; k <= 11; k++) begin
      int dly;
      dly = 2000 * k / 16;
      cycle(dly, 2000);
      check(t_fall - t_rise == dly, $sformatf("high time %0d expected %0d", t_fall - t_rise, dly));
    end
    // reset while high
    out_matching = 1'b1; #50;
    check(clk_out == 1'b1, "set");
    rst_n = 1'b0; #10;
    check(clk_out == 1'b0, "rst_n clears while high");
    out_matching = 1'b0; rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
