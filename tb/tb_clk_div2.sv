`timescale 1ps/1ps
// tb_clk_div2: checks that REF is cleared by reset, toggles on every rising
// input edge while enabled (so its high time is one input period even for a
// 30 % input duty cycle) and holds its value while disabled.
module tb_clk_div2;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, ref_o;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk, .rst_n, .en, .ref_o);

  always begin clk = 1'b1; #600; clk = 1'b0; #1400; end  // 30 % duty

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

  logic expect_ref;
  time  t_rise;
  initial begin
    #100 rst_n = 1'b0;
    #10 check(ref_o == 1'b0, "reset clears REF");
    @(negedge clk) rst_n = 1'b1; en = 1'b1;
    expect_ref = 1'b0;
    repeat (20) begin
      @(posedge clk); #1;
      expect_ref = ~expect_ref;
      check(ref_o == expect_ref, "REF toggles every input cycle");
    end
    // high time equals one input period
    @(posedge ref_o); t_rise = $time;
    @(negedge ref_o);
    check($time - t_rise == 2000, "REF high time = input period");
    // hold
    @(negedge clk) en = 1'b0;
    expect_ref = ref_o;
    repeat (6) begin
      @(posedge clk); #1;
      check(ref_o == expect_ref, "REF held while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
