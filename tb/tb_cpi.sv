`timescale 1ps/1ps
// tb_cpi: for REF high times in each quarter of the coarse line, REF and its
// delayed copies at 4, 8 and 12 cells are driven as a real delay line would;
// F4..F1 must be one-hot with the quarter the width falls in, FC_FINISH must
// rise with the falling edge of REF, and delayed edges of the first pulse
// that arrive during the second pulse must not change F.
module tb_cpi;
  localparam int TAU_C = 320;
  logic       rst_n = 1'b1, ref_i = 1'b0;
  logic       out4, out8, out12;
  logic [3:0] f;
  logic       fc_finish;
  int checks = 0, failures = 0;

  cpi dut (.rst_n, .ref_i, .out4, .out8, .out12, .f, .fc_finish);

  // ideal delayed copies of REF
  initial begin out4 = 1'b0; out8 = 1'b0; out12 = 1'b0; end
  always @(posedge ref_i) begin out4 <= #(4*TAU_C) 1'b1; out8 <= #(8*TAU_C) 1'b1; out12 <= #(12*TAU_C) 1'b1; end
  always @(negedge ref_i) begin out4 <= #(4*TAU_C) 1'b0; out8 <= #(8*TAU_C) 1'b0; out12 <= #(12*TAU_C) 1'b0; end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic run(input int width);
    logic [3:0] f_exp;
    int q;
    #(20 * TAU_C);
    rst_n = 1'b0; #10;
    check(f == 4'b0001 && fc_finish == 1'b0, "reset value {F4..F1,FC_FINISH} = 0001,0");
    rst_n = 1'b1; #10;
    q = width / (4 * TAU_C);
    if (q > 3) q = 3;
    f_exp = 4'b0001 << q;
    // three REF periods of the given high time
    repeat (3) begin
      ref_i = 1'b1; #(width);
      ref_i = 1'b0;
      #1 check(fc_finish == 1'b1, "FC_FINISH after REF falls");
      check(f == f_exp, $sformatf("width %0d: F=%b expected %b", width, f, f_exp));
      #(width - 1);
    end
    #(13 * TAU_C);
    check(f == f_exp, $sformatf("width %0d: F=%b after late edges, expected %b", width, f, f_exp));
  endtask

  initial begin
    run(1000); run(1670); run(2010); run(2570); run(3010); run(3850); run(4500); run(5010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
