`timescale 1ps/1ps
// tb_coarse_detector: for REF high times across the whole coarse range, the
// four selected taps of the CPI group (4g .. 4g+3 cells) are driven as delayed
// copies of REF, and the CPI code F is applied. A must mark the last tap that
// still saw REF high and Bc must equal floor(width / tau_c). Also checks the
// published example (A = 1000, F = 0100 -> Bc = 1011) and that nothing is
// sampled while en is low.
module tb_coarse_detector;
  localparam int TAU_C = 320;
  logic       rst_n = 1'b1, en = 1'b0, ref_i = 1'b0;
  logic [3:0] tap_sel, f, a, bc;
  int checks = 0, failures = 0;
  int g = 0;

  coarse_detector dut (.rst_n, .en, .ref_i, .tap_sel, .f, .a, .bc);

  initial tap_sel = 4'b0000;
  for (genvar j = 0; j < 4; j++) begin : g_tap
    always @(posedge ref_i) tap_sel[j] <= #((4 * g + j) * TAU_C + 1) 1'b1;
    always @(negedge ref_i) tap_sel[j] <= #((4 * g + j) * TAU_C + 1) 1'b0;
  end

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
    int n, j;
    n = width / TAU_C;  // cells strictly shorter than the width (width not a multiple)
    g = n / 4; j = n % 4;
    f = 4'b0001 << g;
    #(20 * TAU_C);
    rst_n = 1'b0; #10; rst_n = 1'b1; #10;
    // a REF pulse while disabled must leave the flip-flops cleared
    en = 1'b0;
    ref_i = 1'b1; #(width); ref_i = 1'b0; #(width + 16 * TAU_C);
    check(a == 4'b0000, "no sampling while disabled");
    en = 1'b1;
    ref_i = 1'b1; #(width); ref_i = 1'b0; #(width + 16 * TAU_C);
    en = 1'b0;
    check(a == (4'b0001 << j), $sformatf("width %0d: A=%b expected one-hot %0d", width, a, j));
    check(bc == 4'(n), $sformatf("width %0d: Bc=%0d expected %0d", width, bc, n));
  endtask

  initial begin
    for (int w = 1330; w < 5120; w += 160) run(w);
    run(3700);  // between Out11 and Out12: A=1000, F=0100, Bc=1011
    check(a == 4'b1000 && f == 4'b0100 && bc == 4'b1011, "published example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
