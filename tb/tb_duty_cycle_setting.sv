`timescale 1ps/1ps
// tb_duty_cycle_setting: every period code 0..63 with every setting code.
// The expected value is the exact product P*k/16 (k = 8a + 4(1-a) + 2c + d)
// minus the two low-order bits the circuit drops: the 1/16 bit of the d term
// and the 1/8 bit of the first sum. Also checks that the loss stays below a
// quarter of a fine cell and the published example (P = 16, code 001 -> 5).
module tb_duty_cycle_setting;
  import pwcc_pkg::*;
  logic [5:0] period;
  duty_code_t code;
  logic [7:0] result;
  logic [5:0] delay_int;
  int checks = 0, failures = 0;

  duty_cycle_setting dut (.period, .code, .result, .delay_int);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL P=%0d code=%03b: %s", period, code, what); end
  endtask

  initial begin
    for (int p = 0; p < 64; p++) begin
      for (int c = 0; c < 8; c++) begin
        int a, cc, d, k, exact16, drop0, part16, drop1, want16;
        period = 6'(p);
        code = duty_code_t'(3'(c));
        a = (c >> 2) & 1; cc = (c >> 1) & 1; d = c & 1;
        k = 8 * a + 4 * (1 - a) + 2 * cc + d;
        exact16 = p * k;                   // in 1/16 fine cell
        drop0   = d * (p % 2);             // the 1/16 bit of P/16
        part16  = d * p - drop0 + 2 * cc * p;
        drop1   = part16 % 4;              // the 1/8 bit of the first sum
        want16  = exact16 - drop0 - drop1;
        #10;
        check(int'(result) * 4 == want16, $sformatf("result %0d/4, expected %0d/16", result, want16));
        check(int'(delay_int) == want16 / 16, $sformatf("delay %0d", delay_int));
        check(exact16 - int'(result) * 4 < 4 && exact16 >= int'(result) * 4, "loss below 1/4 cell");
      end
    end
    period = 6'd16; code = '{a: 1'b0, c: 1'b0, d: 1'b1};
    #10 check(delay_int == 6'd5 && result == 8'd20, "published example 16 x 5/16 = 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
