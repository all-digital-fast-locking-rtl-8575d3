`timescale 1ps/1ps
// tb_input_mux: checks both selections against all input combinations.
module tb_input_mux;
  logic ref_i, pulse, sel_pulse, y;
  int checks = 0, failures = 0;

  input_mux dut (.ref_i, .pulse, .sel_pulse, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel_pulse, pulse, ref_i} = 3'(i);
      #10;
      checks++;
      if (y != (sel_pulse ? pulse : ref_i)) begin
        failures++;
        $display("FAIL sel=%0d pulse=%0d ref=%0d y=%0d", sel_pulse, pulse, ref_i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
