`timescale 1ps/1ps
// tb_mux2: all data patterns and selects; the output must be input sel.
module tb_mux2;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  int checks = 0, failures = 0;

  mux2 dut (.d, .sel, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {sel, d} = 6'(i);
      #10;
      checks++;
      if (y != ((d >> sel) & 4'd1)) begin
        failures++;
        $display("FAIL d=%b sel=%0d y=%0d", d, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
