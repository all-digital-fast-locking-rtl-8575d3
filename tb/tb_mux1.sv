`timescale 1ps/1ps
// tb_mux1: random tap patterns for every group select; output j must be tap
// 4*group + j.
module tb_mux1;
  logic [15:0] tap;
  logic [1:0]  grp_sel;
  logic [3:0]  y;
  int checks = 0, failures = 0;

  mux1 dut (.tap, .grp_sel, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      tap = 16'($urandom);
      grp_sel = 2'($urandom);
      #10;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (y[j] != tap[4 * grp_sel + j]) begin
          failures++;
          $display("FAIL tap=%h grp=%0d y=%b", tap, grp_sel, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
