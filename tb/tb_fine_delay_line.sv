`timescale 1ps/1ps
// tb_fine_delay_line: for each path length 0..3 cells, a 120 ps pulse must
// come out delayed by that many fine cells with its width intact.
module tb_fine_delay_line;
  localparam int TAU_F = 80;
  logic       din = 1'b0;
  logic [1:0] cells = 2'd0;
  logic       dout;
  int checks = 0, failures = 0;

  fine_delay_line #(.TAU_F_PS(TAU_F)) dut (.din, .cells, .dout);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time t_r, t_f, t0;
  always @(posedge dout) t_r = $time;
  always @(negedge dout) t_f = $time;

  initial begin
    for (int c = 0; c < 4; c++) begin
      cells = 2'(c);
      #1000;
      t0 = $time;
      din = 1'b1; #120; din = 1'b0;
      #1000;
      checks += 2;
      if (t_r - t0 != c * TAU_F) begin failures++; $display("FAIL cells=%0d delay %0d", c, t_r - t0); end
      if (t_f - t_r != 120)      begin failures++; $display("FAIL cells=%0d width %0d", c, t_f - t_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
