`timescale 1ps/1ps
// tb_coarse_delay_line: sends a 150 ps pulse (shorter than one cell) and
// checks that tap k rises k cells later and that the pulse keeps its width;
// then powers groups off and checks that their taps stay low while the
// enabled groups still carry the pulse.
module tb_coarse_delay_line;
  localparam int TAU_C = 320;
  logic        din = 1'b0;
  logic [3:0]  grp_en = 4'b1111;
  logic [15:0] tap;
  int checks = 0, failures = 0;

  coarse_delay_line #(.TAU_C_PS(TAU_C)) dut (.din, .grp_en, .tap);

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

  time t_rise[16], t_fall[16];
  for (genvar k = 0; k < 16; k++) begin : g_mon
    always @(posedge tap[k]) t_rise[k] = $time;
    always @(negedge tap[k]) t_fall[k] = $time;
  end

  function automatic int group_of(input int k);
    if (k == 0)  return -1;
    if (k <= 3)  return 0;
    if (k <= 7)  return 1;
    if (k <= 11) return 2;
    return 3;
  endfunction

  time t0;
  initial begin
    for (int k = 0; k < 16; k++) begin t_rise[k] = 0; t_fall[k] = 0; end
    #1000;
    t0 = $time;
    din = 1'b1; #150; din = 1'b0;
    #(17 * TAU_C);
    for (int k = 0; k < 16; k++) begin
      check(t_rise[k] == t0 + k * TAU_C, $sformatf("tap %0d rises at %0d", k, t_rise[k] - t0));
      check(t_fall[k] - t_rise[k] == 150, $sformatf("tap %0d width %0d", k, t_fall[k] - t_rise[k]));
    end
    // groups 2 and 3 off
    for (int pat = 1; pat < 16; pat = pat * 2 + 1) begin
      int seen[16];
      grp_en = 4'(pat);
      #100;
      for (int k = 0; k < 16; k++) seen[k] = 0;
      fork
        begin din = 1'b1; #150; din = 1'b0; end
        begin
          repeat (17 * TAU_C / 10) begin
            #10;
            for (int k = 0; k < 16; k++) if (tap[k]) seen[k] = 1;
          end
        end
      join
      for (int k = 1; k < 16; k++)
        check(seen[k] == int'(grp_en[group_of(k)]),
              $sformatf("grp_en=%b tap %0d seen=%0d", grp_en, k, seen[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
