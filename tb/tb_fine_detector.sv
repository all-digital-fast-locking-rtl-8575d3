`timescale 1ps/1ps
// tb_fine_detector: for each true fine count b (0..3) the FDL output is made
// to lead REF1 exactly when the enabled path has at most b cells. The
// detector must try paths of 3, 2, 1 cells in that order, one per REF period,
// end after 2, 4, 6 or 6 input cycles (b = 3, 2, 1, 0), report Bf = b, keep
// Fd_finish high and stop shifting afterwards.
module tb_fine_detector;
  logic       clk = 1'b0, rst_n = 1'b1, en = 1'b0, ref_s = 1'b0;
  logic       step, ref1, input_buf;
  logic [1:0] cells, bf;
  logic       finish_now, fd_finish;
  int checks = 0, failures = 0;
  int b_true = 0;

  fine_detector dut (.clk, .rst_n, .en, .step, .ref1, .input_buf, .cells,
                     .finish_now, .fd_finish, .bf);

  always begin clk = 1'b1; #1000; clk = 1'b0; #1000; end

  // REF = input clock divided by two; a period starts where REF is low
  always @(posedge clk) ref_s <= ~ref_s;
  assign step = ~ref_s;
  assign ref1 = ~ref_s;
  assign input_buf = (int'(cells) <= b_true);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t b=%0d: %s", $time, b_true, what); end
  endtask

  task automatic run(input int b);
    int cyc, exp_cyc, n_cells;
    int path_seq[$];
    b_true = b;
    @(negedge clk) rst_n = 1'b0;
    #10 check(cells == 2'd3 && !fd_finish, "reset: path 1 (three cells)");
    @(negedge clk) rst_n = 1'b1;
    // enable on the edge that starts a REF period, as the controller does
    do @(posedge clk); while (ref_s != 1'b0);
    #1 en = 1'b1;
    cyc = 0;
    path_seq.push_back(int'(cells));
    forever begin
      @(posedge clk);
      cyc++;
      if (finish_now) break;
      #1;
      if (path_seq[$] != int'(cells)) path_seq.push_back(int'(cells));
      if (cyc > 20) break;
    end
    exp_cyc = (b == 3) ? 2 : (b == 2) ? 4 : 6;
    check(cyc == exp_cyc, $sformatf("finished after %0d cycles, expected %0d", cyc, exp_cyc));
    n_cells = 3;
    foreach (path_seq[i]) begin
      check(path_seq[i] == n_cells, $sformatf("path %0d has %0d cells", i + 1, path_seq[i]));
      n_cells--;
    end
    #1;
    check(fd_finish, "Fd_finish set");
    check(bf == 2'(b), $sformatf("Bf=%0d expected %0d", bf, b));
    repeat (6) @(posedge clk);
    #1;
    check(bf == 2'(b) && fd_finish, "result held after finish");
    en = 1'b0;
  endtask

  initial begin
    for (int b = 3; b >= 0; b--) run(b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
