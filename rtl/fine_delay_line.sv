`timescale 1ps/1ps
// fine_delay_line: behavioural model of the fine delay line (FDL), three
// analog tri-state delay cells of TAU_F_PS each.
//
// The enabled path passes the input through the last `cells` cells: path 1
// uses three cells, path 2 two, path 3 one, and the bypass path none. The
// output is Input_buf during fine detection and Out_fine during output
// generation. tau_f is a quarter of the coarse delay as published; the
// numeric value and the bypass path are this model's choices.
module fine_delay_line
  import pwcc_pkg::*;
#(
  parameter int unsigned TAU_F_PS = 80  // delay of one fine cell in ps
) (
  input  logic       din,    // Input_fine (MUX2 output)
  input  logic [1:0] cells,  // number of fine cells in the enabled path, 0..3
  output logic       dout    // Input_buf / Out_fine
);
  logic [N_FDL_CELLS:0] node;  // node[k] = input delayed by k cells

  assign node[0] = din;

  for (genvar k = 1; k <= N_FDL_CELLS; k++) begin : g_cell
    logic cell_out;
    initial cell_out = 1'b0;
    always @(posedge node[k-1]) cell_out <= #(TAU_F_PS) 1'b1;
    always @(negedge node[k-1]) cell_out <= #(TAU_F_PS) 1'b0;
    assign node[k] = cell_out;
  end

  assign dout = node[cells];
endmodule
