`timescale 1ps/1ps
// coarse_delay_line: behavioural model of the coarse delay line (CDL), an
// analog chain of tri-state delay cells that cannot be synthesized as logic.
//
// Cells C1..C15 each delay by TAU_C_PS; C16 is a matching cell that only
// loads Out15 so that every tap sees the same load. tap[0] is the line input
// and tap[k] the output of cell Ck (Out k). The cells form four groups,
// C1-C3, C4-C7, C8-C11 and C12-C15 (C16 goes with the last), and a group
// whose grp_en bit is low is powered off: its cells output 0. The output of
// C16 is left unused on purpose: the cell exists only as a load. Delays are
// transport delays, so pulses shorter than one cell pass intact. The cell
// and group structure are the published ones; the numeric delay (320 ps,
// chosen so 16 cells span a 200 MHz period and 4 cells stay below a 600 MHz
// period) is this model's choice.
module coarse_delay_line
  import pwcc_pkg::*;
#(
  parameter int unsigned TAU_C_PS = 320  // delay of one coarse cell in ps
) (
  input  logic        din,     // line input
  input  logic [N_GROUPS-1:0]    grp_en,  // power enable per cell group
  output logic [N_CDL_CELLS-1:0] tap      // tap[0] = input, tap[k] = Out k
);
  logic [N_CDL_CELLS:0] node;  // node[k] = output of cell Ck, node[0] = input

  assign node[0] = din;

  for (genvar k = 1; k <= N_CDL_CELLS; k++) begin : g_cell
    // group of cell k: C1-C3 -> 0, C4-C7 -> 1, C8-C11 -> 2, C12-C16 -> 3
    localparam int GRP = (k >= 12) ? 3 : k / 4;
    logic cell_in;
    logic cell_out;
    assign cell_in = node[k-1] & grp_en[GRP];
    initial cell_out = 1'b0;
    always @(posedge cell_in) cell_out <= #(TAU_C_PS) 1'b1;
    always @(negedge cell_in) cell_out <= #(TAU_C_PS) 1'b0;
    assign node[k] = cell_out;
  end

  assign tap = node[N_CDL_CELLS-1:0];
endmodule
