`timescale 1ps/1ps
// pwcc_pkg: types and constants shared by the pulsewidth-control circuit.
//
// The circuit measures the input clock period with a coarse delay line
// (16 cells of tau_c, in four groups of four) and a fine delay line (three
// cells of tau_f = tau_c/4), giving a 6-bit period code {Bc[3:0], Bf[1:0]} in
// units of tau_f. The cell counts and code widths are the published ones; the
// state encoding is this design's own.
package pwcc_pkg;

  localparam int unsigned N_CDL_CELLS = 16;  // C1..C15 plus matching cell C16
  localparam int unsigned N_GROUPS    = 4;   // C1-C3, C4-C7, C8-C11, C12-C15
  localparam int unsigned N_FDL_CELLS = 3;   // fine cells
  localparam int unsigned CODE_W      = 6;   // {Bc4..Bc1, Bf2, Bf1}

  // Controller states, in the order they are visited after reset.
  typedef enum logic [2:0] {
    S_RESET  = 3'd0,  // all detector flip-flops cleared
    S_CPI    = 3'd1,  // coarse pulsewidth identifying (one REF period)
    S_COARSE = 3'd2,  // coarse detection (one REF period)
    S_FINE   = 3'd3,  // fine detection (one to three REF periods)
    S_DUTY   = 3'd4,  // duty-cycle setting (one input cycle)
    S_OUTPUT = 3'd5   // output generation until the next reset
  } state_t;

  // Duty-cycle setting code: weights 1/2 (a), 1/4 (b = ~a), 1/8 (c), 1/16 (d).
  typedef struct packed {
    logic a;
    logic c;
    logic d;
  } duty_code_t;

endpackage
