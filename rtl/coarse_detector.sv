`timescale 1ps/1ps
// coarse_detector: coarse time-to-digital detector and its
// thermometer-to-binary encoder.
//
// Four flip-flops take REF on their D inputs and are clocked by the four MUX1
// outputs (taps 4g..4g+3 of the coarse delay line, g being the group found by
// the CPI). A flip-flop reads 1 when its delayed REF edge arrived while REF
// was still high, i.e. when that tap's delay is shorter than the REF high
// time. The result is a thermometer code; A4..A1 marks its last 1 (A_j = Q_j
// and not Q_j+1, A4 = Q4). The encoder combines A with the CPI code F:
//   Bc[1:0] = index of the set A bit minus one, Bc[3:2] = index of the set F
//   bit minus one,
// so Bc4..Bc1 is the number of coarse cells whose delay is closest below the
// REF high time (A = 1000 with F = 0100 gives 1011). The flip-flops only
// sample while en is high (clock gating by the control circuit) and are
// cleared by rst_n. Follows the published circuit; the enable is written as a
// qualifier rather than a gated clock.
module coarse_detector (
  input  logic       rst_n,    // asynchronous reset, active low
  input  logic       en,       // coarse-detection state
  input  logic       ref_i,    // REF
  input  logic [3:0] tap_sel,  // MUX1 outputs, tap 4g+j on bit j
  input  logic [3:0] f,        // CPI code F4..F1 (one-hot)
  output logic [3:0] a,        // A4..A1 (one-hot edge of the thermometer)
  output logic [3:0] bc        // Bc4..Bc1
);
  logic [3:0] q;

  for (genvar j = 0; j < 4; j++) begin : g_ff
    always_ff @(posedge tap_sel[j] or negedge rst_n) begin
      if (!rst_n)  q[j] <= 1'b0;
      else if (en) q[j] <= ref_i;
    end
  end

  assign a[0] = q[0] & ~q[1];
  assign a[1] = q[1] & ~q[2];
  assign a[2] = q[2] & ~q[3];
  assign a[3] = q[3];

  assign bc[0] = a[1] | a[3];
  assign bc[1] = a[2] | a[3];
  assign bc[2] = f[1] | f[3];
  assign bc[3] = f[2] | f[3];
endmodule
