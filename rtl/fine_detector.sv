`timescale 1ps/1ps
// fine_detector: serial fine detector with its thermometer-to-binary encoder.
//
// One flip-flop, clocked by the rising edge of REF1 (the end of the REF
// pulse), samples Input_buf, the REF edge delayed by the coarse result plus
// the enabled fine path. A 1 means Input_buf leads REF1: the delay is still
// shorter than the REF high time. The shift register Q4..Q1 (Q1 fixed at 1
// after reset, so it starts at 0001) selects the path: 0001 path 1 (three
// cells), 0011 path 2 (two cells), 0111 path 3 (one cell). At each step (the
// end of a REF period, one input cycle after the sample) a lead ends the
// detection; a lag shifts another 1 into Q and tries the next, shorter path.
// Three lags give Q = 1111 and also end it. The fine code is
//   Bf = 3 - (number of ones in Q4..Q2): 0001 -> 11, 0011 -> 10, 0111 -> 01,
//   1111 -> 00.
// finish_now tells the controller that the current step ends detection, so it
// can leave fine detection on that same edge; fd_finish stays high
// afterwards. Detection therefore takes one to three REF periods (2 to 6
// input cycles). The serial scheme, the Q codes and the encoding follow the
// published circuit; running Q on the input clock with a step strobe is this
// design's choice.
module fine_detector (
  input  logic       clk,         // input clock
  input  logic       rst_n,       // asynchronous reset, active low
  input  logic       en,          // fine-detection state
  input  logic       step,        // end of a REF period (with en)
  input  logic       ref1,        // REF1, rising edge at the end of the REF pulse
  input  logic       input_buf,   // FDL output
  output logic [1:0] cells,       // fine cells in the enabled path
  output logic       finish_now,  // this step ends detection
  output logic       fd_finish,   // Fd_finish
  output logic [1:0] bf           // Bf2..Bf1
);
  logic       samp;    // Input_buf leads REF1
  logic [4:1] q;       // Q4..Q1
  logic [1:0] n_ones;  // ones in Q4..Q2

  always_ff @(posedge ref1 or negedge rst_n) begin
    if (!rst_n) samp <= 1'b0;
    else        samp <= input_buf;
  end

  assign n_ones     = 2'(q[2]) + 2'(q[3]) + 2'(q[4]);
  assign cells      = 2'd3 - n_ones;
  assign bf         = cells;
  assign finish_now = en && step && !fd_finish && (samp || q[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= 4'b0001;
      fd_finish <= 1'b0;
    end else if (en && step && !fd_finish) begin
      if (samp) begin
        fd_finish <= 1'b1;
      end else begin
        q <= {q[3:1], 1'b1};
        if (q[3]) fd_finish <= 1'b1;
      end
    end
  end
endmodule
