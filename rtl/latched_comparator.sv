// latched_comparator -- behavioural model of the latched current comparator
// at the end of the predictor's positive and negative summation lines.
//
// On a clock edge with latch_en set it samples the two line currents and
// holds two decisions until the next sample: taken = (i_pos >= i_neg), the
// branch prediction, and weak = (|i_pos - i_neg| < THETA), the threshold
// comparison done in parallel with the prediction so that the training
// decision needs no second table read.  The real part is an analog latched
// comparator behind a current-difference stage; here currents are integers
// in the units of mlmc_array.  THETA is in the same units; its default 212
// is twice (the cell units are half weight steps) the usual perceptron
// threshold floor(1.93*h + 14) = 106 for h = 48, which is this design's
// choice.  Outputs are registered: valid one cycle after latch_en.
module latched_comparator #(
  parameter int unsigned IW    = 11,
  parameter int unsigned THETA = 212
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          latch_en,
  input  logic [IW-1:0] i_pos,
  input  logic [IW-1:0] i_neg,
  output logic          taken,
  output logic          is_weak
);
  logic [IW-1:0] diff;
  assign diff = (i_pos >= i_neg) ? (i_pos - i_neg) : (i_neg - i_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken <= 1'b0;
      is_weak  <= 1'b1;
    end else if (latch_en) begin
      taken <= (i_pos >= i_neg);
      is_weak  <= ({1'b0, diff} < (IW+1)'(THETA));
    end
  end
endmodule
