// error_calculator: training error of one epoch and the keep/discard
// decision for a trial weight.
//
// For each pattern of an epoch (sample_valid) it adds the squared
// difference (Z - t)^2 between the network result Z and the target code t,
// the numerator of equation (5), and counts a misclassification when the
// class code nearest to Z is not the target's class. clear starts an
// epoch. At epoch_end the accumulated error is compared with the best
// error so far: a trial weight is kept when its error is strictly lower
// (or unconditionally when baseline is set, which records the error of the
// starting weights). One cycle after epoch_end, decided pulses with keep,
// and best_err / best_miss hold the error of the weights now in use.
// With DECIDE_ON_MISS = 1 the misclassification count decides instead:
// a trial is kept when it misclassifies fewer patterns, or as many with a
// lower squared error.
// The division by N*K of equation (5) is left out: N and K are the same
// for every epoch of a run, so it does not change any comparison.
//
// Original design: the squared-error measure, the misclassification
// count and the keep-if-closer rule, and that either measure can drive the
// decision. This design's own choices: the accumulator widths, strict
// comparison, the tie-break and the nearest-code class rule.
module error_calculator
  import nn_pkg::*;
#(
  parameter int unsigned ERR_W  = 32,
  parameter int unsigned MISS_W = 16,
  parameter bit          DECIDE_ON_MISS = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              sample_valid,
  input  logic [7:0]        result,
  input  logic [7:0]        target,
  input  logic              epoch_end,
  input  logic              baseline,
  output logic [ERR_W-1:0]  err_sum,
  output logic [MISS_W-1:0] miss_count,
  output logic              decided,
  output logic              keep,
  output logic [ERR_W-1:0]  best_err,
  output logic [MISS_W-1:0] best_miss
);

  logic signed [8:0] diff;
  logic [15:0]       sq;
  logic              miss;
  logic              better;

  assign diff = signed'({1'b0, result}) - signed'({1'b0, target});
  assign sq   = 16'(diff * diff);
  assign miss = (nearest_class(result) != nearest_class(target));

  if (DECIDE_ON_MISS) begin : g_by_miss
    assign better = (miss_count < best_miss) ||
                    (miss_count == best_miss && err_sum < best_err);
  end else begin : g_by_err
    assign better = (err_sum < best_err);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_sum    <= '0;
      miss_count <= '0;
      decided    <= 1'b0;
      keep       <= 1'b0;
      best_err   <= '1;
      best_miss  <= '1;
    end else begin
      decided <= 1'b0;
      if (clear) begin
        err_sum    <= '0;
        miss_count <= '0;
      end else if (sample_valid) begin
        err_sum    <= err_sum + ERR_W'(sq);
        miss_count <= miss_count + MISS_W'(miss);
      end
      if (epoch_end) begin
        decided <= 1'b1;
        if (baseline || better) begin
          keep      <= 1'b1;
          best_err  <= err_sum;
          best_miss <= miss_count;
        end else begin
          keep <= 1'b0;
        end
      end
    end
  end

endmodule
