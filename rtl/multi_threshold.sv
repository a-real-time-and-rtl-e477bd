// multi_threshold: defect decision for one block.
//
// Each feature is compared with its threshold; a block is defective when any
// rule fires:
//   dark   : mean  < mean_lo        bright : mean  > mean_hi
//   range  : range > range_hi       grad   : grad  > grad_hi
// The verdict, the mask of rules that fired (bit positions R_* of sqa_pkg),
// the features and the block tag are registered: one clock from feat_valid
// to v_valid. The thresholds are static settings written by the processor.
//
// Classifying blocks by thresholds on their feature values follows the
// document; the four rules are this design's choice.
module multi_threshold
  import sqa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        feat_valid,
  input  features_t   feat,
  input  btag_t       feat_tag,
  input  thresholds_t thr,
  output logic        v_valid,
  output logic        v_defect,
  output logic [3:0]  v_rules,
  output features_t   v_feat,
  output btag_t       v_tag
);

  logic [3:0] rules;

  always_comb begin
    rules           = '0;
    rules[R_DARK]   = feat.mean < thr.mean_lo;
    rules[R_BRIGHT] = feat.mean > thr.mean_hi;
    rules[R_RANGE]  = feat.range > thr.range_hi;
    rules[R_GRAD]   = feat.grad > thr.grad_hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_valid  <= 1'b0;
      v_defect <= 1'b0;
      v_rules  <= '0;
      v_feat   <= '0;
      v_tag    <= '0;
    end else begin
      v_valid <= feat_valid;
      if (feat_valid) begin
        v_defect <= |rules;
        v_rules  <= rules;
        v_feat   <= feat;
        v_tag    <= feat_tag;
      end
    end
  end

endmodule
