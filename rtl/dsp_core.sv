// dsp_core: the block processing chain of the image processing unit.
//
// Raw block words from the block RAM pass through pre_denoise (1x3 median),
// block_features (mean, range, gradient energy) and multi_threshold (defect
// decision). One verdict comes out per block, four clocks after the block's
// last word (2 denoise + 1 features + 1 threshold). The core accepts one word
// of TAPS pixels every clock and never stalls, so it keeps pace with the
// block RAM read side.
//
// The chain (denoise, features, thresholds) follows the document; the
// filter, the features and the rules inside it are this design's choices.
module dsp_core
  import sqa_pkg::*;
#(
  parameter int unsigned TAPS = 2,
  parameter int unsigned BLK  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  pix_t [TAPS-1:0] in_pix,
  input  btag_t           in_tag,
  input  thresholds_t     thr,
  output logic            v_valid,
  output logic            v_defect,
  output logic [3:0]      v_rules,
  output features_t       v_feat,
  output btag_t           v_tag
);

  logic            d_valid;
  pix_t [TAPS-1:0] d_pix;
  btag_t           d_tag;
  logic            f_valid;
  features_t       f_feat;
  btag_t           f_tag;

  pre_denoise #(.TAPS(TAPS)) u_denoise (
    .clk, .rst_n,
    .in_valid, .in_pix, .in_tag,
    .out_valid (d_valid), .out_pix (d_pix), .out_tag (d_tag)
  );

  block_features #(.TAPS(TAPS), .BLK(BLK)) u_features (
    .clk, .rst_n,
    .in_valid (d_valid), .in_pix (d_pix), .in_tag (d_tag),
    .feat_valid (f_valid), .feat (f_feat), .feat_tag (f_tag)
  );

  multi_threshold u_thresh (
    .clk, .rst_n,
    .feat_valid (f_valid), .feat (f_feat), .feat_tag (f_tag), .thr,
    .v_valid, .v_defect, .v_rules, .v_feat, .v_tag
  );

endmodule
