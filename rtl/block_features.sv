// block_features: feature values of one BLK x BLK block.
//
// Three features are accumulated over the words of a block, TAPS pixels per
// clock, and delivered one clock after the block's last word:
//   mean  = (sum of the BLK*BLK pixels) >> log2(BLK*BLK)
//   range = max - min of the pixels
//   grad  = (sum over the block of |p(x,y)-p(x-1,y)| + |p(x,y)-p(x,y-1)|) >> 4,
//           differences taken only between pixels of the same block,
//           saturated to 16 bits.
// The pixel above the current one is found in a shift register of one block
// row (BLK/TAPS words), which works because the block stream has no gaps.
// The mean and range catch dark, bright and high-contrast areas; the
// gradient energy catches texture and edges such as scratches and cracks.
//
// That features are computed per block, in parallel with the stream, follows
// the document; which features, and their scaling, are this design's choice.
// BLK*BLK must be a power of two.
module block_features
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
  output logic            feat_valid,
  output features_t       feat,
  output btag_t           feat_tag
);

  localparam int unsigned WPB = BLK / TAPS;
  localparam int unsigned NPX = BLK * BLK;
  localparam int unsigned SH  = $clog2(NPX);
  localparam int unsigned SW  = SH + 8;            // sum width
  localparam int unsigned GW  = SH + 10;           // gradient sum width

  initial assert ((1 << SH) == NPX) else $error("BLK*BLK must be a power of two");

  logic [SW-1:0] acc_sum;
  logic [GW-1:0] acc_grad;
  pix_t          acc_max, acc_min;
  pix_t          prev_last;                 // last pixel of the previous word
  logic          first_row;                 // still in the first row of the block
  pix_t [TAPS-1:0] above [WPB];             // previous block row

  // contributions of the current word
  logic [SW-1:0] w_sum;
  logic [GW-1:0] w_grad;
  pix_t          w_max, w_min;
  logic          w_first_row;

  function automatic pix_t absdiff(pix_t a, pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_comb begin
    w_first_row = in_tag.first || (first_row && !in_tag.first);
    w_sum  = '0;
    w_grad = '0;
    w_max  = in_pix[0];
    w_min  = in_pix[0];
    for (int i = 0; i < TAPS; i++) begin
      w_sum = w_sum + SW'(in_pix[i]);
      if (in_pix[i] > w_max) w_max = in_pix[i];
      if (in_pix[i] < w_min) w_min = in_pix[i];
      // horizontal
      if (i > 0)
        w_grad = w_grad + GW'(absdiff(in_pix[i], in_pix[(i > 0) ? i - 1 : 0]));
      else if (!in_tag.sol)
        w_grad = w_grad + GW'(absdiff(in_pix[0], prev_last));
      // vertical
      if (!w_first_row)
        w_grad = w_grad + GW'(absdiff(in_pix[i], above[0][i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sum    <= '0;
      acc_grad   <= '0;
      acc_max    <= '0;
      acc_min    <= '0;
      prev_last  <= '0;
      first_row  <= 1'b0;
      for (int k = 0; k < WPB; k++) above[k] <= '0;
      feat_valid <= 1'b0;
      feat       <= '0;
      feat_tag   <= '0;
    end else begin
      feat_valid <= 1'b0;
      if (in_valid) begin
        logic [SW-1:0] n_sum;
        logic [GW-1:0] n_grad;
        pix_t          n_max, n_min;
        if (in_tag.first) begin
          n_sum  = w_sum;
          n_grad = w_grad;
          n_max  = w_max;
          n_min  = w_min;
        end else begin
          n_sum  = acc_sum + w_sum;
          n_grad = acc_grad + w_grad;
          n_max  = (w_max > acc_max) ? w_max : acc_max;
          n_min  = (w_min < acc_min) ? w_min : acc_min;
        end
        acc_sum   <= n_sum;
        acc_grad  <= n_grad;
        acc_max   <= n_max;
        acc_min   <= n_min;
        prev_last <= in_pix[TAPS-1];
        first_row <= w_first_row && !in_tag.eol;
        for (int k = 0; k < WPB - 1; k++) above[k] <= above[k + 1];
        above[WPB-1] <= in_pix;
        if (in_tag.last) begin
          feat_valid <= 1'b1;
          feat.mean  <= n_sum[SW-1:SH];
          feat.range <= n_max - n_min;
          feat.grad  <= (32'(n_grad >> 4) > 32'hFFFF) ? 16'hFFFF : 16'(n_grad >> 4);
          feat_tag   <= in_tag;
        end
      end
    end
  end

endmodule
