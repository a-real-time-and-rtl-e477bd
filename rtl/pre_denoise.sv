// pre_denoise: impulse-noise removal ahead of the feature computation.
//
// Each pixel is replaced by the median of itself and its left and right
// neighbours in the same block row. At the left and right edge of a block
// row the edge pixel stands in for the missing neighbour, so a block is
// filtered without looking at its neighbours. The stream carries TAPS pixels
// per word; the right neighbour of the last tap is the first pixel of the
// next word, so a word is held for one clock until that word arrives. This
// relies on the block stream having no gap inside a block row (checked by an
// assertion). Latency: two clocks (hold + output register); the tag travels
// with its word.
//
// That blocks are denoised before their features are computed follows the
// document; the 1x3 median is this design's choice, the filter itself not
// being given there.
module pre_denoise
  import sqa_pkg::*;
#(
  parameter int unsigned TAPS = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  pix_t [TAPS-1:0] in_pix,
  input  btag_t           in_tag,
  output logic            out_valid,
  output pix_t [TAPS-1:0] out_pix,
  output btag_t           out_tag
);

  function automatic pix_t median3(pix_t a, pix_t b, pix_t c);
    pix_t lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    // median = max(min(a,b), min(max(a,b), c))
    if (c < hi) hi = c;
    return (lo > hi) ? lo : hi;
  endfunction

  logic            h_valid;
  pix_t [TAPS-1:0] h_pix;
  btag_t           h_tag;
  pix_t            h_left;     // left neighbour of tap 0 of the held word

  pix_t [TAPS-1:0] med;

  always_comb begin
    for (int i = 0; i < TAPS; i++) begin
      pix_t l, r;
      l = (i == 0) ? h_left : h_pix[(i == 0) ? 0 : i - 1];
      if (i == TAPS - 1) r = h_tag.eol ? h_pix[i] : in_pix[0];
      else               r = h_pix[(i == TAPS - 1) ? i : i + 1];
      med[i] = median3(l, h_pix[i], r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_valid   <= 1'b0;
      h_pix     <= '0;
      h_tag     <= '0;
      h_left    <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_tag   <= '0;
    end else begin
      h_valid <= in_valid;
      if (in_valid) begin
        h_pix  <= in_pix;
        h_tag  <= in_tag;
        h_left <= in_tag.sol ? in_pix[0] : h_pix[TAPS-1];
      end
      out_valid <= h_valid;
      if (h_valid) begin
        out_pix <= med;
        out_tag <= h_tag;
      end
    end
  end

  // the right neighbour must be present when the held word is not a row end
  property p_row_continuous;
    @(posedge clk) disable iff (!rst_n) (h_valid && !h_tag.eol) |-> in_valid;
  endproperty
  assert property (p_row_continuous);

endmodule
