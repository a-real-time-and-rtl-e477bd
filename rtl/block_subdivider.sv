// block_subdivider: cuts the line-scan image into BLK x BLK pixel blocks held
// in block RAM.
//
// A line-scan camera delivers the strip one line at a time. To work on square
// blocks, BLK consecutive lines (a "band") are written into one bank of a
// two-bank block RAM. When a bank holds a full band it is handed to the read
// side, and the next band is written into the other bank. The read side
// sends the band out block by block, left to right: for each block, BLK rows
// of BLK/TAPS words, row by row, one word per clock and without a gap, so a
// band of LINE_WIDTH/BLK blocks takes exactly BLK*LINE_WIDTH/TAPS clocks,
// the same time the camera needs to deliver it at one word per clock.
//
// Input: the line stream of cl_driver (TAPS pixels per word, sol/eol).
// Only lines of exactly LINE_WIDTH pixels are kept: a line that ends early is
// discarded, a line that runs long is cut; both are counted in lines_bad.
// A line that starts while both banks are still full is dropped and counted
// in lines_dropped (overflow). Output: the block stream with a btag_t per
// word; the word of a read appears one clock after its address (RAM latency).
//
// The 32x32 block held in block RAM follows the document; the two banks, the
// read order and the handling of bad and overflowing lines are this design's
// choices.
module block_subdivider
  import sqa_pkg::*;
#(
  parameter int unsigned LINE_WIDTH = 4000, // pixels per line
  parameter int unsigned BLK        = 32,   // block edge in pixels
  parameter int unsigned TAPS       = 2     // pixels per word
) (
  input  logic            clk,
  input  logic            rst_n,
  // line stream in
  input  logic            in_valid,
  input  pix_t [TAPS-1:0] in_pix,
  input  logic            in_sol,
  input  logic            in_eol,
  // block stream out
  output logic            blk_valid,
  output pix_t [TAPS-1:0] blk_pix,
  output btag_t           blk_tag,
  // status
  output logic [31:0]     lines_dropped,
  output logic [31:0]     lines_bad,
  output logic [31:0]     bands_done
);

  localparam int unsigned WPL   = LINE_WIDTH / TAPS;   // words per line
  localparam int unsigned WPB   = BLK / TAPS;          // words per block row
  localparam int unsigned NBLK  = LINE_WIDTH / BLK;    // blocks per band
  localparam int unsigned BANKW = BLK * WPL;           // words per bank
  localparam int unsigned DEPTH = 2 * BANKW;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(WPL + 1);
  localparam int unsigned RW    = (BLK > 1) ? $clog2(BLK) : 1;
  localparam int unsigned BW    = (WPB > 1) ? $clog2(WPB) : 1;
  localparam int unsigned KW    = (NBLK > 1) ? $clog2(NBLK) : 1;

  initial begin
    assert (LINE_WIDTH % BLK == 0) else $error("LINE_WIDTH must be a multiple of BLK");
    assert (BLK % TAPS == 0) else $error("BLK must be a multiple of TAPS");
  end

  logic [1:0] bank_full;
  logic [1:0] full_set, full_clr;

  // ---------------- write side ----------------
  logic          wbank;
  logic [RW-1:0] wrow;
  logic [CW-1:0] wcol;       // words written in the current line
  logic          wactive;    // current line is being kept

  logic          ram_we;
  logic [AW-1:0] ram_waddr;

  // a word is stored while the line is kept and not yet full
  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = AW'(wbank * BANKW + wrow * WPL);
    if (in_valid) begin
      if (in_sol) begin
        ram_we    = !bank_full[wbank];
        ram_waddr = AW'(wbank * BANKW + wrow * WPL);
      end else if (wactive && wcol < CW'(WPL)) begin
        ram_we    = 1'b1;
        ram_waddr = AW'(wbank * BANKW + wrow * WPL + wcol);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank         <= 1'b0;
      wrow          <= '0;
      wcol          <= '0;
      wactive       <= 1'b0;
      lines_dropped <= '0;
      lines_bad     <= '0;
      full_set      <= '0;
    end else begin
      full_set <= '0;
      if (in_valid) begin
        logic [CW-1:0] n_words;   // words of this line so far, this one included
        logic          keep;      // line is being kept after this word
        if (in_sol) begin
          keep    = !bank_full[wbank];
          n_words = CW'(1);
          if (!keep) lines_dropped <= lines_dropped + 32'd1;
        end else begin
          keep    = wactive;
          // extra words of a long line are not counted (nor stored)
          n_words = (wcol < CW'(WPL)) ? wcol + CW'(1) : wcol;
        end
        wcol    <= n_words;
        wactive <= keep;
        if (in_eol && keep) begin
          wactive <= 1'b0;
          if (n_words == CW'(WPL)) begin
            if (!in_sol && wactive && wcol == CW'(WPL))
              lines_bad <= lines_bad + 32'd1;   // long line, cut
            if (wrow == RW'(BLK - 1)) begin
              wrow            <= '0;
              wbank           <= ~wbank;
              full_set[wbank] <= 1'b1;
            end else begin
              wrow <= wrow + RW'(1);
            end
          end else begin
            lines_bad <= lines_bad + 32'd1;     // short line, discarded
          end
        end
      end
    end
  end

  // ---------------- bank hand-over ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_full <= '0;
    else        bank_full <= (bank_full | full_set) & ~full_clr;
  end

  // ---------------- read side ----------------
  logic          rbank;
  logic          rbusy;
  logic [KW-1:0] rblk;
  logic [RW-1:0] rrow;
  logic [BW-1:0] rw;
  logic [15:0]   rband;
  logic          ram_re;
  logic [AW-1:0] ram_raddr;
  btag_t         rtag;

  assign ram_re        = rbusy;
  assign ram_raddr     = AW'(rbank * BANKW + rrow * WPL + rblk * WPB + rw);

  always_comb begin
    rtag       = '0;
    rtag.first = (rrow == '0) && (rw == '0);
    rtag.last  = (rrow == RW'(BLK - 1)) && (rw == BW'(WPB - 1));
    rtag.sol   = (rw == '0);
    rtag.eol   = (rw == BW'(WPB - 1));
    rtag.col   = 16'(rblk);
    rtag.band  = rband;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbank      <= 1'b0;
      rbusy      <= 1'b0;
      rblk       <= '0;
      rrow       <= '0;
      rw         <= '0;
      rband      <= '0;
      full_clr   <= '0;
      bands_done <= '0;
      blk_valid  <= 1'b0;
      blk_tag    <= '0;
    end else begin
      full_clr  <= '0;
      blk_valid <= rbusy;
      blk_tag   <= rtag;
      if (!rbusy) begin
        // full_clr of the previous band is still pending for one clock
        if (bank_full[rbank] && !full_clr[rbank]) rbusy <= 1'b1;
      end else begin
        if (rw != BW'(WPB - 1)) begin
          rw <= rw + BW'(1);
        end else begin
          rw <= '0;
          if (rrow != RW'(BLK - 1)) begin
            rrow <= rrow + RW'(1);
          end else begin
            rrow <= '0;
            if (rblk != KW'(NBLK - 1)) begin
              rblk <= rblk + KW'(1);
            end else begin
              rblk            <= '0;
              rbusy           <= 1'b0;
              full_clr[rbank] <= 1'b1;
              rbank           <= ~rbank;
              rband           <= rband + 16'd1;
              bands_done      <= bands_done + 32'd1;
            end
          end
        end
      end
    end
  end

  sdp_ram #(.WIDTH(TAPS * 8), .DEPTH(DEPTH)) u_ram (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (in_pix),
    .re    (ram_re),
    .raddr (ram_raddr),
    .rdata (blk_pix)
  );

  // the block stream has no gap inside a block
  property p_no_gap;
    @(posedge clk) disable iff (!rst_n) (blk_valid && !blk_tag.last) |=> blk_valid;
  endproperty
  assert property (p_no_gap);

endmodule
