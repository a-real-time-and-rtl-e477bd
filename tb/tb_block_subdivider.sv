// tb_block_subdivider: lines of a known image (pixel = f(line, x)) are fed to
// block_subdivider at 128-pixel line width. Phase 1 uses line blanking and
// inserts a short line (must be discarded) and a long line (must be cut);
// every output word is compared with the image through the list of lines
// the module should have kept, together with its tag, and each band must
// come out as one unbroken run of LINE_WIDTH*BLK/TAPS words. Phase 2 sends
// lines with no blanking at all, which must make the module drop lines
// because both banks are full (overflow); its output is then only checked
// for tag consistency.
module tb_block_subdivider;
  import sqa_pkg::*;

  localparam int LW = 128, BLK = 32, TAPS = 2;
  localparam int WPL = LW / TAPS, WPB = BLK / TAPS, NBLK = LW / BLK;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sol = 0, in_eol = 0;
  pix_t [TAPS-1:0] in_pix;
  logic blk_valid;
  pix_t [TAPS-1:0] blk_pix;
  btag_t blk_tag;
  logic [31:0] lines_dropped, lines_bad, bands_done;

  block_subdivider #(.LINE_WIDTH(LW), .BLK(BLK), .TAPS(TAPS)) dut (.clk, .rst_n,
    .in_valid, .in_pix, .in_sol, .in_eol, .blk_valid, .blk_pix, .blk_tag,
    .lines_dropped, .lines_bad, .bands_done);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic pix_t f(int line, int x);
    return pix_t'(line * 7 + x * 13 + (line ^ x));
  endfunction

  int kept [$];          // ids of the lines that should be stored, in order
  bit check_data = 1;

  task automatic send_line(int id, int nwords, int gap);
    for (int w = 0; w < nwords; w++) begin
      @(negedge clk);
      in_valid = 1; in_sol = (w == 0); in_eol = (w == nwords - 1);
      for (int i = 0; i < TAPS; i++) in_pix[i] = f(id, w * TAPS + i);
    end
    if (gap > 0) begin
      @(negedge clk);
      in_valid = 0; in_sol = 0; in_eol = 0;
      repeat (gap - 1) @(negedge clk);
    end
  endtask

  // checker
  int exp_word = 0;       // word index inside the current band
  int band = 0;
  int run = 0, runs_ok = 0;
  always @(posedge clk) if (rst_n) begin
    if (blk_valid) begin
      int c, r, w, id;
      c = exp_word / (BLK * WPB);
      r = (exp_word / WPB) % BLK;
      w = exp_word % WPB;
      chk(blk_tag.col == 16'(c) && blk_tag.band == 16'(band), $sformatf("tag col %0d band %0d exp %0d %0d", blk_tag.col, blk_tag.band, c, band));
      chk(blk_tag.first == (r == 0 && w == 0) && blk_tag.last == (r == BLK - 1 && w == WPB - 1)
          && blk_tag.sol == (w == 0) && blk_tag.eol == (w == WPB - 1), "tag flags");
      if (check_data) begin
        id = kept[band * BLK + r];
        for (int i = 0; i < TAPS; i++)
          chk(blk_pix[i] == f(id, c * BLK + w * TAPS + i),
              $sformatf("band %0d blk %0d row %0d word %0d tap %0d: %h exp %h", band, c, r, w, i, blk_pix[i], f(id, c * BLK + w * TAPS + i)));
      end
      run++;
      exp_word++;
      if (exp_word == NBLK * BLK * WPB) begin
        exp_word = 0; band++;
        chk(run == NBLK * BLK * WPB, $sformatf("band read in %0d clocks without gap, exp %0d", run, NBLK * BLK * WPB));
        runs_ok++;
      end
    end else run = 0;
  end

  initial begin
    automatic int id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: 3 bands, with one short and one long line in band 1
    for (int l = 0; l < 3 * BLK; l++) begin
      if (l == 40) begin send_line(1000, WPL - 5, 6); end          // short: dropped
      if (l == 50) begin
        // long line: the first WPL words count
        send_line(id, WPL + 3, 6); kept.push_back(id); id++;
        continue;
      end
      send_line(id, WPL, 6); kept.push_back(id); id++;
    end
    repeat (3 * NBLK * BLK * WPB) @(posedge clk);
    chk(bands_done == 3, $sformatf("bands_done %0d exp 3", bands_done));
    chk(lines_bad == 2, $sformatf("lines_bad %0d exp 2", lines_bad));
    chk(lines_dropped == 0, $sformatf("lines_dropped %0d exp 0", lines_dropped));
    // phase 2: no blanking
    @(negedge clk);
    check_data = 0;
    for (int l = 0; l < 5 * BLK; l++) send_line(id + l, WPL, 0);
    @(negedge clk);
    in_valid = 0; in_sol = 0; in_eol = 0;
    repeat (3 * NBLK * BLK * WPB) @(posedge clk);
    chk(lines_dropped > 0, $sformatf("overflow: lines_dropped %0d", lines_dropped));
    chk(32'(runs_ok) == bands_done, "all bands complete");
    $display("lines_dropped=%0d bands=%0d", lines_dropped, bands_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
