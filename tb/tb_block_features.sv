// tb_block_features: blocks of several kinds (flat, ramps, checkerboard,
// random, a single scratch line) are streamed into block_features, back to
// back and with gaps. The mean, range and gradient energy are compared with
// values computed on a 2-D array; each result must appear one clock after
// the block's last word.
module tb_block_features;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int TAPS = 2, BLK = 32, WPB = BLK / TAPS;
  localparam int NB = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, feat_valid;
  pix_t [TAPS-1:0] in_pix;
  btag_t in_tag, feat_tag;
  features_t feat;

  block_features #(.TAPS(TAPS), .BLK(BLK)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_tag, .feat_valid, .feat, .feat_tag);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  blk_t blks [NB];
  features_t exp_f [NB];
  int cyc = 0, last_cyc [$];
  always @(posedge clk) cyc++;

  int ob = 0;
  always @(posedge clk) if (rst_n && feat_valid) begin
    int t;
    t = last_cyc.pop_front();
    chk(cyc - t == 1, $sformatf("latency %0d", cyc - t));
    chk(feat == exp_f[ob], $sformatf("blk %0d: mean %0d range %0d grad %0d, exp %0d %0d %0d", ob,
        feat.mean, feat.range, feat.grad, exp_f[ob].mean, exp_f[ob].range, exp_f[ob].grad));
    chk(feat_tag.col == 16'(ob), "tag col");
    ob++;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int y = 0; y < BLK; y++)
        for (int x = 0; x < BLK; x++)
          case (b % 7)
            0: blks[b][y][x] = 8'(50 + b);
            1: blks[b][y][x] = 8'(x * 8);
            2: blks[b][y][x] = 8'(y * 8);
            3: blks[b][y][x] = (((x + y) % 2) != 0) ? 8'd255 : 8'd0;
            4: blks[b][y][x] = 8'($urandom);
            5: blks[b][y][x] = (y == 13) ? 8'd20 : 8'd120;
            default: blks[b][y][x] = 8'($urandom_range(90, 110));
          endcase
      exp_f[b] = features(blks[b], BLK);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < BLK * WPB; k++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < TAPS; i++) in_pix[i] = pix_t'(blks[b][k / WPB][(k % WPB) * TAPS + i]);
        in_tag = '0;
        in_tag.first = (k == 0); in_tag.last = (k == BLK * WPB - 1);
        in_tag.sol = (k % WPB == 0); in_tag.eol = (k % WPB == WPB - 1);
        in_tag.col = 16'(b);
        if (in_tag.last) last_cyc.push_back(cyc + 1);
      end
      if (b % 3 == 2) begin
        @(negedge clk); in_valid = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    chk(ob == NB, $sformatf("%0d results, exp %0d", ob, NB));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
