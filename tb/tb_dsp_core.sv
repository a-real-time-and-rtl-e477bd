// tb_dsp_core: whole blocks go through the denoise -> features -> threshold
// chain. The blocks are made so that each rule fires on some of them (dark,
// bright, high contrast, strong texture) and others stay clean, and some
// carry impulse noise that the median must remove before the range rule sees
// it. Expected verdicts come from the 2-D reference model; the verdict must
// appear four clocks after the block's last word.
module tb_dsp_core;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int TAPS = 2, BLK = 32, WPB = BLK / TAPS;
  localparam int NB = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, v_valid, v_defect;
  pix_t [TAPS-1:0] in_pix;
  btag_t in_tag, v_tag;
  thresholds_t thr;
  logic [3:0] v_rules;
  features_t v_feat;

  dsp_core #(.TAPS(TAPS), .BLK(BLK)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_tag, .thr,
    .v_valid, .v_defect, .v_rules, .v_feat, .v_tag);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  blk_t blks [NB];
  features_t exp_f [NB];
  logic [3:0] exp_r [NB];
  int cyc = 0, last_cyc [$];
  int fired [4], clean = 0, saved_by_median = 0;
  always @(posedge clk) cyc++;

  int ob = 0;
  always @(posedge clk) if (rst_n && v_valid) begin
    int t;
    t = last_cyc.pop_front();
    chk(cyc - t == 4, $sformatf("latency %0d", cyc - t));
    chk(v_feat == exp_f[ob], $sformatf("blk %0d features", ob));
    chk(v_rules == exp_r[ob] && v_defect == (exp_r[ob] != 0), $sformatf("blk %0d rules %b exp %b", ob, v_rules, exp_r[ob]));
    chk(v_tag.col == 16'(ob), "tag");
    ob++;
  end

  initial begin
    thr = '{mean_lo: 8'd60, mean_hi: 8'd180, range_hi: 8'd60, grad_hi: 16'd1500};
    for (int b = 0; b < NB; b++) begin
      for (int y = 0; y < BLK; y++)
        for (int x = 0; x < BLK; x++) begin
          int v;
          v = 110 + $urandom_range(0, 6);
          case (b % 6)
            1: v = 30 + $urandom_range(0, 6);                         // dark
            2: v = 210 + $urandom_range(0, 6);                        // bright
            3: if (y >= 10 && y < 14 && x >= 8 && x < 20) v = 20;     // spot
            4: v = (((x / 2 + y) % 2) != 0) ? 150 : 70;                     // texture
            5: if (x % 3 == 1 && $urandom_range(0, 99) < 5) v = 255; // isolated impulses
            default: ;
          endcase
          blks[b][y][x] = 8'(v);
        end
      exp_f[b] = features(denoise(blks[b], BLK), BLK);
      exp_r[b] = rules(exp_f[b], thr);
      for (int k = 0; k < 4; k++) if (exp_r[b][k]) fired[k]++;
      if (exp_r[b] == 0) clean++;
      if (exp_r[b] == 0 && rules(features(blks[b], BLK), thr) != 0) saved_by_median++;
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
      if (b % 4 == 3) begin
        @(negedge clk); in_valid = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    chk(ob == NB, $sformatf("%0d verdicts, exp %0d", ob, NB));
    for (int k = 0; k < 4; k++) chk(fired[k] > 0, $sformatf("rule %0d never exercised", k));
    chk(clean > 0, "no clean block");
    chk(saved_by_median > 0, "no block where the median mattered");
    $display("rules fired %0d %0d %0d %0d, clean %0d, cleaned by median %0d", fired[0], fired[1], fired[2], fired[3], clean, saved_by_median);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
