// tb_defect_packer: a stream of random raw blocks is fed to defect_packer,
// with a verdict for each block arriving four clocks after its last word, as
// the DSP core delivers it; the testbench decides which blocks are defective.
// Phase 1 starts with a run of six defective blocks that must all pass with
// out_ready held high, then stalls the output at random for single clocks:
// every defective block must come out, in order, with its raw pixels and its
// descriptor, and every clean block must be freed. Phase 2 holds out_ready
// low for several block times, so blocks must be dropped; the counters must
// still add up and every packet that does come out must be right. A beat
// must not change while it is stalled.
module tb_defect_packer;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int TAPS = 2, BLK = 32, WPB = BLK / TAPS, WPK = BLK * WPB;
  localparam int NB1 = 24, NB2 = 16, NB = NB1 + NB2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  pix_t [TAPS-1:0] in_pix;
  btag_t in_tag;
  logic v_valid = 0, v_defect = 0;
  logic [3:0] v_rules = 0;
  features_t v_feat = '0;
  btag_t v_tag = '0;
  logic out_valid, out_ready = 1, out_first, out_last;
  pix_t [TAPS-1:0] out_pix;
  desc_t out_desc;
  logic [31:0] blocks_sent, blocks_clean, blocks_dropped, stall_cycles;

  defect_packer #(.TAPS(TAPS), .BLK(BLK)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_tag,
    .v_valid, .v_defect, .v_rules, .v_feat, .v_tag,
    .out_valid, .out_ready, .out_pix, .out_first, .out_last, .out_desc,
    .blocks_sent, .blocks_clean, .blocks_dropped, .stall_cycles);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  blk_t blks [NB];
  bit defect [NB];
  int n_defect = 0;
  bit random_stall = 0;

  // verdicts: four clocks after the block's last word
  int vq_blk [$];
  int vq_at [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    v_valid = 0;
    if (vq_at.size() > 0 && vq_at[0] == cyc) begin
      int b;
      void'(vq_at.pop_front());
      b = vq_blk.pop_front();
      v_valid = 1;
      v_defect = defect[b];
      v_rules = defect[b] ? 4'(1 << (b % 4)) : 4'd0;
      v_feat = '{mean: 8'(b), range: 8'(b * 3), grad: 16'(b * 100)};
      v_tag = '0; v_tag.col = 16'(b);
    end
    if (random_stall) out_ready = ($urandom_range(0, 99) > 4);
  end

  // packet checker
  int pk_word = 0, last_col = -1, packets = 0;
  logic [TAPS*8-1:0] prev_pix;
  bit prev_stalled = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && prev_stalled) chk(out_pix == prev_pix, "beat changed during stall");
    prev_stalled = out_valid && !out_ready;
    prev_pix = out_pix;
    if (out_valid && out_ready) begin
      int b, y, x0;
      b = int'(out_desc.col);
      y = pk_word / WPB; x0 = (pk_word % WPB) * TAPS;
      if (pk_word == 0) begin
        chk(out_first, "first flag");
        chk(b > last_col && b < NB && defect[b], $sformatf("packet for block %0d (last %0d)", b, last_col));
        chk(out_desc.rules == 4'(1 << (b % 4)) && out_desc.feat.grad == 16'(b * 100), "descriptor");
        last_col = b;
      end
      for (int i = 0; i < TAPS; i++)
        chk(out_pix[i] == pix_t'(blks[b][y][x0 + i]), $sformatf("blk %0d word %0d tap %0d", b, pk_word, i));
      chk(out_last == (pk_word == WPK - 1), "last flag");
      pk_word++;
      if (pk_word == WPK) begin pk_word = 0; packets++; end
    end
  end

  task automatic send_block(int b);
    for (int k = 0; k < WPK; k++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < TAPS; i++) in_pix[i] = pix_t'(blks[b][k / WPB][(k % WPB) * TAPS + i]);
      in_tag = '0;
      in_tag.first = (k == 0); in_tag.last = (k == WPK - 1);
      in_tag.sol = (k % WPB == 0); in_tag.eol = (k % WPB == WPB - 1);
      in_tag.col = 16'(b);
      if (in_tag.last) begin vq_blk.push_back(b); vq_at.push_back(cyc + 4); end
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int y = 0; y < BLK; y++) for (int x = 0; x < BLK; x++) blks[b][y][x] = 8'($urandom);
      defect[b] = (b >= NB1) ? 1'b1 : ($urandom_range(0, 2) == 0);
      if (b >= 1 && b <= 6) defect[b] = 1;   // a run of defective blocks
      if (defect[b]) n_defect++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1
    for (int b = 0; b < NB1; b++) begin
      send_block(b);
      if (b == 8) begin
        // the run of defective blocks with out_ready high throughout is over
        chk(blocks_dropped == 0, "run of defective blocks passed at full rate");
        random_stall = 1;
      end
      if (b % 5 == 4) begin @(negedge clk); in_valid = 0; repeat (3) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0;
    repeat (3 * WPK) @(posedge clk);
    begin
      automatic int d1 = 0;
      for (int b = 0; b < NB1; b++) if (defect[b]) d1++;
      chk(blocks_dropped == 0, $sformatf("phase 1 dropped %0d", blocks_dropped));
      chk(blocks_sent == 32'(d1) && packets == d1, $sformatf("phase 1 sent %0d/%0d exp %0d", blocks_sent, packets, d1));
      chk(blocks_clean == 32'(NB1 - d1), $sformatf("phase 1 clean %0d exp %0d", blocks_clean, NB1 - d1));
    end
    // phase 2: long stall on the DMA side
    random_stall = 0;
    @(negedge clk); out_ready = 0;
    fork
      begin repeat (6 * WPK) @(negedge clk); out_ready = 1; end
    join_none
    for (int b = NB1; b < NB; b++) send_block(b);
    @(negedge clk); in_valid = 0;
    repeat (4 * WPK) @(posedge clk);
    chk(blocks_dropped > 0, "overflow: no block dropped");
    chk(blocks_sent + blocks_clean + blocks_dropped == 32'(NB), $sformatf("sent %0d + clean %0d + dropped %0d != %0d",
        blocks_sent, blocks_clean, blocks_dropped, NB));
    chk(32'(packets) == blocks_sent, "packets counted");
    chk(stall_cycles > 0, "stalls counted");
    $display("sent %0d clean %0d dropped %0d stall cycles %0d", blocks_sent, blocks_clean, blocks_dropped, stall_cycles);
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
