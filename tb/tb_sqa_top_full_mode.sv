// tb_sqa_top_full_mode: the end-to-end test of tb_sqa_top with the camera in
// Camera Link full mode, eight taps (ports A to H) per clock, at 128-pixel
// lines (4 blocks per band), with the UARTs at 16 clocks per bit.
//
// A synthetic strip is sent over the Camera Link inputs line by line. Each
// 32x32 block of it has a kind chosen from its position: clean, dark,
// bright, a dark spot, a coarse texture, or isolated bright impulses that the
// median filter must remove. The testbench computes the expected verdict
// of every block with the 2-D reference model and compares the packets that
// come out (pixels, descriptor, order) with the defective blocks.
//
// Phase 1: three bands with line blanking, DVAL gaps in some lines, one
// short line that must be discarded, and short random stalls on out_ready;
// every defective block must arrive. Phase 2: out_ready held low for a long
// time, so the packer must drop blocks; the packets that arrive must still
// match. Phase 3: two bands with a single clock of line blanking, the
// fastest the camera can send; no line may be lost. Both UARTs are looped
// back and carry bytes throughout.
// Each mechanism is counted and must have happened at least once.
module tb_sqa_top_full_mode;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int LW = 128, TAPS = 8, BLK = 32, WPL = LW / TAPS, NBLK = LW / BLK;
  localparam int CLK_HZ = 1_600_000, CAM_BAUD = 100_000, DBG_BAUD = 200_000;
  localparam int NBANDS = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pix_t [7:0] cl_p = '0;               // Camera Link ports A..H
  logic cl_fval = 0, cl_lval = 0, cl_dval = 0;
  thresholds_t thr;
  logic out_valid, out_ready = 1, out_first, out_last;
  pix_t [TAPS-1:0] out_pix;
  desc_t out_desc;
  logic txd1, txd2;
  logic u1_tx_valid = 0, u1_tx_ready, u1_rx_valid, u1_rx_frame_err;
  logic u2_tx_valid = 0, u2_tx_ready, u2_rx_valid, u2_rx_frame_err;
  logic [7:0] u1_tx_data = 0, u1_rx_data, u2_tx_data = 0, u2_rx_data;
  logic [31:0] stat_lines, stat_lines_dropped, stat_lines_bad, stat_bands;
  logic [31:0] stat_blocks_sent, stat_blocks_clean, stat_blocks_dropped, stat_stall_cycles;

  sqa_top #(.LINE_WIDTH(LW), .TAPS(TAPS), .BLK(BLK), .CLK_HZ(CLK_HZ), .CAM_BAUD(CAM_BAUD), .DBG_BAUD(DBG_BAUD)) dut (
    .clk, .rst_n,
    .cl_port_a (cl_p[0]), .cl_port_b (cl_p[1]), .cl_port_c (cl_p[2]), .cl_port_d (cl_p[3]),
    .cl_port_e (cl_p[4]), .cl_port_f (cl_p[5]), .cl_port_g (cl_p[6]), .cl_port_h (cl_p[7]),
    .cl_fval, .cl_lval, .cl_dval, .thr,
    .out_valid, .out_ready, .out_pix, .out_first, .out_last, .out_desc,
    .txd1, .rxd1 (txd1), .u1_tx_valid, .u1_tx_ready, .u1_tx_data, .u1_rx_valid, .u1_rx_data, .u1_rx_frame_err,
    .txd2, .rxd2 (txd2), .u2_tx_valid, .u2_tx_ready, .u2_tx_data, .u2_rx_valid, .u2_rx_data, .u2_rx_frame_err,
    .stat_lines, .stat_lines_dropped, .stat_lines_bad, .stat_bands,
    .stat_blocks_sent, .stat_blocks_clean, .stat_blocks_dropped, .stat_stall_cycles);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- the synthetic strip ----------------
  function automatic int kind(int band, int col);
    return (band * NBLK + col) % 7;
  endfunction

  function automatic byte unsigned img(int line, int x);
    int band, y, c, xx, v;
    band = line / BLK; y = line % BLK; c = x / BLK; xx = x % BLK;
    v = 120 + ((line * 131 + x * 71) ^ (line * x)) % 5;
    case (kind(band, c))
      1: v = v - 80;                                                    // dark
      2: v = v + 90;                                                    // bright
      3: if (y >= 8 && y < 12 && xx >= 5 && xx < 25) v = 15;           // spot
      4: v = (((xx / 2 + y / 2) % 2) != 0) ? v + 30 : v - 30;                 // texture
      5: if (xx % 4 == 2 && (y % 3) == 1) v = 250;                     // impulses
      default: ;
    endcase
    return 8'(v);
  endfunction

  function automatic blk_t block_of(int band, int col);
    blk_t b;
    for (int y = 0; y < BLK; y++) for (int x = 0; x < BLK; x++) b[y][x] = img(band * BLK + y, col * BLK + x);
    return b;
  endfunction

  // expected verdicts
  logic [3:0] exp_rules [NBANDS][NBLK];
  features_t  exp_feat  [NBANDS][NBLK];
  int n_rule [4];
  int n_clean_exp = 0, n_median = 0;

  // ---------------- camera ----------------
  task automatic cam_line(int line, int blank, bit gaps, int nwords);
    int w;
    w = 0;
    while (w < nwords) begin
      @(negedge clk);
      cl_fval = 1; cl_lval = 1;
      cl_dval = gaps ? ($urandom_range(0, 4) != 0) : 1'b1;
      for (int k = 0; k < 8; k++) cl_p[k] = (k < TAPS) ? pix_t'(img(line, TAPS * w + k)) : 8'($urandom);
      if (cl_dval) w++;
    end
    @(negedge clk);
    cl_lval = 0; cl_dval = 0;
    repeat (blank - 1) @(negedge clk);
  endtask

  // ---------------- packet checker ----------------
  int pk_word = 0, packets = 0, last_key = -1, n_gaps_in_dval = 0;
  int seen_rule [4];
  bit strict = 1;                     // every defective block must arrive
  int exp_key [$];                    // band*NBLK+col of defective blocks, phase 1
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int band, col, key, y, x0;
    band = int'(out_desc.band); col = int'(out_desc.col);
    key = band * NBLK + col;
    y = pk_word / (BLK / TAPS); x0 = (pk_word % (BLK / TAPS)) * TAPS;
    if (pk_word == 0) begin
      chk(out_first, "first flag");
      chk(key > last_key && band < NBANDS, $sformatf("packet order: band %0d col %0d", band, col));
      if (band < NBANDS && col < NBLK) begin
        chk(out_desc.rules == exp_rules[band][col] && exp_rules[band][col] != 0,
            $sformatf("band %0d col %0d rules %b exp %b", band, col, out_desc.rules, exp_rules[band][col]));
        chk(out_desc.feat == exp_feat[band][col], $sformatf("band %0d col %0d features", band, col));
        for (int k = 0; k < 4; k++) if (out_desc.rules[k]) seen_rule[k]++;
      end
      if (strict) begin
        if (exp_key.size() == 0) chk(0, "unexpected packet");
        else chk(exp_key.pop_front() == key, $sformatf("packet band %0d col %0d out of sequence", band, col));
      end
      last_key = key;
    end
    for (int i = 0; i < TAPS; i++)
      chk(out_pix[i] == pix_t'(img(band * BLK + y, col * BLK + x0 + i)), $sformatf("band %0d col %0d word %0d", band, col, pk_word));
    chk(out_last == (pk_word == BLK * BLK / TAPS - 1), "last flag");
    pk_word++;
    if (pk_word == BLK * BLK / TAPS) begin pk_word = 0; packets++; end
  end

  // ---------------- UART traffic ----------------
  int u1_sent = 0, u1_got = 0, u2_sent = 0, u2_got = 0;
  logic [7:0] u1_q [$], u2_q [$];
  bit uart_run = 1;
  always @(negedge clk) begin
    u1_tx_valid = 0; u2_tx_valid = 0;
    if (uart_run && rst_n && u1_tx_ready && ($urandom_range(0, 99) == 0)) begin
      u1_tx_valid = 1; u1_tx_data = 8'($urandom); u1_q.push_back(u1_tx_data); u1_sent++;
    end
    if (uart_run && rst_n && u2_tx_ready && ($urandom_range(0, 99) == 0)) begin
      u2_tx_valid = 1; u2_tx_data = 8'($urandom); u2_q.push_back(u2_tx_data); u2_sent++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (u1_rx_valid) begin
      chk(u1_q.size() > 0 && u1_rx_data == u1_q.pop_front() && !u1_rx_frame_err, "UART 1 loopback byte");
      u1_got++;
    end
    if (u2_rx_valid) begin
      chk(u2_q.size() > 0 && u2_rx_data == u2_q.pop_front() && !u2_rx_frame_err, "UART 2 loopback byte");
      u2_got++;
    end
  end

  bit stall_random = 1;
  always @(negedge clk) if (stall_random) out_ready = ($urandom_range(0, 99) > 3);

  initial begin
    int line;
    thr = '{mean_lo: 8'd70, mean_hi: 8'd180, range_hi: 8'd70, grad_hi: 16'd2000};
    for (int b = 0; b < NBANDS; b++)
      for (int c = 0; c < NBLK; c++) begin
        blk_t raw;
        raw = block_of(b, c);
        exp_feat[b][c]  = features(denoise(raw, BLK), BLK);
        exp_rules[b][c] = rules(exp_feat[b][c], thr);
        for (int k = 0; k < 4; k++) if (exp_rules[b][c][k]) n_rule[k]++;
        if (exp_rules[b][c] == 0) n_clean_exp++;
        if (exp_rules[b][c] == 0 && rules(features(raw, BLK), thr) != 0) n_median++;
        if (b < 3 && exp_rules[b][c] != 0) exp_key.push_back(b * NBLK + c);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // phase 1: three bands
    line = 0;
    for (int l = 0; l < 3 * BLK; l++) begin
      if (l == 45) cam_line(9999, 8, 0, WPL - 7);            // short line
      cam_line(line, 8, (l % 5 == 2), WPL);
      line++;
    end
    repeat (2 * NBLK * BLK * BLK / TAPS) @(posedge clk);
    chk(exp_key.size() == 0, $sformatf("%0d defective blocks of phase 1 never arrived", exp_key.size()));
    chk(stat_blocks_dropped == 0, "no block dropped in phase 1");
    chk(stat_lines_bad == 1, $sformatf("short line discarded: lines_bad %0d", stat_lines_bad));
    chk(stat_bands == 3, $sformatf("bands %0d exp 3", stat_bands));

    // phase 2: DMA side blocked during two bands
    strict = 0;
    stall_random = 0;
    @(negedge clk); out_ready = 0;
    for (int l = 0; l < 2 * BLK; l++) begin cam_line(line, 8, 0, WPL); line++; end
    repeat (NBLK * BLK * BLK / TAPS) @(posedge clk);
    chk(stat_blocks_dropped > 0, "packer overflow never happened");
    @(negedge clk); out_ready = 1;
    repeat (4 * BLK * BLK / TAPS) @(posedge clk);

    // phase 3: one clock of blanking, two bands
    stall_random = 1;
    for (int l = 0; l < 2 * BLK; l++) begin cam_line(line, 1, 0, WPL); line++; end
    repeat (3 * NBLK * BLK * BLK / TAPS) @(posedge clk);
    chk(stat_lines_dropped == 0, $sformatf("lines lost at full camera rate: %0d", stat_lines_dropped));
    chk(stat_bands == 32'(NBANDS), $sformatf("bands %0d exp %0d", stat_bands, NBANDS));
    chk(stat_lines == 32'(line + 1), $sformatf("lines %0d exp %0d", stat_lines, line + 1));
    chk(stat_blocks_sent + stat_blocks_clean + stat_blocks_dropped == 32'(NBANDS * NBLK), "block accounting");
    chk(32'(packets) == stat_blocks_sent, "packets counted");

    uart_run = 0;
    repeat (30 * (CLK_HZ / CAM_BAUD)) @(posedge clk);

    // mechanisms
    for (int k = 0; k < 4; k++) chk(seen_rule[k] > 0, $sformatf("rule %0d never fired in a packet", k));
    chk(stat_blocks_clean > 0, "no clean block discarded");
    chk(n_median > 0, "no block cleaned by the median filter");
    chk(stat_stall_cycles > 0, "no output stall");
    chk(u1_got > 0 && u1_got == u1_sent, $sformatf("UART 1 %0d of %0d", u1_got, u1_sent));
    chk(u2_got > 0 && u2_got == u2_sent, $sformatf("UART 2 %0d of %0d", u2_got, u2_sent));
    $display("mechanisms: bands %0d, bad lines %0d, packets %0d, clean %0d, dropped %0d, stall cycles %0d",
             stat_bands, stat_lines_bad, packets, stat_blocks_clean, stat_blocks_dropped, stat_stall_cycles);
    $display("            rules in packets %0d %0d %0d %0d, median-cleaned blocks %0d, UART bytes %0d/%0d",
             seen_rule[0], seen_rule[1], seen_rule[2], seen_rule[3], n_median, u1_got, u2_got);
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
