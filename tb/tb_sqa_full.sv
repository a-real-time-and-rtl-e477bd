// tb_sqa_full: sqa_top at its default parameters (4000-pixel lines, two taps,
// 32x32 blocks, 80 MHz clock, 9600 and 115200 baud) taken through one
// complete operation: two full bands (64 lines, 250 blocks) from the Camera
// Link inputs to the packet output, with a single clock of line blanking,
// the fastest the camera can send. Blocks of the synthetic strip are
// clean, dark, bright, spotted, textured or carry impulse noise; every
// defective block must arrive, in order, with its pixels and descriptor as
// the 2-D reference model gives them, and no other. One byte goes through
// each UART, looped back. The band read time is checked against the line
// time: each band must leave the block RAM within one band time of its
// last line.
module tb_sqa_full;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int LW = 4000, TAPS = 2, BLK = 32, WPL = LW / TAPS, NBLK = LW / BLK;
  localparam int NBANDS = 2;

  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;   // 80 MHz

  pix_t cl_a = 0, cl_b = 0, cl_c = 0;
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

  sqa_top dut (
    .clk, .rst_n,
    .cl_port_a (cl_a), .cl_port_b (cl_b), .cl_port_c (cl_c),
    .cl_port_d (cl_c), .cl_port_e (cl_c), .cl_port_f (cl_c), .cl_port_g (cl_c), .cl_port_h (cl_c),
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

  function automatic int kind(int band, int col);
    return (band * 3 + col * 5) % 11;
  endfunction

  function automatic byte unsigned img(int line, int x);
    int band, y, c, xx, v;
    band = line / BLK; y = line % BLK; c = x / BLK; xx = x % BLK;
    v = 120 + ((line * 131 + x * 71) ^ (line * x)) % 5;
    case (kind(band, c))
      1: v = v - 80;
      2: v = v + 90;
      3: if (y >= 8 && y < 12 && xx >= 5 && xx < 25) v = 15;
      4: v = (((xx / 2 + y / 2) % 2) != 0) ? v + 30 : v - 30;
      5: if (xx % 4 == 2 && (y % 3) == 1) v = 250;
      default: ;
    endcase
    return 8'(v);
  endfunction

  function automatic blk_t block_of(int band, int col);
    blk_t b;
    for (int y = 0; y < BLK; y++) for (int x = 0; x < BLK; x++) b[y][x] = img(band * BLK + y, col * BLK + x);
    return b;
  endfunction

  int exp_key [$];
  features_t exp_feat [NBANDS][NBLK];
  logic [3:0] exp_rules [NBANDS][NBLK];
  int n_def = 0;

  int pk_word = 0, packets = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int band, col, y, x0;
    band = int'(out_desc.band); col = int'(out_desc.col);
    y = pk_word / (BLK / TAPS); x0 = (pk_word % (BLK / TAPS)) * TAPS;
    if (pk_word == 0) begin
      if (exp_key.size() == 0) chk(0, "unexpected packet");
      else chk(exp_key.pop_front() == band * NBLK + col, $sformatf("packet band %0d col %0d out of sequence", band, col));
      if (band < NBANDS && col < NBLK)
        chk(out_desc.rules == exp_rules[band][col] && out_desc.feat == exp_feat[band][col],
            $sformatf("band %0d col %0d descriptor", band, col));
    end
    if (band < NBANDS && col < NBLK)
      for (int i = 0; i < TAPS; i++)
        chk(out_pix[i] == pix_t'(img(band * BLK + y, col * BLK + x0 + i)), $sformatf("band %0d col %0d word %0d", band, col, pk_word));
    pk_word++;
    if (pk_word == BLK * BLK / TAPS) begin pk_word = 0; packets++; end
  end

  // band timing: time from a band's last line to the end of its read-out
  int cyc = 0, band_end_cyc [$];
  always @(posedge clk) cyc++;
  logic [31:0] bands_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (stat_bands != bands_q && band_end_cyc.size() > 0) begin
      int t;
      t = band_end_cyc.pop_front();
      chk(cyc - t <= BLK * WPL + 8, $sformatf("band read-out took %0d clocks after its last line", cyc - t));
    end
    bands_q <= stat_bands;
  end

  logic [7:0] u1_got, u2_got;
  int u1_n = 0, u2_n = 0;
  always @(posedge clk) begin
    if (u1_rx_valid) begin u1_got <= u1_rx_data; u1_n++; end
    if (u2_rx_valid) begin u2_got <= u2_rx_data; u2_n++; end
  end

  initial begin
    thr = '{mean_lo: 8'd70, mean_hi: 8'd180, range_hi: 8'd70, grad_hi: 16'd2000};
    for (int b = 0; b < NBANDS; b++)
      for (int c = 0; c < NBLK; c++) begin
        exp_feat[b][c]  = features(denoise(block_of(b, c), BLK), BLK);
        exp_rules[b][c] = rules(exp_feat[b][c], thr);
        if (exp_rules[b][c] != 0) begin exp_key.push_back(b * NBLK + c); n_def++; end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    u1_tx_valid = 1; u1_tx_data = 8'h5A; u2_tx_valid = 1; u2_tx_data = 8'hC3;
    @(negedge clk);
    u1_tx_valid = 0; u2_tx_valid = 0;
    for (int l = 0; l < NBANDS * BLK; l++) begin
      for (int w = 0; w < WPL; w++) begin
        cl_fval = 1; cl_lval = 1; cl_dval = 1;
        cl_a = pix_t'(img(l, 2 * w)); cl_b = pix_t'(img(l, 2 * w + 1));
        @(negedge clk);
      end
      cl_lval = 0; cl_dval = 0;
      if (l % BLK == BLK - 1) band_end_cyc.push_back(cyc);
      @(negedge clk);
    end
    cl_fval = 0;
    repeat (BLK * WPL + 2000) @(posedge clk);
    chk(stat_bands == 32'(NBANDS), $sformatf("bands %0d", stat_bands));
    chk(stat_lines == 32'(NBANDS * BLK) && stat_lines_dropped == 0 && stat_lines_bad == 0, "all lines kept");
    chk(exp_key.size() == 0, $sformatf("%0d defective blocks never arrived", exp_key.size()));
    chk(stat_blocks_sent == 32'(n_def) && stat_blocks_clean == 32'(NBANDS * NBLK - n_def) && stat_blocks_dropped == 0, "block counts");
    // UART bytes need 10 bit times at 9600 baud
    repeat (12 * 80_000_000 / 9600) @(posedge clk);
    chk(u1_n == 1 && u1_got == 8'h5A, "UART 1 byte");
    chk(u2_n == 1 && u2_got == 8'hC3, "UART 2 byte");
    $display("defective %0d of %0d blocks, packets %0d", n_def, NBANDS * NBLK, packets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
