// tb_pre_denoise: random blocks (uniform noise, flat blocks with salt and
// pepper impulses) are streamed through pre_denoise back to back and with
// gaps between blocks. Each output word is compared with a 1x3 median of the
// block computed on a 2-D array, and must leave exactly two clocks after the
// word entered.
module tb_pre_denoise;
  import sqa_pkg::*;
  import sqa_ref_pkg::*;

  localparam int TAPS = 2, BLK = 32, WPB = BLK / TAPS;
  localparam int NB = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  pix_t [TAPS-1:0] in_pix, out_pix;
  btag_t in_tag, out_tag;

  pre_denoise #(.TAPS(TAPS)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_tag, .out_valid, .out_pix, .out_tag);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  blk_t blks [NB], refs [NB];
  int cyc = 0;
  int in_cyc [$];
  always @(posedge clk) cyc++;

  // monitor
  int ob = 0, ow = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int y, x0, t0;
    y = ow / WPB; x0 = (ow % WPB) * TAPS;
    t0 = in_cyc.pop_front();
    chk(cyc - t0 == 2, $sformatf("latency %0d", cyc - t0));
    for (int i = 0; i < TAPS; i++)
      chk(out_pix[i] == refs[ob][y][x0 + i], $sformatf("blk %0d y %0d x %0d: %0d exp %0d", ob, y, x0 + i, out_pix[i], refs[ob][y][x0 + i]));
    chk(out_tag.col == 16'(ob) && out_tag.first == (ow == 0) && out_tag.last == (ow == BLK * WPB - 1), "tag");
    ow++;
    if (ow == BLK * WPB) begin ow = 0; ob++; end
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int y = 0; y < BLK; y++)
        for (int x = 0; x < BLK; x++) begin
          if (b % 3 == 0) blks[b][y][x] = 8'($urandom);
          else begin
            int r;
            r = $urandom_range(0, 99);
            blks[b][y][x] = (r < 5) ? 8'd255 : (r < 10) ? 8'd0 : 8'(100 + b);
          end
        end
      refs[b] = denoise(blks[b], BLK);
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
        in_cyc.push_back(cyc + 1);
      end
      if (b % 2 == 1) begin
        @(negedge clk); in_valid = 0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    chk(ob == NB, $sformatf("%0d blocks out, exp %0d", ob, NB));
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
