// tb_uart_ctrl: runs uart_ctrl at 16 clocks per bit. The transmitter's line
// is sampled by the testbench in the middle of every bit and decoded there
// (start, 8 data bits LSB first, stop), and the frame must last 10 bit
// times. The receiver gets frames built by the testbench: good frames with
// random bytes, a frame with a 0 stop bit (frame error) and a short glitch
// (must be ignored). Finally the line is looped back.
module tb_uart_ctrl;
  localparam int CLK_HZ = 1_600_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_valid = 0, tx_ready, txd, rxd, rx_valid, rx_frame_err;
  logic [7:0] tx_data = 0, rx_data;
  bit loop = 0;
  logic rxd_drv = 1;
  assign rxd = loop ? txd : rxd_drv;

  uart_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .tx_valid, .tx_ready, .tx_data, .txd,
    .rxd, .rx_valid, .rx_data, .rx_frame_err);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // receive monitor
  logic [7:0] rxq [$];
  logic       errq [$];
  always @(posedge clk) if (rst_n && rx_valid) begin rxq.push_back(rx_data); errq.push_back(rx_frame_err); end

  task automatic send_tx(logic [7:0] d);
    logic [9:0] seen;
    int busy;
    @(negedge clk);
    while (!tx_ready) @(negedge clk);
    tx_valid = 1; tx_data = d;
    @(negedge clk);
    tx_valid = 0;
    // the start bit began at the last rising edge; sample mid-bit
    repeat (DIV / 2 - 1) @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      seen[k] = txd;
      repeat (DIV) @(negedge clk);
    end
    chk(seen == {1'b1, d, 1'b0}, $sformatf("tx frame %b for %h", seen, d));
    busy = 0;
    while (!tx_ready) begin @(negedge clk); busy++; end
    chk(busy <= DIV / 2 + 1, $sformatf("tx frame too long by %0d clocks", busy));
  endtask

  task automatic drive_rx(logic [7:0] d, logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd_drv = f[k];
      repeat (DIV) @(negedge clk);
    end
    rxd_drv = 1;
    repeat (DIV) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(txd == 1'b1 && tx_ready, "idle line high and ready");
    for (int n = 0; n < 8; n++) send_tx(8'($urandom));
    send_tx(8'h00); send_tx(8'hFF);
    // receiver
    begin
      logic [7:0] sent [$];
      for (int n = 0; n < 8; n++) begin
        logic [7:0] d;
        d = 8'($urandom);
        sent.push_back(d);
        drive_rx(d, 1'b1);
      end
      // glitch shorter than half a bit
      rxd_drv = 0; repeat (DIV / 4) @(negedge clk); rxd_drv = 1; repeat (2 * DIV) @(negedge clk);
      drive_rx(8'hA5, 1'b0);
      chk(rxq.size() == 9, $sformatf("%0d bytes received, exp 9", rxq.size()));
      for (int n = 0; n < 8 && rxq.size() > 0; n++) begin
        logic [7:0] r;
        r = rxq.pop_front();
        chk(r == sent[n] && !errq.pop_front(), $sformatf("rx %h exp %h", r, sent[n]));
      end
      if (rxq.size() > 0) chk(rxq.pop_front() == 8'hA5 && errq.pop_front(), "frame error flagged");
    end
    // loopback
    loop = 1;
    for (int n = 0; n < 4; n++) begin
      logic [7:0] d;
      d = 8'(n * 37 + 5);
      send_tx(d);
      repeat (DIV) @(negedge clk);
      chk(rxq.size() == 1 && rxq.pop_front() == d && !errq.pop_front(), "loopback byte");
    end
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
