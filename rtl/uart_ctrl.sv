// uart_ctrl: UART controller with a byte interface on the processor side.
//
// Frame format: one start bit (0), eight data bits LSB first, one stop bit
// (1), no parity. One bit lasts DIV = CLK_HZ / BAUD clocks.
// Transmit: a byte is taken when tx_valid and tx_ready are both high; tx_ready
// is low while a frame is on the line (10 bit times).
// Receive: rxd passes two synchronising flip-flops. A falling edge starts a
// frame; the start bit is checked half a bit later and each following bit is
// sampled in the middle of its bit time. rx_valid pulses for one clock at the
// middle of the stop bit, with rx_frame_err set if the stop bit was 0. A start
// bit that is high at its middle is taken as a glitch and ignored.
//
// In the board one controller configures the camera over the Camera Link
// serial pair and another serves the RS232 debug port; the frame format, the
// sampling scheme and the baud rates are this design's choices.
module uart_ctrl #(
  parameter int unsigned CLK_HZ = 80_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmit
  input  logic       tx_valid,
  output logic       tx_ready,
  input  logic [7:0] tx_data,
  output logic       txd,
  // receive
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_frame_err
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DW  = $clog2(DIV + 1);

  initial assert (DIV >= 4) else $error("uart_ctrl: CLK_HZ / BAUD must be at least 4");

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh;     // stop, data[7:0], start; bit 0 on the line
  logic [3:0]    tx_bits;   // bits left in the frame
  logic [DW-1:0] tx_cnt;

  assign tx_ready = (tx_bits == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh   <= '1;
      tx_bits <= '0;
      tx_cnt  <= '0;
      txd     <= 1'b1;
    end else if (tx_bits == 4'd0) begin
      txd <= 1'b1;
      if (tx_valid) begin
        tx_sh   <= {1'b1, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= DW'(DIV - 1);
        txd     <= 1'b0;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - DW'(1);
    end else begin
      tx_cnt  <= DW'(DIV - 1);
      tx_bits <= tx_bits - 4'd1;
      tx_sh   <= {1'b1, tx_sh[9:1]};
      txd     <= (tx_bits == 4'd1) ? 1'b1 : tx_sh[1];
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_st_t;

  logic [1:0]    rx_sync;
  logic          rx_prev;
  rx_st_t        rx_st;
  logic [DW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_sh;
  logic          rx_in;

  assign rx_in = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= '1;
      rx_prev      <= 1'b1;
      rx_st        <= RX_IDLE;
      rx_cnt       <= '0;
      rx_bit       <= '0;
      rx_sh        <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_sync  <= {rx_sync[0], rxd};
      rx_prev  <= rx_in;
      rx_valid <= 1'b0;
      unique case (rx_st)
        RX_IDLE: if (rx_prev && !rx_in) begin
          rx_st  <= RX_START;
          rx_cnt <= DW'(DIV / 2 - 1);
        end
        RX_START: if (rx_cnt != '0) rx_cnt <= rx_cnt - DW'(1);
          else if (rx_in) rx_st <= RX_IDLE;          // glitch
          else begin
            rx_st  <= RX_DATA;
            rx_cnt <= DW'(DIV - 1);
            rx_bit <= '0;
          end
        RX_DATA: if (rx_cnt != '0) rx_cnt <= rx_cnt - DW'(1);
          else begin
            rx_sh  <= {rx_in, rx_sh[7:1]};
            rx_cnt <= DW'(DIV - 1);
            rx_bit <= rx_bit + 3'd1;
            if (rx_bit == 3'd7) rx_st <= RX_STOP;
          end
        RX_STOP: if (rx_cnt != '0) rx_cnt <= rx_cnt - DW'(1);
          else begin
            rx_valid     <= 1'b1;
            rx_data      <= rx_sh;
            rx_frame_err <= !rx_in;
            rx_st        <= RX_IDLE;
          end
        default: rx_st <= RX_IDLE;
      endcase
    end
  end

endmodule
