// sqa_top: FPGA image path of the sheet-material inspection board.
//
// A grey line-scan camera on Camera Link delivers the strip line by line at
// TAPS pixels per clock (2 by default: base mode, ports A and B; up to 8 with
// both connectors in full mode). The line stream is cut into BLK x BLK blocks held
// in a two-bank block RAM (block_subdivider). Every block goes through the
// DSP core (1x3 median pre-denoising, block features, multi-threshold test)
// and, in parallel, into a two-slot store (defect_packer). Blocks found
// defective leave on a valid/ready packet stream, each with a descriptor
// naming its band, column, the rules that fired and its features; clean
// blocks are discarded. The packet stream is where the DMA engine, and
// behind it the DDR3 memory and the PCIe link to the host PC, would attach.
//
// Two UART controllers complete the logic: controller 1 (txd1/rxd1) talks to
// the camera over the Camera Link serial pair, controller 2 (txd2/rxd2) to
// the RS232 debug port. Their byte interfaces, and the threshold settings,
// are brought out as ports where the embedded processor would connect.
//
// Everything runs on the camera pixel clock. At the defaults (4000-pixel
// lines, 2 taps, 80 MHz) the path handles 160 Mpixel/s, one word per clock
// with no stall inside the datapath; a verdict is ready 4 clocks after a
// block's last word leaves the block RAM.
//
// The division into acquisition, block RAM, DSP cores and transmission, the
// 32x32 block, the 4000-pixel line and the 80 MHz pixel clock follow the
// document; the tap count, the filter, the features, the rules and all
// interfaces are this design's choices.
module sqa_top
  import sqa_pkg::*;
#(
  parameter int unsigned LINE_WIDTH = 4000,
  parameter int unsigned TAPS       = 2,
  parameter int unsigned BLK        = 32,
  parameter int unsigned CLK_HZ     = 80_000_000,
  parameter int unsigned CAM_BAUD   = 9600,
  parameter int unsigned DBG_BAUD   = 115_200
) (
  input  logic            clk,
  input  logic            rst_n,
  // Camera Link after the LVDS receivers: A-C from connector 1 (base),
  // D-H from connector 2 (medium/full); strobes from connector 1
  input  pix_t            cl_port_a,
  input  pix_t            cl_port_b,
  input  pix_t            cl_port_c,
  input  pix_t            cl_port_d,
  input  pix_t            cl_port_e,
  input  pix_t            cl_port_f,
  input  pix_t            cl_port_g,
  input  pix_t            cl_port_h,
  input  logic            cl_fval,
  input  logic            cl_lval,
  input  logic            cl_dval,
  // multi-threshold settings
  input  thresholds_t     thr,
  // defective-block packets towards DMA
  output logic            out_valid,
  input  logic            out_ready,
  output pix_t [TAPS-1:0] out_pix,
  output logic            out_first,
  output logic            out_last,
  output desc_t           out_desc,
  // UART controller 1: camera serial
  output logic            txd1,
  input  logic            rxd1,
  input  logic            u1_tx_valid,
  output logic            u1_tx_ready,
  input  logic [7:0]      u1_tx_data,
  output logic            u1_rx_valid,
  output logic [7:0]      u1_rx_data,
  output logic            u1_rx_frame_err,
  // UART controller 2: RS232 debug
  output logic            txd2,
  input  logic            rxd2,
  input  logic            u2_tx_valid,
  output logic            u2_tx_ready,
  input  logic [7:0]      u2_tx_data,
  output logic            u2_rx_valid,
  output logic [7:0]      u2_rx_data,
  output logic            u2_rx_frame_err,
  // status counters
  output logic [31:0]     stat_lines,
  output logic [31:0]     stat_lines_dropped,
  output logic [31:0]     stat_lines_bad,
  output logic [31:0]     stat_bands,
  output logic [31:0]     stat_blocks_sent,
  output logic [31:0]     stat_blocks_clean,
  output logic [31:0]     stat_blocks_dropped,
  output logic [31:0]     stat_stall_cycles
);

  // camera -> block RAM
  logic            px_valid, px_sol, px_eol;
  pix_t [TAPS-1:0] px;

  // block RAM -> DSP core and packer
  logic            b_valid;
  pix_t [TAPS-1:0] b_pix;
  btag_t           b_tag;

  // DSP core -> packer
  logic            v_valid, v_defect;
  logic [3:0]      v_rules;
  features_t       v_feat;
  btag_t           v_tag;

  cl_driver #(.TAPS(TAPS)) u_cl (
    .clk, .rst_n,
    .port_a (cl_port_a), .port_b (cl_port_b), .port_c (cl_port_c), .port_d (cl_port_d),
    .port_e (cl_port_e), .port_f (cl_port_f), .port_g (cl_port_g), .port_h (cl_port_h),
    .fval (cl_fval), .lval (cl_lval), .dval (cl_dval),
    .pix_valid (px_valid), .pix (px), .pix_sol (px_sol), .pix_eol (px_eol),
    .line_count (stat_lines)
  );

  block_subdivider #(.LINE_WIDTH(LINE_WIDTH), .BLK(BLK), .TAPS(TAPS)) u_sub (
    .clk, .rst_n,
    .in_valid (px_valid), .in_pix (px), .in_sol (px_sol), .in_eol (px_eol),
    .blk_valid (b_valid), .blk_pix (b_pix), .blk_tag (b_tag),
    .lines_dropped (stat_lines_dropped), .lines_bad (stat_lines_bad),
    .bands_done (stat_bands)
  );

  dsp_core #(.TAPS(TAPS), .BLK(BLK)) u_dsp (
    .clk, .rst_n,
    .in_valid (b_valid), .in_pix (b_pix), .in_tag (b_tag), .thr,
    .v_valid, .v_defect, .v_rules, .v_feat, .v_tag
  );

  defect_packer #(.TAPS(TAPS), .BLK(BLK)) u_pack (
    .clk, .rst_n,
    .in_valid (b_valid), .in_pix (b_pix), .in_tag (b_tag),
    .v_valid, .v_defect, .v_rules, .v_feat, .v_tag,
    .out_valid, .out_ready, .out_pix, .out_first, .out_last, .out_desc,
    .blocks_sent (stat_blocks_sent), .blocks_clean (stat_blocks_clean),
    .blocks_dropped (stat_blocks_dropped), .stall_cycles (stat_stall_cycles)
  );

  uart_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(CAM_BAUD)) u_uart1 (
    .clk, .rst_n,
    .tx_valid (u1_tx_valid), .tx_ready (u1_tx_ready), .tx_data (u1_tx_data),
    .txd (txd1), .rxd (rxd1),
    .rx_valid (u1_rx_valid), .rx_data (u1_rx_data), .rx_frame_err (u1_rx_frame_err)
  );

  uart_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(DBG_BAUD)) u_uart2 (
    .clk, .rst_n,
    .tx_valid (u2_tx_valid), .tx_ready (u2_tx_ready), .tx_data (u2_tx_data),
    .txd (txd2), .rxd (rxd2),
    .rx_valid (u2_rx_valid), .rx_data (u2_rx_data), .rx_frame_err (u2_rx_frame_err)
  );

endmodule
