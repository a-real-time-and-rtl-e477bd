// cl_driver: Camera Link receive side.
//
// The LVDS deserialisers outside the FPGA turn the Camera Link pairs into the
// signals seen here: up to eight 8-bit ports (A, B, C from the first
// connector, which is base mode; D to H from the second, which adds medium
// and full mode) and the strobes FVAL, LVAL and DVAL, all sampled on the
// pixel clock. The strobes are taken from the first connector. This module
// samples them once, keeps the words where all three strobes are high, and
// emits a word stream of TAPS pixels (tap k taken from port A, B, C, ... in
// that order, tap 0 being the leftmost pixel) marked with start and end of
// line. TAPS 1..3 is base mode, 4..6 medium, 7..8 full mode; ports beyond
// TAPS are ignored.
//
// Start of line is the first valid word after LVAL rose. End of line can only
// be known when LVAL falls, so each valid word is held back until the next
// valid word or the fall of LVAL arrives; pix_eol marks the last word of a
// line. Latency is therefore two clocks, or until LVAL falls for the last
// word of a line. line_count counts completed lines.
//
// The two connectors (base mode on the first, medium/full mode on both), the
// 80 MHz pixel clock and the grey one-byte pixel follow the document; the
// tap count, the tap order, the strobes used and the way end of line is
// found are this design's choices.
module cl_driver
  import sqa_pkg::*;
#(
  parameter int unsigned TAPS = 2   // pixels per clock, 1..8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pix_t                port_a,
  input  pix_t                port_b,
  input  pix_t                port_c,
  input  pix_t                port_d,
  input  pix_t                port_e,
  input  pix_t                port_f,
  input  pix_t                port_g,
  input  pix_t                port_h,
  input  logic                fval,
  input  logic                lval,
  input  logic                dval,
  output logic                pix_valid,
  output pix_t [TAPS-1:0]     pix,
  output logic                pix_sol,
  output logic                pix_eol,
  output logic [31:0]         line_count
);

  initial assert (TAPS >= 1 && TAPS <= 8) else $error("cl_driver: TAPS must be 1..8");

  // input sampling stage
  pix_t [TAPS-1:0] s_port;
  pix_t [7:0]      ports;
  assign ports = {port_h, port_g, port_f, port_e, port_d, port_c, port_b, port_a};
  logic       s_fval, s_lval, s_dval;
  logic       s_lval_q;      // LVAL one sample earlier
  logic       s_new_line;    // no valid word seen yet in this line

  // held word
  logic            h_valid;
  pix_t [TAPS-1:0] h_pix;
  logic            h_sol;

  logic s_word;
  logic line_end;
  assign s_word   = s_fval && s_lval && s_dval;
  assign line_end = s_lval_q && !s_lval;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_port     <= '0;
      s_fval     <= 1'b0;
      s_lval     <= 1'b0;
      s_dval     <= 1'b0;
      s_lval_q   <= 1'b0;
      s_new_line <= 1'b1;
      h_valid    <= 1'b0;
      h_pix      <= '0;
      h_sol      <= 1'b0;
      pix_valid  <= 1'b0;
      pix        <= '0;
      pix_sol    <= 1'b0;
      pix_eol    <= 1'b0;
      line_count <= '0;
    end else begin
      s_port   <= ports[TAPS-1:0];
      s_fval   <= fval;
      s_lval   <= lval;
      s_dval   <= dval;
      s_lval_q <= s_lval;

      pix_valid <= 1'b0;
      pix_sol   <= 1'b0;
      pix_eol   <= 1'b0;

      if (s_word) begin
        // a new word releases the held one, which is then not the last
        if (h_valid) begin
          pix_valid <= 1'b1;
          pix       <= h_pix;
          pix_sol   <= h_sol;
        end
        h_valid    <= 1'b1;
        h_pix      <= s_port;
        h_sol      <= s_new_line;
        s_new_line <= 1'b0;
      end else if (line_end) begin
        if (h_valid) begin
          pix_valid  <= 1'b1;
          pix        <= h_pix;
          pix_sol    <= h_sol;
          pix_eol    <= 1'b1;
          line_count <= line_count + 32'd1;
        end
        h_valid    <= 1'b0;
        s_new_line <= 1'b1;
      end
    end
  end

endmodule
