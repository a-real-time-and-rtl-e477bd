// tb_cl_driver: random Camera Link lines, with DVAL gaps, frame gaps and
// blanking of varying length, are driven into two cl_driver instances, one
// in base mode with two taps (ports A, B) and one in full mode with eight
// taps (ports A to H). A queue of
// the expected words (pixels, start and end of line), built while driving,
// is compared in order with the output. Checks the line counter and that a
// word comes out two clocks after it was sampled when more words follow.
module tb_cl_driver;
  import sqa_pkg::*;

  localparam int TAPS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pix_t a, b, c, pd, pe, pf, pg, ph;
  logic fval, lval, dval;
  logic pix_valid, pix_sol, pix_eol;
  pix_t [TAPS-1:0] pix;
  logic [31:0] line_count;

  cl_driver #(.TAPS(TAPS)) dut (.clk, .rst_n, .port_a(a), .port_b(b), .port_c(c),
    .port_d(pd), .port_e(pe), .port_f(pf), .port_g(pg), .port_h(ph),
    .fval, .lval, .dval, .pix_valid, .pix, .pix_sol, .pix_eol, .line_count);

  // full mode: eight taps; its words must match the two-tap words, with
  // ports C to H in the upper taps
  logic f_valid, f_sol, f_eol;
  pix_t [7:0] f_pix;
  logic [31:0] f_count;
  cl_driver #(.TAPS(8)) dut8 (.clk, .rst_n, .port_a(a), .port_b(b), .port_c(c),
    .port_d(pd), .port_e(pe), .port_f(pf), .port_g(pg), .port_h(ph),
    .fval, .lval, .dval, .pix_valid(f_valid), .pix(f_pix), .pix_sol(f_sol), .pix_eol(f_eol), .line_count(f_count));
  logic [63:0] q8 [$];
  always @(posedge clk) if (rst_n && dval && lval && fval) q8.push_back({ph, pg, pf, pe, pd, c, b, a});
  always @(posedge clk) if (rst_n) begin
    chk(f_valid == pix_valid && f_sol == pix_sol && f_eol == pix_eol, "full-mode strobes follow base mode");
    if (f_valid) begin
      logic [63:0] w;
      w = (q8.size() > 0) ? q8.pop_front() : 64'h0;
      chk(f_pix == w, $sformatf("full mode word %h exp %h", f_pix, w));
    end
  end

  int checks = 0, failures = 0;
  typedef struct { logic [15:0] p; logic sol, eol; } exp_t;
  exp_t q [$];
  int lines_sent = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor
  always @(posedge clk) if (rst_n && pix_valid) begin
    exp_t e;
    if (q.size() == 0) chk(0, "unexpected word");
    else begin
      e = q.pop_front();
      chk({pix[1], pix[0]} == e.p, $sformatf("pixels %h exp %h", {pix[1], pix[0]}, e.p));
      chk(pix_sol == e.sol && pix_eol == e.eol, $sformatf("sol/eol %b%b exp %b%b", pix_sol, pix_eol, e.sol, e.eol));
    end
  end

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      lval = 0; dval = 1'($urandom_range(0, 1)); a = 8'($urandom); b = 8'($urandom);
      {c, pd, pe, pf, pg, ph} = 48'({$urandom, $urandom});
    end
  endtask

  // one line of nwords valid words; dval may drop inside the line
  task automatic line(int nwords, bit gaps, bit fv);
    int sent = 0;
    int first = 1;
    exp_t e;
    while (sent < nwords) begin
      @(negedge clk);
      fval = fv; lval = 1;
      dval = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      a = 8'($urandom); b = 8'($urandom);
      {c, pd, pe, pf, pg, ph} = 48'({$urandom, $urandom});
      if (dval && fv) begin
        e.p = {b, a}; e.sol = first[0]; e.eol = (sent == nwords - 1);
        q.push_back(e);
        first = 0;
      end
      if (dval) sent++;
    end
    if (fv) lines_sent++;
  endtask

  initial begin
    a = 0; b = 0; {c, pd, pe, pf, pg, ph} = '0; fval = 0; lval = 0; dval = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(3);
    for (int i = 0; i < 40; i++) begin
      line($urandom_range(1, 30), i % 3 == 1, 1'b1);
      idle($urandom_range(1, 5));
    end
    // a line outside FVAL produces nothing
    line(10, 0, 1'b0);
    idle(3);
    // latency: the first word of a 3-word line appears 2 clocks after it was sampled
    begin
      int t0, t1;
      @(negedge clk); fval = 1; lval = 1; dval = 1; a = 8'h11; b = 8'h22;
      q.push_back('{p: 16'h2211, sol: 1'b1, eol: 1'b0});
      t0 = int'($time);
      @(negedge clk); a = 8'h33; b = 8'h44; q.push_back('{p: 16'h4433, sol: 1'b0, eol: 1'b0});
      @(negedge clk); a = 8'h55; b = 8'h66; q.push_back('{p: 16'h6655, sol: 1'b0, eol: 1'b1});
      lines_sent++;
      fork
        begin @(posedge clk iff pix_valid); t1 = int'($time); end
      join_none
      idle(6);
      chk((t1 - t0) / 10 == 3, $sformatf("latency %0d clocks from drive to output edge", (t1 - t0) / 10));
    end
    idle(5);
    chk(q.size() == 0, $sformatf("%0d words never came out", q.size()));
    chk(f_count == line_count, "full-mode line count");
    chk(line_count == 32'(lines_sent), $sformatf("line_count %0d exp %0d", line_count, lines_sent));
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
