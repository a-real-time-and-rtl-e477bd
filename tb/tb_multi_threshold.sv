// tb_multi_threshold: random features against random thresholds, plus the
// boundary cases (a feature equal to its threshold must not fire). The rule
// mask and the defect flag are compared with the rules written out in the
// testbench; the verdict must follow feat_valid by one clock.
module tb_multi_threshold;
  import sqa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic feat_valid = 0, v_valid, v_defect;
  features_t feat, v_feat;
  btag_t feat_tag, v_tag;
  thresholds_t thr;
  logic [3:0] v_rules;

  multi_threshold dut (.clk, .rst_n, .feat_valid, .feat, .feat_tag, .thr, .v_valid, .v_defect, .v_rules, .v_feat, .v_tag);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int fired [4];

  initial begin
    feat = '0; feat_tag = '0; thr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] er;
      @(negedge clk);
      thr.mean_lo = 8'($urandom_range(20, 80));
      thr.mean_hi = 8'($urandom_range(150, 220));
      thr.range_hi = 8'($urandom_range(30, 120));
      thr.grad_hi = 16'($urandom_range(500, 4000));
      case (n % 5)
        0: begin feat.mean = thr.mean_lo; feat.range = thr.range_hi; feat.grad = thr.grad_hi; end
        1: begin feat.mean = thr.mean_hi; feat.range = 8'($urandom); feat.grad = 16'($urandom_range(0, 5000)); end
        default: begin feat.mean = 8'($urandom); feat.range = 8'($urandom); feat.grad = 16'($urandom_range(0, 6000)); end
      endcase
      feat_tag = '0; feat_tag.col = 16'(n);
      feat_valid = 1;
      er[0] = int'(feat.mean) < int'(thr.mean_lo);
      er[1] = int'(feat.mean) > int'(thr.mean_hi);
      er[2] = int'(feat.range) > int'(thr.range_hi);
      er[3] = int'(feat.grad) > int'(thr.grad_hi);
      @(posedge clk); #1;
      chk(v_valid, "v_valid one clock after feat_valid");
      chk(v_rules == er && v_defect == (er != 0), $sformatf("rules %b exp %b", v_rules, er));
      chk(v_feat == feat && v_tag.col == 16'(n), "features and tag carried");
      for (int k = 0; k < 4; k++) if (er[k]) fired[k]++;
      feat_valid = 0;
      @(posedge clk); #1;
      chk(!v_valid, "single verdict per feature set");
    end
    for (int k = 0; k < 4; k++) chk(fired[k] > 0, $sformatf("rule %0d never fired", k));
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
