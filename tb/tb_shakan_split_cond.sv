// tb_shakan_split_cond: drives random samples and instructions into the
// oblique split condition and compares with the node rule
// X[f1] + g2*X[f2] + g3*X[f3] < th evaluated in 64-bit integers. Includes
// feature indices beyond the sample (read as zero), the extreme thresholds
// and ties (left side exactly equal to the threshold, which is not "less").
module tb_shakan_split_cond;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  logic [N_FEAT-1:0][FEAT_W-1:0] feat;
  instr_t                        instr;
  logic                          cond;
  int checks = 0, failures = 0;
  int n_true = 0;

  shakan_split_cond dut (.feat(feat), .instr(instr), .cond(cond));

  task automatic check_now();
    int signed xs[N_FEAT];
    bit exp;
    #1;
    foreach (xs[i]) xs[i] = feat[i];
    exp = ref_cond(xs, instr);
    checks++;
    if (cond) n_true++;
    if (cond !== exp) begin
      failures++;
      $display("FAIL f=%0d,%0d,%0d g=%0d,%0d th=%0d cond=%0b exp=%0b",
               instr.f1, instr.f2, instr.f3, instr.g2, instr.g3, instr.th, cond, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // random, features in a range that makes both outcomes common
    repeat (3000) begin
      for (int i = 0; i < N_FEAT; i++) feat[i] = 32'($urandom_range(0, 1 << 21)) - 32'(1 << 20);
      instr = rand_node();
      if ($urandom_range(0, 9) == 0) instr.f3 = 6'($urandom_range(N_FEAT, 63));
      check_now();
    end
    // full-range features and thresholds
    repeat (1000) begin
      for (int i = 0; i < N_FEAT; i++) feat[i] = $urandom;
      instr = rand_node();
      instr.th = 16'($urandom);
      check_now();
    end
    // ties: X1 = th exactly, other terms zero -> not less
    for (int t = -5; t <= 5; t++) begin
      feat = '0;
      instr = rand_node();
      instr.f1 = 6'd2; instr.g2 = G_ZERO; instr.g3 = G_ZERO;
      instr.th = 16'(t * 100);
      feat[2] = 32'(t * 100 * 256);
      check_now();
      feat[2] = 32'(t * 100 * 256 - 1);
      check_now();
    end
    // halves and quarters must not be truncated: X1 + (1/4)*1 < 0 is false for X1 = 0
    feat = '0; feat[1] = 32'd1;
    instr = rand_node();
    instr.f1 = 6'd0; instr.f2 = 6'd1; instr.g2 = G_POS_Q; instr.g3 = G_ZERO; instr.th = '0;
    check_now();
    instr.g2 = G_NEG_H;   // -1/2 < 0: true
    check_now();
    if (n_true == 0 || n_true == checks) begin
      failures++;
      $display("FAIL outcomes not mixed: %0d of %0d true", n_true, checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
