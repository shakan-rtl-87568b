// tb_shakan_votes_update: checks that a leaf adds exactly one vote to its
// class, that out-of-range classes and non-leaves change nothing, and that a
// counter wraps from 65535 to 0.
module tb_shakan_votes_update;
  import shakan_pkg::*;

  logic [N_CLASSES-1:0][SCORE_W-1:0] si, so, exp;
  logic                              leaf;
  logic [CHILD_W-1:0]                cls;
  int checks = 0, failures = 0;

  shakan_votes_update dut (.score_in(si), .leaf(leaf), .cls(cls), .score_out(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      for (int c = 0; c < N_CLASSES; c++) si[c] = 16'($urandom);
      leaf = 1'($urandom);
      cls  = ($urandom_range(0, 3) == 0) ? 10'($urandom) : 10'($urandom_range(0, N_CLASSES - 1));
      #1;
      exp = si;
      if (leaf && cls < N_CLASSES) exp[cls] = si[cls] + 16'd1;
      checks++;
      if (so !== exp) begin
        failures++;
        $display("FAIL leaf=%0b cls=%0d", leaf, cls);
      end
    end
    si = '0; si[3] = 16'hffff; leaf = 1'b1; cls = 10'd3;
    #1;
    checks++;
    if (so[3] !== 16'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
