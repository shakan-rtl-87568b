// tb_shakan_next_node: exercises every case of the successor choice: inner
// child (left/right), leaf child (vote, tree count, done on the last tree),
// next-root address with and without the ring wrap, an empty instruction
// (skip) and an inactive sample.
module tb_shakan_next_node;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  instr_t                 instr;
  logic                   cond, active;
  logic [TREE_CNT_W-1:0]  trees_done, n_trees;
  logic [LOOP_W-1:0]      loops;
  logic [CHILD_W-1:0]     na0, na1, cls0, cls1;
  logic                   vote0, vote1, done0, done1;
  logic [TREE_CNT_W-1:0]  td0, td1;
  int checks = 0, failures = 0;

  shakan_next_node #(.WRAP(1'b0)) dut0 (.instr, .cond, .active, .trees_done, .loops, .n_trees,
    .next_addr(na0), .vote(vote0), .cls(cls0), .trees_done_out(td0), .done_out(done0));
  shakan_next_node #(.WRAP(1'b1)) dut1 (.instr, .cond, .active, .trees_done, .loops, .n_trees,
    .next_addr(na1), .vote(vote1), .cls(cls1), .trees_done_out(td1), .done_out(done1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      logic [CHILD_W-1:0] e_addr0, e_addr1, child;
      logic e_vote, e_done, is_leaf;
      logic [TREE_CNT_W-1:0] e_td;
      instr       = instr_t'({$urandom, $urandom});
      if ($urandom_range(0, 3) != 0) instr.valid = 1'b1;
      cond        = 1'($urandom);
      active      = ($urandom_range(0, 7) != 0);
      n_trees     = 10'($urandom_range(1, 20));
      trees_done  = 10'($urandom_range(0, 19));
      loops       = 10'($urandom_range(0, 100));
      #1;
      child   = cond ? instr.child_l : instr.child_r;
      is_leaf = cond ? instr.leaf_l : instr.leaf_r;
      e_addr0 = 10'(loops);
      e_addr1 = 10'(loops + 1);
      e_vote  = 1'b0;
      e_td    = trees_done;
      e_done  = !active;
      if (active && instr.valid && !is_leaf) begin
        e_addr0 = child; e_addr1 = child;
      end
      if (active && instr.valid && is_leaf) begin
        e_vote = 1'b1;
        e_td   = trees_done + 1;
        e_done = (trees_done + 1 >= n_trees);
      end
      checks++;
      if (na0 !== e_addr0 || na1 !== e_addr1 || vote0 !== e_vote || vote1 !== e_vote ||
          td0 !== e_td || done0 !== e_done || (e_vote && cls0 !== child)) begin
        failures++;
        $display("FAIL valid=%0b leaf=%0b cond=%0b active=%0b na=%0d/%0d exp %0d/%0d",
                 instr.valid, is_leaf, cond, active, na0, na1, e_addr0, e_addr1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
