// shakan_next_node: decides where a sample goes after a tree node.
//
// The split outcome `cond` selects the left (true) or right (false) child of
// the instruction. An inner child's 10-bit field is the address of the next
// node in the following memory element and is passed on. A leaf child's
// field is a class label: a vote is raised, the completed-tree count grows by
// one, and the address passed on is the root of the next tree. When the count
// reaches `n_trees` the sample is marked done; a done sample is ignored by
// the remaining PEs and leaves the ring at its last PE.
//
// Root addressing (this design's choice): a tree that starts while the
// sample is on its k-th pass around the ring has its root at address k of
// that PE's memory element. So the next root address is the pass count, plus
// one when this PE is the last of the ring (WRAP=1), because the sample is
// then wrapping round to PE 0. An instruction whose validity bit is clear is
// an empty slot: the sample skips the PE with no vote and goes to the next
// PE's root slot; this lets a tree start at the memory element where its
// root was placed. Purely combinational; third PE cycle.
module shakan_next_node
  import shakan_pkg::*;
#(
  parameter bit WRAP = 1'b0
) (
  input  instr_t                 instr,
  input  logic                   cond,
  input  logic                   active,      // valid sample, not yet done
  input  logic [TREE_CNT_W-1:0]  trees_done,
  input  logic [LOOP_W-1:0]      loops,
  input  logic [TREE_CNT_W-1:0]  n_trees,
  output logic [CHILD_W-1:0]     next_addr,
  output logic                   vote,
  output logic [CHILD_W-1:0]     cls,
  output logic [TREE_CNT_W-1:0]  trees_done_out,
  output logic                   done_out
);
  logic                  is_leaf;
  logic [CHILD_W-1:0]    child;
  logic [CHILD_W-1:0]    root_addr;
  logic [TREE_CNT_W-1:0] cnt_inc;

  always_comb begin
    child     = cond ? instr.child_l : instr.child_r;
    is_leaf   = cond ? instr.leaf_l  : instr.leaf_r;
    root_addr = CHILD_W'(loops) + CHILD_W'(WRAP);
    cnt_inc   = trees_done + 1'b1;

    next_addr      = root_addr;
    vote           = 1'b0;
    cls            = child;
    trees_done_out = trees_done;
    done_out       = !active;
    if (active && instr.valid) begin
      if (is_leaf) begin
        vote           = 1'b1;
        trees_done_out = cnt_inc;
        done_out       = cnt_inc >= n_trees;
      end else begin
        next_addr = child;
      end
    end
  end
endmodule
