// shakan_pe: processing element, evaluating one tree level of a sample in a
// three-cycle pipeline.
//
//   cycle 1  the node address is sent to the memory element (ME) and the
//            sample is registered alongside the read;
//   cycle 2  the instruction returned by the ME and the sample feed the
//            oblique split condition (shakan_split_cond); the outcome is
//            registered with sample and instruction;
//   cycle 3  shakan_next_node picks the successor address, or on a leaf the
//            next tree's root, and shakan_votes_update adds the leaf vote;
//            sample and address are registered towards the next PE.
//
// A new sample can enter every cycle, so three samples are in flight per PE
// and the latency is exactly three cycles. Samples flagged done (all trees
// evaluated) and empty pipeline slots pass through untouched. The stage split
// follows the published PE; the done flag, the skip on an empty instruction
// and the root addressing are this design's choices (see shakan_next_node).
// Only the valid bits are reset (active-low synchronous reset).
module shakan_pe
  import shakan_pkg::*;
#(
  parameter bit WRAP = 1'b0   // 1 for the last PE of a ring
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [TREE_CNT_W-1:0]  n_trees,     // trees per sample in this ring
  // from the previous PE (or the ring input)
  input  logic                   in_valid,
  input  sample_t                in_sample,
  input  logic [CHILD_W-1:0]     in_addr,
  // memory element read port
  output logic                   me_rd_en,
  output logic [CHILD_W-1:0]     me_rd_addr,
  input  logic [INSTR_W-1:0]     me_rd_data,
  // to the next PE
  output logic                   out_valid,
  output sample_t                out_sample,
  output logic [CHILD_W-1:0]     out_addr
);
  // stage 1 -> 2
  logic    s1_valid;
  sample_t s1_sample;
  // stage 2 -> 3
  logic    s2_valid;
  sample_t s2_sample;
  instr_t  s2_instr;
  logic    s2_cond;

  instr_t  instr;
  logic    cond;

  // ---- cycle 1: memory query
  assign me_rd_en   = in_valid && !in_sample.done;
  assign me_rd_addr = in_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
    s1_sample <= in_sample;
  end

  // ---- cycle 2: split condition
  assign instr = instr_t'(me_rd_data);

  shakan_split_cond u_split (
    .feat  (s1_sample.feat),
    .instr (instr),
    .cond  (cond)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
    s2_sample <= s1_sample;
    s2_instr  <= instr;
    s2_cond   <= cond;
  end

  // ---- cycle 3: next node selection and votes update
  logic                              vote;
  logic [CHILD_W-1:0]                cls;
  logic [CHILD_W-1:0]                next_addr;
  logic [TREE_CNT_W-1:0]             trees_done_n;
  logic                              done_n;
  logic [N_CLASSES-1:0][SCORE_W-1:0] score_n;

  shakan_next_node #(.WRAP(WRAP)) u_next (
    .instr          (s2_instr),
    .cond           (s2_cond),
    .active         (s2_valid && !s2_sample.done),
    .trees_done     (s2_sample.trees_done),
    .loops          (s2_sample.loops),
    .n_trees        (n_trees),
    .next_addr      (next_addr),
    .vote           (vote),
    .cls            (cls),
    .trees_done_out (trees_done_n),
    .done_out       (done_n)
  );

  shakan_votes_update u_votes (
    .score_in  (s2_sample.score),
    .leaf      (vote),
    .cls       (cls),
    .score_out (score_n)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
    out_sample            <= s2_sample;
    out_sample.score      <= score_n;
    out_sample.trees_done <= trees_done_n;
    out_sample.done       <= done_n;
    out_addr              <= next_addr;
  end
endmodule
