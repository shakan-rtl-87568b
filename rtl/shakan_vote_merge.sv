// shakan_vote_merge: adds up the votes that the parallel rings give to the
// same sample and releases the total once every ring has reported.
//
// The forest is split over N_PIPES rings, and every sample is sent to all of
// them under one tag. Each ring returns the sample with the votes of its own
// trees, possibly in a different order from the other rings. The merger keeps
// DEPTH entries indexed by the low bits of the tag: `alloc` clears an entry
// when a sample is issued, every returning copy adds its scores and bumps the
// entry's count (several rings may return in the same cycle), and an entry
// whose count has reached N_PIPES is emitted, lowest index first, one per
// cycle, and freed. `entry_free` tells the issuer whether the entry of the
// next tag may be reused. Copies are added at the clock edge after they are
// presented and a complete entry is emitted, registered, at the edge after
// that: a result appears two cycles after its last copy, or later when
// several entries complete together.
// The combination of rings is implied by the published architecture but not
// described; this whole block is this design's choice.
module shakan_vote_merge
  import shakan_pkg::*;
#(
  parameter int unsigned N_PIPES = 4,
  parameter int unsigned DEPTH   = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // issue of a new sample
  input  logic                                 alloc,
  input  logic [TAG_W-1:0]                     alloc_tag,
  output logic [DEPTH-1:0]                     entry_free,
  // copies returning from the rings
  input  logic    [N_PIPES-1:0]                ring_valid,
  input  sample_t [N_PIPES-1:0]                ring_sample,
  // merged result
  output logic                                 out_valid,
  output logic [TAG_W-1:0]                     out_tag,
  output logic [N_CLASSES-1:0][SCORE_W-1:0]    out_score
);
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(N_PIPES + 1);

  logic [DEPTH-1:0]                              busy;
  logic [DEPTH-1:0][CNT_W-1:0]                   cnt;
  logic [DEPTH-1:0][TAG_W-1:0]                   tag_q;
  logic [DEPTH-1:0][N_CLASSES-1:0][SCORE_W-1:0]  acc;

  logic                                          sel_found;
  logic [IDX_W-1:0]                              sel;

  assign entry_free = ~busy;

  // lowest complete entry
  always_comb begin
    sel_found = 1'b0;
    sel       = '0;
    for (int e = DEPTH-1; e >= 0; e--)
      if (busy[e] && cnt[e] == CNT_W'(N_PIPES)) begin
        sel_found = 1'b1;
        sel       = IDX_W'(e);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= sel_found;
      if (sel_found) busy[sel] <= 1'b0;
      if (alloc)     busy[IDX_W'(alloc_tag)] <= 1'b1;
    end
    if (sel_found) begin
      out_tag   <= tag_q[sel];
      out_score <= acc[sel];
    end
    for (int e = 0; e < DEPTH; e++) begin
      logic [N_CLASSES-1:0][SCORE_W-1:0] sum;
      logic [CNT_W-1:0]                  n;
      sum = acc[e];
      n   = cnt[e];
      if (alloc && IDX_W'(alloc_tag) == IDX_W'(e)) begin
        sum = '0;
        n   = '0;
        tag_q[e] <= alloc_tag;
      end
      for (int r = 0; r < N_PIPES; r++)
        if (ring_valid[r] && IDX_W'(ring_sample[r].tag) == IDX_W'(e)) begin
          n = n + 1'b1;
          for (int c = 0; c < N_CLASSES; c++)
            sum[c] = sum[c] + ring_sample[r].score[c];
        end
      acc[e] <= sum;
      cnt[e] <= n;
    end
  end

  // an entry is only reissued once it has been emitted
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc |-> entry_free[IDX_W'(alloc_tag)]);
endmodule
