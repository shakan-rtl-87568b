// shakan_top: oblique random forest inference engine made of N_PIPES parallel
// rings of N_PE processing elements each.
//
// The forest's trees are divided among the rings; each ring's memory
// elements hold its trees in the circulant layout (see shakan_ring). A sample
// (five 32-bit fixed-point features) is issued to all rings in the same
// cycle under a running tag; each ring walks it through its own trees and
// returns it with seven 16-bit vote counts, and shakan_vote_merge adds the
// counts of all rings and emits them with the sample's tag. The host reads
// the class with most votes from out_score.
//
// Interface: in_valid/in_ready handshake on the input (ready when no sample
// is looping into PE 0 of any ring and the merger entry of the next tag is
// free); out_valid is a one-cycle strobe with no back-pressure; n_trees gives
// each ring's tree count; the write port loads one 64-bit instruction into
// memory element wr_pe of ring wr_pipe. Latency of a sample: 3 cycles per PE
// over the whole ring passes the slowest ring needs (3*N_PE per pass), plus
// two merger cycles. The parallel rings and the 3-cycle PE follow
// the published architecture; the ring count and length, the tags and the
// merger are this design's choices.
module shakan_top
  import shakan_pkg::*;
#(
  parameter int unsigned N_PIPES     = 4,
  parameter int unsigned N_PE        = 11,
  parameter int unsigned ME_DEPTH    = 512,
  parameter int unsigned MERGE_DEPTH = 64
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [N_PIPES-1:0][TREE_CNT_W-1:0]    n_trees,
  // samples in
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  logic [N_FEAT-1:0][FEAT_W-1:0]         in_feat,
  output logic [TAG_W-1:0]                      in_tag,     // tag the next sample gets
  // results out
  output logic                                  out_valid,
  output logic [TAG_W-1:0]                      out_tag,
  output logic [N_CLASSES-1:0][SCORE_W-1:0]     out_score,
  // instruction loading
  input  logic                                  wr_en,
  input  logic [$clog2(N_PIPES+1)-1:0]          wr_pipe,
  input  logic [$clog2(N_PE+1)-1:0]             wr_pe,
  input  logic [CHILD_W-1:0]                    wr_addr,
  input  logic [INSTR_W-1:0]                    wr_data
);
  localparam int unsigned MIDX_W = (MERGE_DEPTH > 1) ? $clog2(MERGE_DEPTH) : 1;

  logic    [N_PIPES-1:0]    ring_ready, ring_out_valid;
  sample_t [N_PIPES-1:0]    ring_out;
  logic [MERGE_DEPTH-1:0]   entry_free;
  logic [TAG_W-1:0]         tag_q;
  logic                     fire;

  assign in_tag   = tag_q;
  assign in_ready = (&ring_ready) && entry_free[MIDX_W'(tag_q)];
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n)    tag_q <= '0;
    else if (fire) tag_q <= tag_q + 1'b1;
  end

  for (genvar r = 0; r < N_PIPES; r++) begin : g_ring
    shakan_ring #(.N_PE(N_PE), .ME_DEPTH(ME_DEPTH)) u_ring (
      .clk        (clk),
      .rst_n      (rst_n),
      .n_trees    (n_trees[r]),
      .in_valid   (fire),
      .in_ready   (ring_ready[r]),
      .in_tag     (tag_q),
      .in_feat    (in_feat),
      .out_valid  (ring_out_valid[r]),
      .out_sample (ring_out[r]),
      .wr_en      (wr_en && (wr_pipe == ($clog2(N_PIPES+1))'(r))),
      .wr_pe      (wr_pe),
      .wr_addr    (wr_addr),
      .wr_data    (wr_data)
    );
  end

  shakan_vote_merge #(.N_PIPES(N_PIPES), .DEPTH(MERGE_DEPTH)) u_merge (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc       (fire),
    .alloc_tag   (tag_q),
    .entry_free  (entry_free),
    .ring_valid  (ring_out_valid),
    .ring_sample (ring_out),
    .out_valid   (out_valid),
    .out_tag     (out_tag),
    .out_score   (out_score)
  );
endmodule
