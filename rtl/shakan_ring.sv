// shakan_ring: one pipeline ("basic block") of N_PE processing elements, each
// with its own memory element, closed into a ring by sample looping.
//
// A tree is stored level by level across consecutive memory elements: its
// root in some ME k, its children in ME k+1, and so on, wrapping from the
// last ME back to ME 0 (circulant mapping). Trees may therefore start in any
// ME and reach full depth regardless of where they start, so the memory of
// all MEs fills evenly. A sample enters at PE 0, walks its trees one after
// another, and keeps circulating from the last PE back to PE 0 until it has
// evaluated n_trees trees; it then leaves at the last PE.
//
// Sample looping has priority over new samples: in_ready is low in a cycle
// in which a circulating sample occupies the input of PE 0. An accepted
// sample starts with zero scores, at address 0 of ME 0 (the root slot of
// pass 0). Each PE adds three cycles, so one pass takes 3*N_PE cycles and up
// to 3*N_PE samples are in flight. The pass counter carried by the sample is
// incremented on the wrap; next-tree roots are addressed by it (see
// shakan_next_node). The ring structure follows the published basic block;
// N_PE's default (11), the handshake and the root addressing are this
// design's choices. The host loads instructions through the write port.
module shakan_ring
  import shakan_pkg::*;
#(
  parameter int unsigned N_PE     = 11,
  parameter int unsigned ME_DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [TREE_CNT_W-1:0]      n_trees,
  // new samples
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [TAG_W-1:0]           in_tag,
  input  logic [N_FEAT-1:0][FEAT_W-1:0] in_feat,
  // finished samples (no back-pressure)
  output logic                       out_valid,
  output sample_t                    out_sample,
  // instruction loading
  input  logic                       wr_en,
  input  logic [$clog2(N_PE+1)-1:0]  wr_pe,
  input  logic [CHILD_W-1:0]         wr_addr,
  input  logic [INSTR_W-1:0]         wr_data
);
  logic    [N_PE-1:0]              v_in, v_out;
  sample_t [N_PE-1:0]              s_in, s_out;
  logic    [N_PE-1:0][CHILD_W-1:0] a_in, a_out;

  logic                            loop_back;
  sample_t                         new_sample;

  assign loop_back = v_out[N_PE-1] && !s_out[N_PE-1].done;
  assign in_ready  = !loop_back;

  always_comb begin
    new_sample            = '0;
    new_sample.feat       = in_feat;
    new_sample.tag        = in_tag;
    new_sample.done       = (n_trees == '0);
  end

  // ring input multiplexer: looping samples first
  always_comb begin
    v_in[0] = loop_back || in_valid;
    if (loop_back) begin
      s_in[0]       = s_out[N_PE-1];
      s_in[0].loops = s_out[N_PE-1].loops + 1'b1;
      a_in[0]       = a_out[N_PE-1];
    end else begin
      s_in[0] = new_sample;
      a_in[0] = '0;
    end
  end

  for (genvar p = 1; p < N_PE; p++) begin : g_chain
    assign v_in[p] = v_out[p-1];
    assign s_in[p] = s_out[p-1];
    assign a_in[p] = a_out[p-1];
  end

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic               rd_en;
    logic [CHILD_W-1:0] rd_addr;
    logic [INSTR_W-1:0] rd_data;

    shakan_me #(.DEPTH(ME_DEPTH), .ADDR_W(CHILD_W)) u_me (
      .clk     (clk),
      .rd_en   (rd_en),
      .rd_addr (rd_addr),
      .rd_data (rd_data),
      .wr_en   (wr_en && (wr_pe == ($clog2(N_PE+1))'(p))),
      .wr_addr (wr_addr),
      .wr_data (wr_data)
    );

    shakan_pe #(.WRAP(p == N_PE-1)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .n_trees    (n_trees),
      .in_valid   (v_in[p]),
      .in_sample  (s_in[p]),
      .in_addr    (a_in[p]),
      .me_rd_en   (rd_en),
      .me_rd_addr (rd_addr),
      .me_rd_data (rd_data),
      .out_valid  (v_out[p]),
      .out_sample (s_out[p]),
      .out_addr   (a_out[p])
    );
  end

  assign out_valid  = v_out[N_PE-1] && s_out[N_PE-1].done;
  assign out_sample = s_out[N_PE-1];

  // a sample that leaves the ring has evaluated all its trees
  a_out_done: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> out_sample.trees_done >= n_trees);
endmodule
