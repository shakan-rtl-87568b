// tb_shakan_ring: one ring of four PEs running a forest of random depth-3
// oblique trees, placed in the circulant layout with random empty slots
// between trees (so trees start in every ME and cross the ring's wrap).
// A stream of random samples is offered every cycle; the test checks each
// sample's votes against the reference evaluation of the forest, its latency
// against 3 cycles per PE times the ring passes it needs, that no sample is
// lost or duplicated, and that input stalls (a looping sample has priority),
// skips and multi-pass samples all occur. The forest is then replaced by a
// single-tree one to check a sample that finishes within its first pass.
module tb_shakan_ring;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  localparam int N_PE     = 4;
  localparam int ME_DEPTH = 128;
  localparam int N_SAMP   = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [TREE_CNT_W-1:0]          n_trees;
  logic                           in_valid, in_ready, out_valid;
  logic [TAG_W-1:0]               in_tag;
  logic [N_FEAT-1:0][FEAT_W-1:0]  in_feat;
  sample_t                        out_sample;
  logic                           wr_en;
  logic [$clog2(N_PE+1)-1:0]      wr_pe;
  logic [CHILD_W-1:0]             wr_addr;
  logic [INSTR_W-1:0]             wr_data;

  shakan_ring #(.N_PE(N_PE), .ME_DEPTH(ME_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_skip_trees = 0, n_multi_pass = 0, n_single_pass = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  forest f;
  int signed feats[N_SAMP][N_FEAT];
  longint acc_cycle[N_SAMP];
  bit     seen[N_SAMP];
  int     n_out;

  task automatic load(forest fr);
    fr.layout(N_PE, ME_DEPTH);
    for (int p = 0; p < N_PE; p++)
      for (int a = 0; a < ME_DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_pe = 3'(p); wr_addr = 10'(a); wr_data = fr.mem[p][a];
      end
    @(negedge clk); wr_en = 0;
  endtask

  // run N samples through forest fr and check them
  task automatic run(forest fr, int n);
    int sent, exp_lat;
    int votes[N_CLASSES];
    exp_lat = 3 * N_PE * ((fr.visits - 1) / N_PE + 1);
    if ((fr.visits - 1) / N_PE > 0) n_multi_pass++; else n_single_pass++;
    n_trees = 10'(fr.n_trees);
    sent = 0; n_out = 0;
    foreach (seen[i]) seen[i] = 0;
    fork
      begin
        while (sent < n) begin
          @(negedge clk);
          in_valid = 1;
          in_tag   = 8'(sent);
          for (int i = 0; i < N_FEAT; i++) begin
            feats[sent][i] = $urandom_range(0, 1 << 21) - (1 << 20);
            in_feat[i] = feats[sent][i];
          end
          #1;
          acc_cycle[sent] = cycle + 1;   // the edge that takes it
          if (in_ready) sent++;
          else          n_stall++;
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        while (n_out < n) begin
          @(negedge clk);
          if (out_valid) begin
            int t;
            t = out_sample.tag;
            fr.eval(feats[t], votes);
            checks++;
            if (seen[t]) begin failures++; $display("FAIL tag %0d twice", t); end
            seen[t] = 1;
            for (int c = 0; c < N_CLASSES; c++)
              if (out_sample.score[c] != 16'(votes[c])) begin
                failures++;
                $display("FAIL tag %0d class %0d votes %0d exp %0d", t, c, out_sample.score[c], votes[c]);
                break;
              end
            checks++;
            if (cycle - acc_cycle[t] + 1 != exp_lat) begin
              failures++;
              $display("FAIL tag %0d latency %0d exp %0d", t, cycle - acc_cycle[t] + 1, exp_lat);
            end
            checks++;
            if (out_sample.trees_done != 10'(fr.n_trees)) failures++;
            n_out++;
          end
        end
      end
    join
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = '0; in_feat = '0; wr_en = 0; wr_pe = '0; wr_addr = '0; wr_data = '0;
    n_trees = '0;
    f = new(7, 3, 2, N_CLASSES);
    for (int i = 0; i < f.n_trees; i++) if (f.gap[i] > 0) n_skip_trees++;
    load(f);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(f, N_SAMP);
    f = new(1, 3, 0, N_CLASSES);
    load(f);
    run(f, 20);
    if (n_stall == 0 || n_skip_trees == 0 || n_multi_pass == 0 || n_single_pass == 0) begin
      failures++;
      $display("FAIL mechanism missing: stalls %0d skips %0d multi %0d single %0d",
               n_stall, n_skip_trees, n_multi_pass, n_single_pass);
    end
    $display("stalls %0d, trees after empty slots %0d", n_stall, n_skip_trees);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
