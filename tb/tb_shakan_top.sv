// tb_shakan_top: end-to-end test of the inference engine at a reduced size
// (two rings of three PEs, 128-word memory elements, an 8-entry merger), so
// that every mechanism shows up in a short run: input stalls for looping
// samples and for a full merger, empty instruction slots, trees that cross
// the ring's wrap, samples needing several ring passes and rings of
// different lengths of work finishing in different orders.
//
// Each ring gets its own random forest (ring r holds 4 + 3 * r trees of depth
// 3, with random empty slots between trees) laid out in the circulant
// scheme by the reference model. For every sample the merged votes must
// equal the sum of the reference evaluations of all rings' forests; the
// latency from acceptance to result must be 3 cycles per PE times the ring
// passes of the slowest ring, plus two merger cycles (a result may wait a few
// cycles more when two finish together); every tag must come out once.
module tb_shakan_top;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  localparam int NP  = 2;
  localparam int NPE = 3;
  localparam int MD  = 128;
  localparam int MGD = 8;
  localparam int NS  = 120;
  localparam bit NEED_FULL = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0][TREE_CNT_W-1:0]          n_trees;
  logic                                   in_valid, in_ready, out_valid;
  logic [N_FEAT-1:0][FEAT_W-1:0]          in_feat;
  logic [TAG_W-1:0]                       in_tag, out_tag;
  logic [N_CLASSES-1:0][SCORE_W-1:0]      out_score;
  logic                                   wr_en;
  logic [$clog2(NP+1)-1:0]                wr_pipe;
  logic [$clog2(NPE+1)-1:0]               wr_pe;
  logic [CHILD_W-1:0]                     wr_addr;
  logic [INSTR_W-1:0]                     wr_data;

  shakan_top #(.N_PIPES(NP), .N_PE(NPE), .ME_DEPTH(MD), .MERGE_DEPTH(MGD)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall_loop = 0, n_stall_merge = 0, n_skip = 0, n_wrap_tree = 0;
  int n_multi_pass = 0, n_late = 0, n_exact = 0, n_ooo = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  forest  f[NP];
  int signed feats[NS][N_FEAT];
  longint acc_cycle[NS];
  bit     seen[NS];
  int     exp_lat;
  int     last_tag = -1;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent, n_out, max_pass;
    in_valid = 0; in_feat = '0; wr_en = 0; wr_pipe = '0; wr_pe = '0; wr_addr = '0; wr_data = '0;
    max_pass = 0;
    for (int r = 0; r < NP; r++) begin
      int v;
      f[r] = new(4 + 3 * r, 3, 2, N_CLASSES);
      f[r].layout(NPE, MD);
      n_trees[r] = 10'(f[r].n_trees);
      v = 0;
      for (int t = 0; t < f[r].n_trees; t++) begin
        if (f[r].gap[t] > 0) n_skip++;
        v += f[r].gap[t];
        if (v % NPE + f[r].depth > NPE) n_wrap_tree++;
        v += f[r].depth;
      end
      if ((f[r].visits - 1) / NPE + 1 > max_pass) max_pass = (f[r].visits - 1) / NPE + 1;
      for (int p = 0; p < NPE; p++)
        for (int a = 0; a < MD; a++) begin
          @(negedge clk);
          wr_en = 1; wr_pipe = ($clog2(NP+1))'(r); wr_pe = ($clog2(NPE+1))'(p);
          wr_addr = 10'(a); wr_data = f[r].mem[p][a];
        end
    end
    if (max_pass > 1) n_multi_pass++;
    exp_lat = 3 * NPE * max_pass + 2;
    @(negedge clk); wr_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sent = 0; n_out = 0;
    fork
      begin
        while (sent < NS) begin
          @(negedge clk);
          in_valid = ($urandom_range(0, 7) != 0);
          for (int i = 0; i < N_FEAT; i++) begin
            feats[sent][i] = $urandom_range(0, 1 << 21) - (1 << 20);
            in_feat[i] = feats[sent][i];
          end
          #1;
          if (in_valid) begin
            if (in_ready) begin
              checks++;
              if (in_tag != 8'(sent)) failures++;
              acc_cycle[sent] = cycle + 1;
              sent++;
            end else if (!(&dut.ring_ready)) n_stall_loop++;
            else n_stall_merge++;
          end
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        while (n_out < NS) begin
          @(negedge clk);
          if (out_valid) begin
            int t, lat;
            int votes[N_CLASSES], sum[N_CLASSES];
            t = out_tag;
            foreach (sum[c]) sum[c] = 0;
            for (int r = 0; r < NP; r++) begin
              f[r].eval(feats[t], votes);
              foreach (sum[c]) sum[c] += votes[c];
            end
            checks++;
            if (t >= NS || seen[t]) begin
              failures++; $display("FAIL tag %0d unexpected", t);
            end else begin
              seen[t] = 1;
              if (t < last_tag) n_ooo++;
              last_tag = t;
              for (int c = 0; c < N_CLASSES; c++)
                if (out_score[c] != 16'(sum[c])) begin
                  failures++;
                  $display("FAIL tag %0d class %0d votes %0d exp %0d", t, c, out_score[c], sum[c]);
                  break;
                end
              lat = int'(cycle - acc_cycle[t]) + 1;
              checks++;
              if (lat < exp_lat || lat > exp_lat + 4) begin
                failures++;
                $display("FAIL tag %0d latency %0d exp %0d", t, lat, exp_lat);
              end
              if (lat == exp_lat) n_exact++; else n_late++;
            end
            n_out++;
          end
        end
      end
    join
    for (int t = 0; t < NS; t++) begin
      checks++;
      if (!seen[t]) failures++;
    end
    $display("latency %0d cycles (%0d exact, %0d delayed); stalls: looping %0d, merger %0d",
             exp_lat, n_exact, n_late, n_stall_loop, n_stall_merge);
    $display("trees after empty slots %0d, trees across the wrap %0d, out of order %0d",
             n_skip, n_wrap_tree, n_ooo);
    if (n_stall_loop == 0 || (NEED_FULL && n_stall_merge == 0) || n_skip == 0 ||
        n_wrap_tree == 0 || n_multi_pass == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
