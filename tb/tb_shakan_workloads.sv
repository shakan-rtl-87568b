// tb_shakan_workloads: runs the inference engine at its default size (four
// rings of eleven PEs, 512-word memory elements) on the ensemble sizes of the
// latency evaluation: depth 5 with 5 and 540 trees, depth 7 with 4 and 112
// trees, depth 9 with 3 and 27 trees. Each forest is random, spread as evenly
// as possible over the rings and laid out without empty slots (the ring
// length shares no factor with the depths, so trees rotate over all memory
// elements). For each configuration the engine is reset, loaded and fed 40
// samples back to back; votes are compared with the reference evaluation and
// the latency with 3*N_PE cycles per ring pass plus two merger cycles. The
// latency and the time from first input to last result are printed in cycles
// and in microseconds at 166 MHz.
module tb_shakan_workloads;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  localparam int NP  = 4;    // the top's defaults
  localparam int NPE = 11;
  localparam int MD  = 512;
  localparam int NS  = 40;
  localparam int N_CFG = 6;
  localparam int CFG_D[N_CFG] = '{5, 5, 7, 7, 9, 9};
  localparam int CFG_T[N_CFG] = '{5, 540, 4, 112, 3, 27};

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

  shakan_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  forest  f[NP];
  int signed feats[NS][N_FEAT];
  longint acc_cycle[NS];
  bit     seen[NS];

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cfg(int depth, int trees);
    int sent, n_out, max_pass, exp_lat;
    longint t_first, t_last;
    rst_n = 0;
    max_pass = 1;
    for (int r = 0; r < NP; r++) begin
      int tr;
      tr = trees / NP + ((r < trees % NP) ? 1 : 0);
      f[r] = new(tr, depth, 0, N_CLASSES);
      f[r].layout(NPE, MD);
      n_trees[r] = 10'(tr);
      if (tr > 0 && (f[r].visits - 1) / NPE + 1 > max_pass) max_pass = (f[r].visits - 1) / NPE + 1;
      for (int p = 0; p < NPE; p++)
        for (int a = 0; a < MD; a++) begin
          @(negedge clk);
          wr_en = 1; wr_pipe = ($clog2(NP+1))'(r); wr_pe = ($clog2(NPE+1))'(p);
          wr_addr = 10'(a); wr_data = f[r].mem[p][a];
        end
    end
    exp_lat = 3 * NPE * max_pass + 2;
    @(negedge clk); wr_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (seen[i]) seen[i] = 0;
    sent = 0; n_out = 0; t_first = 0; t_last = 0;
    fork
      begin
        while (sent < NS) begin
          @(negedge clk);
          in_valid = 1;
          for (int i = 0; i < N_FEAT; i++) begin
            feats[sent][i] = $urandom_range(0, 1 << 21) - (1 << 20);
            in_feat[i] = feats[sent][i];
          end
          #1;
          if (in_ready) begin
            acc_cycle[sent] = cycle + 1;
            if (sent == 0) t_first = cycle + 1;
            sent++;
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
              for (int c = 0; c < N_CLASSES; c++)
                if (out_score[c] != 16'(sum[c])) begin
                  failures++;
                  $display("FAIL depth %0d tag %0d class %0d votes %0d exp %0d", depth, t, c,
                           out_score[c], sum[c]);
                  break;
                end
              lat = int'(cycle - acc_cycle[t]) + 1;
              checks++;
              if (lat < exp_lat || lat > exp_lat + 4) begin
                failures++;
                $display("FAIL depth %0d tag %0d latency %0d exp %0d", depth, t, lat, exp_lat);
              end
            end
            t_last = cycle;
            n_out++;
          end
        end
      end
    join
    $display("depth %0d, %0d trees: %0d ring passes, latency %0d cycles (%.2f us at 166 MHz), %0d samples in %0d cycles (%.2f us per sample)",
             depth, trees, max_pass, exp_lat, exp_lat / 166.0, NS, t_last - t_first + 1,
             real'(t_last - t_first + 1) / NS / 166.0);
  endtask

  initial begin
    in_valid = 0; in_feat = '0; wr_en = 0; wr_pipe = '0; wr_pe = '0; wr_addr = '0; wr_data = '0;
    n_trees = '0;
    for (int c = 0; c < N_CFG; c++) run_cfg(CFG_D[c], CFG_T[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
