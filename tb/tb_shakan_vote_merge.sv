// tb_shakan_vote_merge: three pipelines return copies of issued samples with
// random votes, in random order and with random delays, several in the same
// cycle. Each merged result must equal the sum of its copies, appear exactly
// once, and only after the last copy; entries must be reused (tags wrap over
// the 8-entry table) and the issuer must see full-table stalls.
module tb_shakan_vote_merge;
  import shakan_pkg::*;

  localparam int NP = 3, DEPTH = 8, N_TAGS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                              alloc;
  logic [TAG_W-1:0]                  alloc_tag;
  logic [DEPTH-1:0]                  entry_free;
  logic    [NP-1:0]                  ring_valid;
  sample_t [NP-1:0]                  ring_sample;
  logic                              out_valid;
  logic [TAG_W-1:0]                  out_tag;
  logic [N_CLASSES-1:0][SCORE_W-1:0] out_score;

  shakan_vote_merge #(.N_PIPES(NP), .DEPTH(DEPTH)) dut (.*);

  typedef logic [N_CLASSES-1:0][SCORE_W-1:0] score_t;
  typedef struct { int tag; score_t s; } copy_t;
  copy_t  pend[NP][$];
  score_t exp_sum[N_TAGS];
  int     copies_left[N_TAGS];
  bit     emitted[N_TAGS];
  int     checks = 0, failures = 0, n_out = 0, n_full = 0, n_same_cycle = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued;
    alloc = 0; alloc_tag = '0; ring_valid = '0; ring_sample = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    issued = 0;
    while (n_out < N_TAGS) begin
      @(negedge clk);
      // check what the merger emitted at the last edge
      if (out_valid) begin
        int t;
        // tags of live entries are unique mod 256 within the window used here
        t = issued - ((issued - int'(out_tag)) & 255);
        checks++;
        if (t < 0 || t >= N_TAGS || emitted[t] || copies_left[t] != 0 || out_score !== exp_sum[t]) begin
          failures++;
          $display("FAIL out tag %0d", out_tag);
        end else emitted[t] = 1;
        n_out++;
      end
      // issue
      alloc = 0;
      if (issued < N_TAGS && $urandom_range(0, 1) == 0) begin
        if (entry_free[issued % DEPTH]) begin
          alloc = 1; alloc_tag = 8'(issued);
          exp_sum[issued] = '0;
          copies_left[issued] = NP;
          for (int p = 0; p < NP; p++) begin
            copy_t c;
            c.tag = issued;
            for (int k = 0; k < N_CLASSES; k++) c.s[k] = 16'($urandom_range(0, 9));
            for (int k = 0; k < N_CLASSES; k++) exp_sum[issued][k] += c.s[k];
            pend[p].push_back(c);
          end
          issued++;
        end else n_full++;
      end
      // returns (not of a tag allocated in this very cycle)
      ring_valid = '0;
      for (int p = 0; p < NP; p++) begin
        int sz;
        sz = pend[p].size() - (alloc ? 1 : 0);
        if (sz > 0 && $urandom_range(0, 2) != 0) begin
          int i;
          copy_t c;
          i = $urandom_range(0, sz - 1);
          c = pend[p][i];
          pend[p].delete(i);
          ring_valid[p] = 1;
          ring_sample[p].tag   = 8'(c.tag);
          ring_sample[p].score = c.s;
          copies_left[c.tag]--;
        end
      end
      if ($countones(ring_valid) > 1) n_same_cycle++;
    end
    @(negedge clk);
    for (int t = 0; t < N_TAGS; t++) begin
      checks++;
      if (!emitted[t]) failures++;
    end
    if (n_full == 0 || n_same_cycle == 0) begin
      failures++;
      $display("FAIL mechanism missing: full %0d same-cycle %0d", n_full, n_same_cycle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
