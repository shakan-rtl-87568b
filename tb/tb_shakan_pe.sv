// tb_shakan_pe: a processing element with its memory element, filled with
// random instructions (some empty, some with leaf children). A random stream
// of samples (with bubbles, done samples and random node addresses) enters
// back to back; every output is compared, exactly three cycles after its
// input, with a model of the node step: split condition, successor or
// next-root address, leaf vote, tree count and done flag. Both the inner
// (WRAP=0) and the last-in-ring (WRAP=1) variant are checked.
module tb_shakan_pe;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  localparam int DEPTH = 64;
  localparam int LAT   = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [TREE_CNT_W-1:0] n_trees;
  logic                  in_valid;
  sample_t               in_sample;
  logic [CHILD_W-1:0]    in_addr;
  logic                  wr_en;
  logic [CHILD_W-1:0]    wr_addr;
  logic [INSTR_W-1:0]    wr_data;
  instr_t                image [DEPTH];

  logic [1:0]              rd_en, out_valid;
  logic [1:0][CHILD_W-1:0] rd_addr, out_addr;
  logic [1:0][INSTR_W-1:0] rd_data;
  sample_t [1:0]           out_sample;

  int checks = 0, failures = 0;
  int n_votes = 0, n_inner = 0, n_skip = 0, n_done = 0;

  for (genvar w = 0; w < 2; w++) begin : g_dut
    shakan_me #(.DEPTH(DEPTH)) u_me (.clk, .rd_en(rd_en[w]), .rd_addr(rd_addr[w]),
      .rd_data(rd_data[w]), .wr_en, .wr_addr, .wr_data);
    shakan_pe #(.WRAP(w == 1)) u_pe (.clk, .rst_n, .n_trees, .in_valid, .in_sample, .in_addr,
      .me_rd_en(rd_en[w]), .me_rd_addr(rd_addr[w]), .me_rd_data(rd_data[w]),
      .out_valid(out_valid[w]), .out_sample(out_sample[w]), .out_addr(out_addr[w]));
  end

  // expected outputs, indexed by the cycle they are due
  typedef struct {
    bit         valid;
    sample_t    s;
    logic [CHILD_W-1:0] addr0, addr1;
  } exp_t;
  exp_t exp_q[$];

  function automatic exp_t model(bit v, sample_t s, logic [CHILD_W-1:0] a);
    exp_t e;
    instr_t in;
    int signed xs[N_FEAT];
    bit c, lf;
    logic [CHILD_W-1:0] ch;
    e.valid = v;
    e.s     = s;
    e.addr0 = 10'(s.loops);
    e.addr1 = 10'(s.loops + 1);
    if (!v) return e;
    if (s.done) return e;
    in = image[a % DEPTH];
    if (!in.valid) begin n_skip++; return e; end
    foreach (xs[i]) xs[i] = s.feat[i];
    c  = ref_cond(xs, in);
    ch = c ? in.child_l : in.child_r;
    lf = c ? in.leaf_l : in.leaf_r;
    if (lf) begin
      n_votes++;
      if (ch < N_CLASSES) e.s.score[ch] = s.score[ch] + 1;
      e.s.trees_done = s.trees_done + 1;
      e.s.done = (s.trees_done + 1 >= n_trees);
      if (e.s.done) n_done++;
    end else begin
      n_inner++;
      e.addr0 = ch; e.addr1 = ch;
    end
    return e;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sample = '0; in_addr = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    n_trees = 10'd6;
    for (int a = 0; a < DEPTH; a++) begin
      image[a] = rand_node();
      image[a].leaf_l  = 1'($urandom);
      image[a].leaf_r  = 1'($urandom);
      image[a].child_l = 10'($urandom_range(0, 9));
      image[a].child_r = 10'($urandom_range(0, 1023));
      if ($urandom_range(0, 7) == 0) image[a].valid = 1'b0;
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = image[a];
    end
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < LAT; k++) begin
      exp_t e; e.valid = 0; exp_q.push_back(e);
    end
    repeat (4000) begin
      @(negedge clk);
      // output due now belongs to the input applied LAT cycles ago
      begin
        exp_t e;
        e = exp_q.pop_front();
        checks++;
        if (out_valid[0] !== e.valid || out_valid[1] !== e.valid) begin
          failures++;
          $display("FAIL valid got %0b/%0b exp %0b", out_valid[0], out_valid[1], e.valid);
        end else if (e.valid && (out_sample[0] !== e.s || out_sample[1] !== e.s ||
                 (!e.s.done && (out_addr[0] !== e.addr0 || out_addr[1] !== e.addr1)))) begin
          failures++;
          $display("FAIL sample/address at t=%0t addr %0d/%0d exp %0d/%0d", $time,
                   out_addr[0], out_addr[1], e.addr0, e.addr1);
        end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < N_FEAT; i++) in_sample.feat[i] = 32'($urandom_range(0, 1 << 21)) - 32'(1 << 20);
      for (int c = 0; c < N_CLASSES; c++) in_sample.score[c] = 16'($urandom_range(0, 50));
      in_sample.tag        = 8'($urandom);
      in_sample.trees_done = 10'($urandom_range(0, 5));
      in_sample.loops      = 10'($urandom_range(0, 40));
      in_sample.done       = ($urandom_range(0, 9) == 0);
      in_addr              = 10'($urandom_range(0, DEPTH - 1));
      exp_q.push_back(model(in_valid, in_sample, in_addr));
    end
    if (n_votes == 0 || n_inner == 0 || n_skip == 0 || n_done == 0) begin
      failures++;
      $display("FAIL case not reached: votes %0d inner %0d skip %0d done %0d",
               n_votes, n_inner, n_skip, n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
