// shakan_tb_pkg: reference model shared by the ring and top testbenches.
//
// A forest is described abstractly: full binary trees of depth D, node n of
// a tree in heap order (root 1, children 2n and 2n+1), each node with its
// features, coefficients and threshold, and a class for every leaf. The
// reference evaluates a sample on this description with plain integer
// arithmetic (coefficients scaled by 4). Separately, `layout` places the
// trees in the memory elements of a ring following the circulant rule: tree
// levels in consecutive MEs, the root of a tree that starts on ring pass k at
// address k, empty (invalid) instructions where a gap is requested, other
// nodes packed above the root area.
package shakan_tb_pkg;
  import shakan_pkg::*;

  localparam int MAX_TREES = 160;
  localparam int MAX_D     = 9;
  localparam int MAX_NODES = 1 << MAX_D;   // heap indices 1 .. 2^D-1
  localparam int MAX_PE    = 16;
  localparam int MAX_DEPTH = 512;

  function automatic longint gamma4(input logic [2:0] g);
    case (g)
      3'd0: return 0;  3'd1: return -2; 3'd2: return -4; 3'd3: return -8;
      3'd4: return 1;  3'd5: return 2;  3'd6: return 4;  default: return 8;
    endcase
  endfunction

  // X[f1] + g2*X[f2] < th - g3*X[f3], th in units of 2^8 feature LSBs
  function automatic bit ref_cond(input int signed x[N_FEAT], input instr_t in);
    longint a, b, c, l, r;
    a = (in.f1 < N_FEAT) ? longint'(x[in.f1]) : 0;
    b = (in.f2 < N_FEAT) ? longint'(x[in.f2]) : 0;
    c = (in.f3 < N_FEAT) ? longint'(x[in.f3]) : 0;
    l = 4 * a + gamma4(in.g2) * b;
    r = longint'(in.th) * 256 * 4 - gamma4(in.g3) * c;
    return l < r;
  endfunction

  function automatic instr_t rand_node();
    instr_t n;
    n = '0;
    n.valid = 1'b1;
    n.th    = 16'($urandom_range(0, 8191)) - 16'd4096;
    n.f1    = 6'($urandom_range(0, N_FEAT - 1));
    n.f2    = 6'($urandom_range(0, N_FEAT - 1));
    n.f3    = 6'($urandom_range(0, N_FEAT - 1));
    n.g2    = 3'($urandom_range(0, 7));
    n.g3    = 3'($urandom_range(0, 7));
    return n;
  endfunction

  class forest;
    int     n_trees;
    int     depth;
    int     gap[MAX_TREES];            // empty PE slots before tree t
    instr_t node[MAX_TREES][MAX_NODES];
    int     leaf_cls[MAX_TREES][2*MAX_NODES];
    logic [INSTR_W-1:0] mem[MAX_PE][MAX_DEPTH];
    int     visits;                    // PE visits of one sample in total

    function new(int t, int d, int max_gap, int n_cls);
      n_trees = t;
      depth   = d;
      for (int i = 0; i < t; i++) begin
        gap[i] = $urandom_range(0, max_gap);
        for (int n = 1; n < (1 << d); n++) node[i][n] = rand_node();
        for (int n = (1 << d); n < (2 << d); n++)
          leaf_cls[i][n] = $urandom_range(0, n_cls - 1);
      end
    endfunction

    // votes per class of one sample
    function void eval(input int signed x[N_FEAT], output int votes[N_CLASSES]);
      foreach (votes[c]) votes[c] = 0;
      for (int i = 0; i < n_trees; i++) begin
        int n = 1;
        for (int l = 0; l < depth; l++)
          n = 2 * n + (ref_cond(x, node[i][n]) ? 0 : 1);
        if (leaf_cls[i][n] < N_CLASSES) votes[leaf_cls[i][n]]++;
      end
    endfunction

    // place the forest in n_pe memory elements of me_depth words
    function void layout(int n_pe, int me_depth);
      int v, root_slots;
      int ptr[MAX_PE];
      int addr[MAX_NODES];
      v = 0;
      for (int i = 0; i < n_trees; i++) v += gap[i] + depth;
      visits     = v;
      root_slots = (v + n_pe - 1) / n_pe + 1;
      for (int p = 0; p < n_pe; p++) begin
        ptr[p] = root_slots;
        for (int a = 0; a < me_depth; a++) mem[p][a] = '0;
      end
      v = 0;
      for (int i = 0; i < n_trees; i++) begin
        v += gap[i];   // the root slots skipped over stay invalid (all zero)
        // addresses, level by level
        for (int l = 0; l < depth; l++) begin
          int p = (v + l) % n_pe;
          for (int k = 0; k < (1 << l); k++) begin
            int n = (1 << l) + k;
            if (l == 0) addr[n] = v / n_pe;
            else begin addr[n] = ptr[p]; ptr[p]++; end
          end
        end
        for (int n = 1; n < (1 << depth); n++) begin
          instr_t w;
          int l, p;
          l = $clog2(n + 1) - 1;
          p = (v + l) % n_pe;
          w = node[i][n];
          if (l == depth - 1) begin
            w.leaf_l = 1'b1; w.child_l = 10'(leaf_cls[i][2*n]);
            w.leaf_r = 1'b1; w.child_r = 10'(leaf_cls[i][2*n+1]);
          end else begin
            w.leaf_l = 1'b0; w.child_l = 10'(addr[2*n]);
            w.leaf_r = 1'b0; w.child_r = 10'(addr[2*n+1]);
          end
          mem[p][addr[n]] = w;
        end
        v += depth;
      end
      for (int p = 0; p < n_pe; p++)
        if (ptr[p] > me_depth) $fatal(1, "forest does not fit ME %0d", p);
    endfunction
  endclass
endpackage
