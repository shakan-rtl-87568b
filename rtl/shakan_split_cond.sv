// shakan_split_cond: evaluates the oblique split of one tree node,
//
//     X[f1] + g2*X[f2]  <  th - g3*X[f3]
//
// which is the node rule X[f1] + g2*X[f2] + g3*X[f3] < th rearranged so that
// its two additions run side by side and only one comparison follows them.
// The three features are picked from the sample by the 6-bit indices of the
// instruction (an index beyond the sample's features reads as zero); the two
// coefficient products come from shakan_gamma_mul. The 16-bit threshold is
// aligned to the feature scale by TH_SHIFT (threshold Q8.8 against Q16.16
// features, a choice of this design). All arithmetic is exact in ACC_W bits.
// Purely combinational: it fills the second cycle of the PE.
module shakan_split_cond
  import shakan_pkg::*;
(
  input  logic [N_FEAT-1:0][FEAT_W-1:0] feat,
  input  instr_t                        instr,
  output logic                          cond   // 1: take the left child
);
  logic signed [FEAT_W-1:0] x1, x2, x3;
  logic signed [ACC_W-1:0]  gx2, gx3, lhs, rhs, th_al;

  function automatic logic signed [FEAT_W-1:0] pick(
      input logic [N_FEAT-1:0][FEAT_W-1:0] f, input logic [FIDX_W-1:0] idx);
    logic signed [FEAT_W-1:0] v;
    v = '0;
    for (int i = 0; i < N_FEAT; i++)
      if (idx == FIDX_W'(i)) v = f[i];
    return v;
  endfunction

  assign x1 = pick(feat, instr.f1);
  assign x2 = pick(feat, instr.f2);
  assign x3 = pick(feat, instr.f3);

  shakan_gamma_mul u_g2 (.x(x2), .g(instr.g2), .y(gx2));
  shakan_gamma_mul u_g3 (.x(x3), .g(instr.g3), .y(gx3));

  always_comb begin
    th_al = ACC_W'(instr.th) <<< (TH_SHIFT + GFRAC);
    lhs   = (ACC_W'(x1) <<< GFRAC) + gx2;
    rhs   = th_al - gx3;
    cond  = lhs < rhs;
  end
endmodule
