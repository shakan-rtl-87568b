// shakan_votes_update: adds one vote to the class named by a leaf.
//
// When `leaf` is set, the score counter selected by `cls` is incremented;
// a class code outside the N_CLASSES counters adds nothing. With `leaf`
// clear the scores pass unchanged. Counters wrap at 2^16, which a forest of
// fewer than 65536 trees never reaches. Purely combinational; it belongs to
// the third cycle of the PE.
module shakan_votes_update
  import shakan_pkg::*;
(
  input  logic [N_CLASSES-1:0][SCORE_W-1:0] score_in,
  input  logic                              leaf,
  input  logic [CHILD_W-1:0]                cls,
  output logic [N_CLASSES-1:0][SCORE_W-1:0] score_out
);
  always_comb begin
    score_out = score_in;
    for (int c = 0; c < N_CLASSES; c++)
      if (leaf && cls == CHILD_W'(c)) score_out[c] = score_in[c] + 1'b1;
  end
endmodule
