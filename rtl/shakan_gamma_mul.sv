// shakan_gamma_mul: multiplies a feature by a coefficient from the set
// {0, -1/2, -1, -2, +1/4, +1/2, +1, +2} without a multiplier.
//
// The feature is first widened by GFRAC extra fractional bits, so that the
// right shifts by one or two places are exact; a left shift gives x2, and a
// two's-complement negation gives the sign flip. Code 0 yields zero.
// Purely combinational. The output is in units of 2^-GFRAC feature LSBs.
// The shift-and-negate structure follows the published PE; keeping the
// shifted-out bits (instead of truncating) is this design's choice.
module shakan_gamma_mul
  import shakan_pkg::*;
(
  input  logic signed [FEAT_W-1:0]  x,
  input  logic        [GCODE_W-1:0] g,
  output logic signed [ACC_W-1:0]   y
);
  logic signed [ACC_W-1:0] xs;   // x * 2^GFRAC, sign-extended
  logic signed [ACC_W-1:0] mag;  // |gamma| * x

  always_comb begin
    xs = ACC_W'(x) <<< GFRAC;
    unique case (g)
      G_NEG_H, G_POS_H: mag = xs >>> 1;
      G_NEG_1, G_POS_1: mag = xs;
      G_NEG_2, G_POS_2: mag = xs <<< 1;
      G_POS_Q:          mag = xs >>> 2;
      default:          mag = '0;
    endcase
    unique case (g)
      G_NEG_H, G_NEG_1, G_NEG_2: y = -mag;
      default:                   y = mag;
    endcase
  end
endmodule
