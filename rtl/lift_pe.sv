// lift_pe: one lifting processing element, y = K*c + (a + b) / 2^SH.
//
// This is the arithmetic of every predict and update step of the rearranged
// 9/7 lifting scheme: the branch being lifted (c) is scaled by its constant K
// through a Booth multiplier, and the sum of its two neighbours from the other
// branch (a, b) is added after a right shift by SH (0, 4, 1, 1 for P1, U1, P2,
// U2). Its critical path is one multiplier and two adders, as in the published
// pipeline.
//
// Fixed point: c, a, b and y are sample words (DW bits, FB fractional bits); K
// has CF fractional bits. The product is rounded (half up) to sample precision
// and so is the shifted neighbour sum; the result wraps at DW bits. Rounding
// half up and wrap-around are this design's choices; the word
// widths are chosen so that an 8-bit image does not overflow for three levels.
// Timing: purely combinational.
module lift_pe
  import dwt_pkg::*;
#(
  parameter int SH = 0
) (
  input  coef_t   k,
  input  sample_t c,
  input  sample_t a,
  input  sample_t b,
  output sample_t y
);

  // half an LSB of the result, added before each right shift (round half up)
  localparam logic signed [DW+CW-1:0] RND_P = (DW+CW)'(1) <<< (CF - 1);
  localparam logic signed [DW:0]      RND_S = (SH == 0) ? '0 : (DW+1)'(1) <<< (SH - 1);

  logic signed [DW+CW-1:0] prod;
  logic signed [DW+CW-1:0] prod_sh;
  logic signed [DW:0]      nsum;
  logic signed [DW:0]      nsum_sh;

  booth_mult #(.AW(DW), .BW(CW)) u_mult (
    .a(c),
    .b(k),
    .p(prod)
  );

  always_comb begin
    prod_sh = (prod + RND_P) >>> CF;
    nsum    = {a[DW-1], a} + {b[DW-1], b};
    nsum_sh = (nsum + RND_S) >>> SH;
    y       = prod_sh[DW-1:0] + nsum_sh[DW-1:0];
  end

endmodule
