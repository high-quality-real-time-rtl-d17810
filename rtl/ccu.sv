// ccu: Cost Computation Unit. Matching cost between one reference pixel and one
// target pixel: the mean absolute colour difference (sum of |dR|,|dG|,|dB|
// times 1/3), truncated at TC, plus the absolute x- and y-gradient differences,
// summed and truncated at TG. The truncated colour and gradient terms are
// weighted by left shifts (SHC, SHG) instead of multipliers and added. The
// structure, TC, TG and the shift amounts follow the document; the 1/3 is a
// 171/512 fixed-point multiply, this design's choice.
// Purely combinational; the CVCU registers the result.
module ccu
  import gifsm_pkg::*;
#(
  parameter int unsigned TC  = 7,
  parameter int unsigned TG  = 2,
  parameter int unsigned SHC = 3,
  parameter int unsigned SHG = 6
) (
  input  pix_t              ref_pix,
  input  pix_t              tgt_pix,
  output logic [COST_W-1:0] cost
);
  function automatic logic [8:0] absdiff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? 9'(a - b) : 9'(b - a);
  endfunction

  logic [9:0]  csum;
  logic [18:0] cmean;
  logic [9:0]  gsum;
  logic [9:0]  ct, gt;
  logic [15:0] tot;
  always_comb begin
    csum  = 10'(absdiff(ref_pix.r, tgt_pix.r)) + 10'(absdiff(ref_pix.g, tgt_pix.g))
          + 10'(absdiff(ref_pix.b, tgt_pix.b));
    cmean = (19'(csum) * 19'd171) >> 9;
    gsum  = 10'(absdiff(ref_pix.gx, tgt_pix.gx)) + 10'(absdiff(ref_pix.gy, tgt_pix.gy));
    ct    = (cmean > 19'(TC)) ? 10'(TC) : cmean[9:0];
    gt    = (gsum > 10'(TG)) ? 10'(TG) : gsum;
    tot   = (16'(ct) << SHC) + (16'(gt) << SHG);
    cost  = (tot > 16'((1 << COST_W) - 1)) ? {COST_W{1'b1}} : COST_W'(tot);
  end
endmodule
