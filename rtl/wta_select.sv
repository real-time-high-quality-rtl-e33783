// wta_select: winner-takes-all disparity selection with uniqueness test and sub-pixel refinement.
//
// From the final costs C_final(d), d = 0..ND-1, of one pixel it finds
//   best      = argmin C_final(d)           (equation (10); the smallest d wins a tie)
//   second    = min C_final(d) over |d - best| > 1, the runner-up outside the winner's neighbours
//   unique    = min * 100 < second * (100 - UNIQ_PCT); a pixel failing this is an outlier
//   d_sub     = best + (C(best-1) - C(best+1)) / (2 * (C(best-1) + C(best+1) - 2*C(best)))
// d_sub is fixed point with SUBPIX_F = 4 fractional bits, the quotient truncated toward zero;
// it is left at best when best is 0 or ND-1 or the parabola is flat.
//
// Follows the document: WTA, a uniqueness check on the two smallest costs and sub-pixel
// interpolation. The exact uniqueness rule, UNIQ_PCT = 5, and the parabola fit are this
// design's choices; the document names the steps without formulas.
//
// Purely combinational.
module wta_select
  import stereo_pkg::*;
#(
  parameter int ND       = 128,
  parameter int UNIQ_PCT = 5,
  localparam int DW      = $clog2(ND)
) (
  input  logic [CFIN_W-1:0] cfin [ND],
  output logic [DW-1:0]     d_int,
  output logic [DW+SUBPIX_F-1:0] d_sub,
  output logic              unique_ok,
  output logic [CFIN_W-1:0] c_min
);

  always_comb begin
    automatic int best = 0;
    automatic int bmin;
    automatic int sec = (1 << CFIN_W);
    automatic int cm1, cp1, den, off;
    bmin = int'(cfin[0]);
    for (int d = 1; d < ND; d++) begin
      if (int'(cfin[d]) < bmin) begin
        bmin = int'(cfin[d]);
        best = d;
      end
    end
    for (int d = 0; d < ND; d++) begin
      if ((d < best - 1 || d > best + 1) && int'(cfin[d]) < sec) sec = int'(cfin[d]);
    end
    off = 0;
    if (best > 0 && best < ND - 1) begin
      cm1 = int'(cfin[best - 1]);
      cp1 = int'(cfin[best + 1]);
      den = cm1 + cp1 - 2 * bmin;
      if (den > 0) off = ((cm1 - cp1) * (1 << (SUBPIX_F - 1))) / den;
    end
    d_int     = DW'(best);
    d_sub     = (DW + SUBPIX_F)'(best * (1 << SUBPIX_F) + off);
    unique_ok = (bmin * 100) < (sec * (100 - UNIQ_PCT));
    c_min     = CFIN_W'(bmin);
  end

endmodule
