// arm_gen: cross-based support arms of the left image for PR rows.
//
// The support region of a pixel is built from crosses: each pixel has up, down, left and right
// arms that extend, one pixel at a time, while the next pixel is inside the image, its colour
// is close to the centre's (largest RGB channel difference below TAU) and the arm is no longer
// than LMAX. With the inverted aggregation order the region of pixel p is the union of the
// vertical arms of the pixels on p's horizontal arm.
//
// Input is the stream of left-image centre columns from cost_init: NC = PR + 2*LMAX rows whose
// top row is in_yc, at column in_cl. The PR processed rows are rows LMAX..LMAX+PR-1 of the
// column. The vertical arms (vup/vdn) are for the current column. The horizontal arms (hl/hr)
// need LMAX columns on either side, so they are produced for column in_cl - LMAX from a
// 2*LMAX-column history of the processed rows.
//
// The arm rule (one threshold on the largest channel difference) and TAU = 20 are this design's
// choices; the document describes the cross and LMAX = 12 but gives no rule.
//
// Timing: outputs are combinational on the inputs and on the history register, which shifts on
// every in_valid.
module arm_gen
  import stereo_pkg::*;
#(
  parameter int W    = 1600,
  parameter int H    = 1200,
  parameter int PR   = 4,
  parameter int LMAX = 12,
  parameter int TAU  = 20,
  localparam int NC  = PR + 2 * LMAX
) (
  input  logic       clk,
  input  logic       in_valid,
  input  coord_t     in_cl,
  input  coord_t     in_yc,
  input  rgb_t       in_lpix [NC],
  output logic [7:0] vup [PR],
  output logic [7:0] vdn [PR],
  output logic [7:0] hl  [PR],
  output logic [7:0] hr  [PR]
);

  rgb_t hist [2*LMAX][PR];   // hist[m-1] is column in_cl - m

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int m = 2 * LMAX - 1; m > 0; m--) hist[m] <= hist[m-1];
      for (int i = 0; i < PR; i++) hist[0][i] <= in_lpix[LMAX + i];
    end
  end

  function automatic logic close(input rgb_t a, input rgb_t b);
    return color_dist(a, b) < 8'(TAU);
  endfunction

  always_comb begin
    for (int i = 0; i < PR; i++) begin
      automatic int   r0 = LMAX + i;
      automatic logic go;
      automatic rgb_t cols [2*LMAX+1];
      // Vertical arms of the current column.
      vup[i] = '0;
      go = 1'b1;
      for (int k = 1; k <= LMAX; k++) begin
        go = go && (int'(in_yc) + r0 - k >= 0) && close(in_lpix[r0 - k], in_lpix[r0]);
        if (go) vup[i] = 8'(k);
      end
      vdn[i] = '0;
      go = 1'b1;
      for (int k = 1; k <= LMAX; k++) begin
        go = go && (int'(in_yc) + r0 + k < H) && close(in_lpix[r0 + k], in_lpix[r0]);
        if (go) vdn[i] = 8'(k);
      end
      // Horizontal arms of column in_cl - LMAX.
      cols[0] = in_lpix[r0];
      for (int m = 1; m <= 2 * LMAX; m++) cols[m] = hist[m-1][i];
      hl[i] = '0;
      go = 1'b1;
      for (int k = 1; k <= LMAX; k++) begin
        go = go && (int'(in_cl) - LMAX - k >= 0) && close(cols[LMAX + k], cols[LMAX]);
        if (go) hl[i] = 8'(k);
      end
      hr[i] = '0;
      go = 1'b1;
      for (int k = 1; k <= LMAX; k++) begin
        go = go && (int'(in_cl) - LMAX + k < W) && close(cols[LMAX - k], cols[LMAX]);
        if (go) hr[i] = 8'(k);
      end
    end
  end

endmodule
