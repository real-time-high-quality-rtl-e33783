// cost_agg_unit: cross-based cost aggregation for one disparity and PR rows.
//
// The aggregation runs in the inverted order of the document: vertical first, then horizontal,
// so only pixels (not costs) need row buffering. For each column of initial costs (NC rows, the
// PR processed rows in the middle) and each processed row i:
//   vertical:   Cv(q)  = sum of C_I over rows row-vup .. row+vdn of column q (its vertical arm),
//               taken as the difference of two prefix sums of the column (integral image), and
//               nv(q)  = vup + vdn + 1 pixels.
//   horizontal: C_agg(p) = sum of Cv(q) over q = p-hl .. p+hr (p's horizontal arm),
//               n(p)     = sum of nv(q) over the same q,
//   normalised: out = floor(C_agg(p) / n(p)), an 8-bit cost.
// The horizontal sum needs LMAX columns to the right of p, so the output is for column
// in_cl - LMAX, whose horizontal arms arm_gen delivers in the same cycle. The PD units of the
// core each handle one disparity of the current pass.
//
// Follows the document: vertical-then-horizontal order, integral-image vertical sums, division
// by the pixel count of the support region. A masked sum over the 2*LMAX+1 column history for
// the horizontal step is this design's choice.
//
// Timing: one register stage; out_valid follows in_valid by one cycle, out_x = in_cl - LMAX.
module cost_agg_unit
  import stereo_pkg::*;
#(
  parameter int PR   = 4,
  parameter int LMAX = 12,
  localparam int NC  = PR + 2 * LMAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  coord_t     in_cl,
  input  cost_t      in_cost [NC],
  input  logic [7:0] vup [PR],
  input  logic [7:0] vdn [PR],
  input  logic [7:0] hl  [PR],
  input  logic [7:0] hr  [PR],
  output logic       out_valid,
  output coord_t     out_x,
  output cost_t      out_agg [PR]
);

  logic [15:0] cv_now  [PR];
  logic [9:0]  cnt_now [PR];
  logic [15:0] cv_hist  [2*LMAX][PR];
  logic [9:0]  cnt_hist [2*LMAX][PR];

  // Vertical aggregation through the column's prefix sums.
  always_comb begin
    logic [15:0] pre [NC+1];
    pre[0] = '0;
    for (int r = 0; r < NC; r++) pre[r+1] = pre[r] + 16'(in_cost[r]);
    for (int i = 0; i < PR; i++) begin
      cv_now[i]  = pre[LMAX + i + int'(vdn[i]) + 1] - pre[LMAX + i - int'(vup[i])];
      cnt_now[i] = 10'(vup[i]) + 10'(vdn[i]) + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int m = 2 * LMAX - 1; m > 0; m--) begin
        cv_hist[m]  <= cv_hist[m-1];
        cnt_hist[m] <= cnt_hist[m-1];
      end
      cv_hist[0]  <= cv_now;
      cnt_hist[0] <= cnt_now;
    end
  end

  // Horizontal aggregation and normalisation for column in_cl - LMAX.
  cost_t agg_c [PR];
  always_comb begin
    for (int i = 0; i < PR; i++) begin
      automatic logic [23:0] s = '0;
      automatic logic [15:0] n = '0;
      for (int m = 0; m <= 2 * LMAX; m++) begin
        if (m >= LMAX - int'(hr[i]) && m <= LMAX + int'(hl[i])) begin
          s += (m == 0) ? 24'(cv_now[i])  : 24'(cv_hist[m-1][i]);
          n += (m == 0) ? 16'(cnt_now[i]) : 16'(cnt_hist[m-1][i]);
        end
      end
      agg_c[i] = (n == 0) ? cost_t'(0) : cost_t'(s / 24'(n));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_x <= coord_t'(int'(in_cl) - LMAX);
    end
  end

  always_ff @(posedge clk) if (in_valid) out_agg <= agg_c;

endmodule
