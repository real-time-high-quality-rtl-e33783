// sgm_lane: semiglobal optimization of one image row, one pixel per slot of K cycles.
//
// The optimizer works on 2*PD disparities per cycle (G), twice the aggregation's PD. A pixel
// therefore takes K/2 compute cycles, and the rest of its K-cycle slot is free time in which the
// minimum over all disparities of the pixel just finished settles before the next pixel of the
// same path needs it. Four directions are optimized, all along the scan order:
//   r0 from the upper-left pixel, r1 from the pixel above, r2 from the upper-right pixel and
//   r3 from the pixel to the left.
// Slot schedule, cyc = 0 .. K-1 (shared with the other lanes):
//   cyc 0          the optimizer reads the cost group 0 and the upper row's path costs
//   cyc 1 .. K/2   group g = cyc-1: four sgm_path_units compute G path costs each; the running
//                  minimum of each direction and the final cost sum C_final = L0+L1+L2+L3 build up
//   cyc K/2+1      the pixel is complete: res_valid, the r0/r1/r2 vectors and minima go to the
//                  next row's lane, C_final to disparity selection; r3's vector becomes the
//                  previous pixel of the row
// The r0 input is the upper row's r0 vector read during the previous slot (column x-1), kept in
// a register, so every slot reads the upper memory at columns x and x+1 only.
//
// Follows the document: the four directions, P_D^sgbm = 2*PD, K/2 compute cycles per pixel and
// the free cycles for the minimum. Register-based whole vectors and the exact slot schedule are
// this design's choices. Needs K >= 4.
module sgm_lane
  import stereo_pkg::*;
#(
  parameter int ND = 128,
  parameter int PD = 16,
  parameter int P1 = 10,
  parameter int P2 = 60,
  localparam int G = 2 * PD,
  localparam int K = ND / PD
) (
  input  logic        clk,
  input  logic        act,          // this lane has a pixel in the current slot
  input  logic [15:0] cyc,
  input  logic        rs [4],       // path restart per direction for this pixel
  input  cost_t       c_grp [G],    // aggregated costs of group cyc-1
  input  cost_t       up_r0 [ND],   // upper row, r0 at column x (saved for the next slot)
  input  cost_t       up_r0_min,
  input  cost_t       up_r1 [ND],   // upper row, r1 at column x
  input  cost_t       up_r1_min,
  input  cost_t       up_r2 [ND],   // upper row, r2 at column x+1
  input  cost_t       up_r2_min,
  output logic        res_valid,
  output cost_t       l_r   [3][ND], // r0, r1, r2 path costs of this pixel
  output cost_t       l_min [3],
  output logic [CFIN_W-1:0] cfin [ND]
);

  cost_t prev3 [ND];
  cost_t prev3_min;
  cost_t saved0 [ND];
  cost_t saved0_min;
  cost_t l3 [ND];
  cost_t run_min [4];

  logic        comp;
  logic [15:0] grp;
  assign comp = act && (cyc >= 16'd1) && (cyc <= 16'(K / 2));
  assign grp  = cyc - 16'd1;
  assign res_valid = act && (cyc == 16'(K / 2 + 1));

  cost_t lg [4][G];

  sgm_path_unit #(.ND(ND), .G(G), .P1(P1), .P2(P2)) u_r0 (
    .c(c_grp), .grp(grp), .prev(saved0), .prev_min(saved0_min), .restart(rs[0]), .l(lg[0]));
  sgm_path_unit #(.ND(ND), .G(G), .P1(P1), .P2(P2)) u_r1 (
    .c(c_grp), .grp(grp), .prev(up_r1), .prev_min(up_r1_min), .restart(rs[1]), .l(lg[1]));
  sgm_path_unit #(.ND(ND), .G(G), .P1(P1), .P2(P2)) u_r2 (
    .c(c_grp), .grp(grp), .prev(up_r2), .prev_min(up_r2_min), .restart(rs[2]), .l(lg[2]));
  sgm_path_unit #(.ND(ND), .G(G), .P1(P1), .P2(P2)) u_r3 (
    .c(c_grp), .grp(grp), .prev(prev3), .prev_min(prev3_min), .restart(rs[3]), .l(lg[3]));

  always_ff @(posedge clk) begin
    if (comp) begin
      for (int j = 0; j < G; j++) begin
        automatic int d = int'(grp) * G + j;
        if (d < ND) begin
          l_r[0][d] <= lg[0][j];
          l_r[1][d] <= lg[1][j];
          l_r[2][d] <= lg[2][j];
          l3[d]     <= lg[3][j];
          cfin[d]   <= CFIN_W'(lg[0][j]) + CFIN_W'(lg[1][j]) + CFIN_W'(lg[2][j]) + CFIN_W'(lg[3][j]);
        end
      end
      for (int r = 0; r < 4; r++) begin
        automatic cost_t m = (grp == 0) ? cost_t'(255) : run_min[r];
        for (int j = 0; j < G; j++) if (lg[r][j] < m) m = lg[r][j];
        run_min[r] <= m;
      end
    end
    if (res_valid) begin
      prev3      <= l3;
      prev3_min  <= run_min[3];
      saved0     <= up_r0;
      saved0_min <= up_r0_min;
    end
  end

  assign l_min[0] = run_min[0];
  assign l_min[1] = run_min[1];
  assign l_min[2] = run_min[2];

  // The slot schedule needs the free cycle after the last group.
  initial assert (K >= 4 && K % 2 == 0) else $error("sgm_lane needs an even K = ND/PD >= 4");

endmodule
