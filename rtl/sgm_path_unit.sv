// sgm_path_unit: path-cost update of equation (8) for one direction and G disparities.
//
// For disparity d = grp*G + j and the previous pixel p-r on the path:
//   L(p,d) = C(p,d) + min( L(p-r,d), L(p-r,d-1)+P1, L(p-r,d+1)+P1, min_k L(p-r,k)+P2 )
//                   - min_k L(p-r,k)
// Neighbours outside 0..ND-1 are left out. When the path starts at p (no previous pixel inside
// the image, or one this design does not have in time, see sgm_optimizer) L(p,d) = C(p,d).
// Results saturate at 255 to stay 8-bit, as the document keeps all optimized costs in 8 bits;
// the saturation itself is this design's choice.
//
// Purely combinational. The previous vector is given whole, so a group can reach across its
// boundary for d-1 and d+1.
module sgm_path_unit
  import stereo_pkg::*;
#(
  parameter int ND = 128,
  parameter int G  = 32,
  parameter int P1 = 10,
  parameter int P2 = 60
) (
  input  cost_t       c [G],
  input  logic [15:0] grp,
  input  cost_t       prev [ND],
  input  cost_t       prev_min,
  input  logic        restart,
  output cost_t       l [G]
);

  always_comb begin
    for (int j = 0; j < G; j++) begin
      automatic int d = int'(grp) * G + j;
      automatic int best = int'(prev_min) + P2;
      automatic int v;
      if (d < ND) begin
        if (int'(prev[d]) < best) best = int'(prev[d]);
        if (d > 0 && int'(prev[d-1]) + P1 < best) best = int'(prev[d-1]) + P1;
        if (d < ND - 1 && int'(prev[d+1]) + P1 < best) best = int'(prev[d+1]) + P1;
      end
      v = restart ? int'(c[j]) : int'(c[j]) + best - int'(prev_min);
      l[j] = (v > 255) ? cost_t'(255) : cost_t'(v);
    end
  end

endmodule
