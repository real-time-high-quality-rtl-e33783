// tb_sgm_lane: drives one lane through a row of pixels, slot by slot, as the optimizer would:
// cost groups arrive at cycles 1..K/2 of each K-cycle slot, upper-row vectors are random.
// The expected path costs are computed in the testbench from equation (8): r0 from the r0
// vector given one slot earlier, r1 and r2 from this slot's vectors, r3 from the lane's own
// previous pixel. Checks res_valid timing, the r0..r2 outputs and minima and C_final.
module tb_sgm_lane;
  import stereo_pkg::*;
  localparam int ND = 8, PD = 2, G = 2 * PD, K = ND / PD, P1 = 10, P2 = 60, NPIX = 30;

  logic clk = 0, act = 0;
  logic [15:0] cyc;
  logic rs [4];
  cost_t c_grp [G];
  cost_t up_r0 [ND], up_r1 [ND], up_r2 [ND];
  cost_t up_r0_min, up_r1_min, up_r2_min;
  logic res_valid;
  cost_t l_r [3][ND];
  cost_t l_min [3];
  logic [CFIN_W-1:0] cfin [ND];

  sgm_lane #(.ND(ND), .PD(PD), .P1(P1), .P2(P2)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int vmin(input int v [ND]);
    int m = 1 << 20;
    for (int d = 0; d < ND; d++) if (v[d] < m) m = v[d];
    return m;
  endfunction

  function automatic void path(input int c [ND], input int p [ND], input bit restart, output int l [ND]);
    int pm = vmin(p);
    for (int d = 0; d < ND; d++) begin
      int b = pm + P2, v;
      if (p[d] < b) b = p[d];
      if (d > 0 && p[d-1] + P1 < b) b = p[d-1] + P1;
      if (d < ND - 1 && p[d+1] + P1 < b) b = p[d+1] + P1;
      v = restart ? c[d] : c[d] + b - pm;
      l[d] = v > 255 ? 255 : v;
    end
  endfunction

  initial begin
    int prev0 [ND], prev3 [ND];
    int u0 [ND], u1 [ND], u2 [ND], c [ND];
    int e [4][ND];
    @(negedge clk);
    for (int n = 0; n < NPIX; n++) begin
      logic r [4];
      for (int d = 0; d < ND; d++) begin
        u0[d] = $urandom_range(0, 200); u1[d] = $urandom_range(0, 200); u2[d] = $urandom_range(0, 200);
        c[d] = $urandom_range(0, 255);
      end
      r[0] = (n == 0) || ($urandom_range(0, 5) == 0);
      r[1] = ($urandom_range(0, 5) == 0);
      r[2] = ($urandom_range(0, 5) == 0);
      r[3] = (n == 0) || (n == 15);
      path(c, prev0, r[0], e[0]);
      path(c, u1, r[1], e[1]);
      path(c, u2, r[2], e[2]);
      path(c, prev3, r[3], e[3]);
      for (int k = 0; k < K; k++) begin
        act = 1; cyc = 16'(k);
        rs = r;
        // the optimizer's memory output is valid from cycle 1 and held
        if (k == 1) begin
          for (int d = 0; d < ND; d++) begin
            up_r0[d] = cost_t'(u0[d]); up_r1[d] = cost_t'(u1[d]); up_r2[d] = cost_t'(u2[d]);
          end
          up_r0_min = cost_t'(vmin(u0)); up_r1_min = cost_t'(vmin(u1)); up_r2_min = cost_t'(vmin(u2));
        end
        if (k >= 1 && k <= K / 2)
          for (int j = 0; j < G; j++) c_grp[j] = cost_t'(c[(k - 1) * G + j]);
        #1;
        checks++;
        if (res_valid !== (k == K / 2 + 1)) begin failures++; $display("FAIL: res_valid at cyc %0d", k); end
        if (res_valid) begin
          for (int d = 0; d < ND; d++) begin
            checks++;
            if (int'(cfin[d]) != e[0][d] + e[1][d] + e[2][d] + e[3][d] ||
                int'(l_r[0][d]) != e[0][d] || int'(l_r[1][d]) != e[1][d] || int'(l_r[2][d]) != e[2][d]) begin
              failures++;
              if (failures < 10) $display("FAIL: pixel %0d d=%0d cfin %0d exp %0d", n, d, cfin[d],
                                          e[0][d] + e[1][d] + e[2][d] + e[3][d]);
            end
          end
          for (int r2 = 0; r2 < 3; r2++) begin
            checks++;
            if (int'(l_min[r2]) != vmin(e[r2])) begin failures++; $display("FAIL: min r%0d", r2); end
          end
        end
        @(negedge clk);
      end
      prev0 = u0;
      prev3 = e[3];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
