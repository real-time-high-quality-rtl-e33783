// tb_cost_init: streams column windows of a random stereo pair into cost_init, the way the
// line buffer delivers them (zero outside the image), for every pass k and several band
// positions, and compares each initial cost C_I(x, y, k*PD + j) of in-image pixels with the
// software model's census + AD + robust-table cost. Costs are checked once the census window
// and the right-image delay line are filled (five columns plus j into the pass).
module tb_cost_init;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 12, H = 8, PD = 3, PR = 2, LMAX = 1, ND = 6, K = ND / PD;
  localparam int NWIN = PR + 2 * LMAX + 4, NC = PR + 2 * LMAX;

  logic clk = 0, rst_n = 0, in_valid = 0;
  coord_t in_rc, in_ytop;
  logic [15:0] in_k;
  rgb_t in_left [NWIN], in_right [NWIN];
  logic out_valid;
  coord_t out_cl, out_yc;
  cost_t out_cost [PD][NC];
  rgb_t out_lpix [NC];

  cost_init #(.W(W), .H(H), .PD(PD), .PR(PR), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  stereo_ref m;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t px(input int which, input int x, input int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return '0;
    return which ? m.R[y][x] : m.L[y][x];
  endfunction

  initial begin
    m = new(W, H, ND, W, LMAX, 20, 10, 60, 5);
    foreach (m.L[y, x]) begin
      m.L[y][x] = rgb_t'($urandom);
      m.R[y][x] = (x >= 2) ? m.L[y][x-2] : rgb_t'($urandom);
      if ($urandom_range(0, 3) == 0) m.R[y][x].r = 8'($urandom);
    end
    m.run_agg();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int band = 0; band < H / PR; band++) begin
      for (int k = 0; k < K; k++) begin
        automatic int yt = band * PR - LMAX - 2;
        for (int t = 0; t < W + PD + 6; t++) begin
          automatic int rc = -PD - 2 + t;
          in_valid = 1; in_rc = coord_t'(rc); in_ytop = coord_t'(yt); in_k = 16'(k);
          for (int i = 0; i < NWIN; i++) begin
            in_left[i]  = px(0, rc, yt + i);
            in_right[i] = px(1, rc - k * PD, yt + i);
          end
          @(negedge clk);
          in_valid = 0;
          if (out_valid !== 1'b1 || int'(out_cl) != rc - 2 || int'(out_yc) != yt + 2) begin
            failures++; $display("FAIL: tags at t=%0d", t);
          end
          for (int j = 0; j < PD; j++) begin
            automatic int x = rc - 2;
            if (t < 4 + j || x < 0 || x >= W) continue;
            for (int r = 0; r < NC; r++) begin
              automatic int y = yt + 2 + r;
              if (y < 0 || y >= H) continue;
              checks++;
              if (int'(out_cost[j][r]) != m.cost[y][x][k * PD + j]) begin
                failures++;
                if (failures < 10) $display("FAIL: cost x=%0d y=%0d d=%0d got %0d exp %0d",
                                            x, y, k * PD + j, out_cost[j][r], m.cost[y][x][k * PD + j]);
              end
              if (j == 0) begin
                checks++;
                if (out_lpix[r] !== m.L[y][x]) failures++;
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
