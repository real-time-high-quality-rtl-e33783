// tb_arm_gen: streams left-image centre columns (as cost_init delivers them) through arm_gen
// for every band of a blocky random image with mild noise, and compares the vertical arms of
// the current column and the horizontal arms of the column LMAX back with the software model's
// cross arms (colour rule, image border and LMAX limits).
module tb_arm_gen;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 20, H = 12, PR = 3, LMAX = 4, TAU = 20, NC = PR + 2 * LMAX;

  logic clk = 0, in_valid = 0;
  coord_t in_cl, in_yc;
  rgb_t in_lpix [NC];
  logic [7:0] vup [PR], vdn [PR], hl [PR], hr [PR];

  arm_gen #(.W(W), .H(H), .PR(PR), .LMAX(LMAX), .TAU(TAU)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, longest = 0;
  stereo_ref m;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t px(input int x, input int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return '0;
    return m.L[y][x];
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
    if (exp > longest) longest = exp;
  endtask

  initial begin
    m = new(W, H, 4, W, LMAX, TAU, 10, 60, 5);
    foreach (m.L[y, x]) begin
      automatic int base = ((x / 5) * 70 + (y / 4) * 40) % 256;
      m.L[y][x].r = 8'(base + $urandom_range(0, 12));
      m.L[y][x].g = 8'(base + $urandom_range(0, 12));
      m.L[y][x].b = 8'(255 - base);
      m.R[y][x] = m.L[y][x];
    end
    m.run_agg();
    @(negedge clk);
    for (int band = 0; band < H / PR; band++) begin
      automatic int yc = band * PR - LMAX;
      for (int cl = -LMAX - 2; cl < W + LMAX; cl++) begin
        in_valid = 1; in_cl = coord_t'(cl); in_yc = coord_t'(yc);
        for (int r = 0; r < NC; r++) in_lpix[r] = px(cl, yc + r);
        #1;
        for (int i = 0; i < PR; i++) begin
          automatic int y = yc + LMAX + i;
          if (cl >= 0 && cl < W) begin
            chk(vup[i], m.vup[y][cl], $sformatf("vup (%0d,%0d)", cl, y));
            chk(vdn[i], m.vdn[y][cl], $sformatf("vdn (%0d,%0d)", cl, y));
          end
          if (cl - LMAX >= 0 && cl - LMAX < W && cl >= -LMAX - 2 + 2 * LMAX) begin
            chk(hl[i], m.hl[y][cl - LMAX], $sformatf("hl (%0d,%0d)", cl - LMAX, y));
            chk(hr[i], m.hr[y][cl - LMAX], $sformatf("hr (%0d,%0d)", cl - LMAX, y));
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (longest != LMAX) begin failures++; $display("FAIL: no arm reached LMAX"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
