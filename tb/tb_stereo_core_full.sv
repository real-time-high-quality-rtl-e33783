// tb_stereo_core_full: one complete 1600x1200 frame with 128 disparity levels through stereo_core
// at its default parameters (PD = 16, PR = 4, WSEG = 400, LMAX = 12).
//
// The scene is a random blocky texture seen at a background disparity of 24, with a foreground
// rectangle at disparity 90, plus noise on the right image. The whole frame is streamed with
// in_valid held high, so the core stalls the input whenever its line buffer is full.
//
// A whole-image software model would need gigabytes at this size, so the checks are split:
//   * rows 0..9 (the first bands, across all four segments) are compared pixel by pixel with
//     stereo_ref_pkg's model run on the top 24 rows of the image. Those rows depend only on
//     rows 0..23, so the cropped model is exact for them;
//   * every pixel of the frame must be produced exactly once;
//   * in the rest of the frame, away from the left border and the rectangle's edges, at least
//     90% of the output disparities must lie within one level of the true disparity;
//   * the frame time must match bands * segments * passes * (WSEG + 2*LMAX + PD + 3) cycles plus
//     the initial fill of the first band's rows and the optimizer and postprocessing tail;
//   * stalls, uniqueness and L-R failures, filled outliers and sub-pixel values must all occur.
module tb_stereo_core_full;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int W = 1600, H = 1200, ND = 128, PD = 16, PR = 4, WSEG = 400, LMAX = 12;
  localparam int K = ND / PD, NSEG = W / WSEG, NBAND = H / PR;
  localparam int CYC = WSEG + 2 * LMAX + PD + 3;
  localparam int SW = $clog2(ND) + SUBPIX_F;
  localparam int HREF = 24, YEXACT = 10;
  localparam int DBG = 24, DFG = 90;
  localparam int FX0 = 700, FX1 = 1100, FY0 = 300, FY1 = 900;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready, in_stall, frame_done;
  rgb_t in_left, in_right;
  logic          out_valid [PR];
  coord_t        out_x [PR], out_y [PR];
  logic [SW-1:0] out_disp [PR];
  logic          out_outlier [PR];

  stereo_core dut (
    .clk, .rst_n, .start, .in_valid, .in_ready, .in_left, .in_right,
    .out_valid, .out_x, .out_y, .out_disp, .out_outlier, .in_stall, .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_outl = 0, n_frac = 0, n_good = 0, n_judged = 0;
  byte unsigned seen [H][W];
  shortint unsigned got [H][W];
  bit gotl [H][W];
  rgb_t tex [H][W + 2 * ND];
  rgb_t imgl [H][W], imgr [H][W];
  longint cyc_count = 0;
  stereo_ref ref_m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Watchdog: the frame needs about 4.3 million cycles.
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc_count++;
    if (in_stall) n_stall++;
    for (int i = 0; i < PR; i++)
      if (out_valid[i]) begin
        seen[out_y[i]][out_x[i]]++;
        got[out_y[i]][out_x[i]]  = 16'(out_disp[i]);
        gotl[out_y[i]][out_x[i]] = out_outlier[i];
      end
  end

  function automatic int true_d(input int x, input int y);
    return (x >= FX0 && x < FX1 && y >= FY0 && y < FY1) ? DFG : DBG;
  endfunction

  initial begin
    longint t0;
    int dummy = $urandom(5);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W + 2 * ND; x++) begin
        if (x % 3 == 0 || y % 2 == 0 || x == 0) begin
          tex[y][x].r = 8'($urandom_range(0, 255));
          tex[y][x].g = 8'($urandom_range(0, 255));
          tex[y][x].b = 8'($urandom_range(0, 255));
        end else tex[y][x] = (x % 3 != 0) ? tex[y][x-1] : tex[y-1][x];
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        imgl[y][x] = tex[y][x + ND - 1];
        imgr[y][x] = tex[y][x + ND - 1 + true_d(x, y)];
        if ($urandom_range(0, 7) == 0) imgr[y][x].g = imgr[y][x].g ^ 8'h07;
      end
    // Exact model of the top rows.
    ref_m = new(W, HREF, ND, WSEG, LMAX, 20, 10, 60, 5);
    for (int y = 0; y < HREF; y++)
      for (int x = 0; x < W; x++) begin
        ref_m.L[y][x] = imgl[y][x];
        ref_m.R[y][x] = imgr[y][x];
      end
    ref_m.run();

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc_count;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid = 1;
        in_left  = imgl[y][x];
        in_right = imgr[y][x];
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
    in_valid = 0;
    while (!frame_done) @(posedge clk);
    $display("frame cycles %0d, schedule %0d", cyc_count - t0, NBAND * NSEG * K * CYC);
    check(cyc_count - t0 >= NBAND * NSEG * K * CYC &&
          cyc_count - t0 <= NBAND * NSEG * K * CYC + (LMAX + 2 + PR) * W + 2 * K * (WSEG + 2 * PR) + 4 * W,
          "frame time against the band/segment/pass schedule");

    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        check(seen[y][x] == 1, $sformatf("pixel (%0d,%0d) produced %0d times", x, y, seen[y][x]));
        if (gotl[y][x]) n_outl++;
        if (got[y][x] % 16 != 0) n_frac++;
        if (y < YEXACT) begin
          check(int'(got[y][x]) == ref_m.disp[y][x],
                $sformatf("disp (%0d,%0d) got %0d expected %0d", x, y, got[y][x], ref_m.disp[y][x]));
          check(int'(gotl[y][x]) == ref_m.outl[y][x], $sformatf("outlier flag (%0d,%0d)", x, y));
        end else if (x >= ND + 16 && x < W - 16 && y < H - 16 &&
                     !(x >= FX0 - 2 * DFG && x < FX1 + 16 && y >= FY0 - 16 && y < FY1 + 16)) begin
          automatic int e = int'(got[y][x]) - 16 * true_d(x, y);
          n_judged++;
          if (e >= -16 && e <= 16) n_good++;
        end else if (x >= FX0 + 16 && x < FX1 - 16 && y >= FY0 + 16 && y < FY1 - 16) begin
          automatic int e = int'(got[y][x]) - 16 * true_d(x, y);
          n_judged++;
          if (e >= -16 && e <= 16) n_good++;
        end
      end
    $display("accuracy: %0d of %0d judged pixels within one level", n_good, n_judged);
    check(n_good * 100 >= n_judged * 90, "at least 90% of the judged pixels correct");
    $display("mechanisms: stall=%0d uniq_fail(top rows)=%0d lr_fail(top rows)=%0d outliers=%0d fractional=%0d",
             n_stall, ref_m.n_uniq_fail, ref_m.n_lr_fail, n_outl, n_frac);
    check(n_stall > 0, "input stall seen");
    check(ref_m.n_uniq_fail > 0, "uniqueness failure seen");
    check(ref_m.n_lr_fail > 0, "L-R consistency failure seen");
    check(n_outl > 0, "outlier filled");
    check(n_frac > 0, "sub-pixel output seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
