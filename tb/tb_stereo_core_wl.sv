// tb_stereo_core_wl: end-to-end test of the stereo matching core with the datapath of the main
// configuration: 128 disparity levels, PD = 16 disparities and PR = 4 rows per cycle, arms of up
// to 12 pixels. Only the image (192x48) and the segment width (48) are smaller than the 1600x1200
// frame with 400-column segments, so the same passes (K = 8), slot schedule and arm limits run.
//
// The scene is a random blocky texture with a background disparity of 20 and a foreground
// rectangle at disparity 100, so passes 1 and 6 of every segment carry the winners, plus noise.
// Every output pixel is compared with stereo_ref_pkg's model, over two frames; the frame time is
// checked against bands * segments * passes * (WSEG + 2*LMAX + PD + 3) cycles, and each mechanism
// (stall, several passes and segments, uniqueness and L-R failures, filling, sub-pixel values)
// must occur.
module tb_stereo_core_wl;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int W = 192, H = 48, ND = 128, PD = 16, PR = 4, WSEG = 48, LMAX = 12;
  localparam int TAU = 20, P1 = 10, P2 = 60, UQ = 5;
  localparam int K = ND / PD, NSEG = W / WSEG, NBAND = H / PR;
  localparam int CYC = WSEG + 2 * LMAX + PD + 3;
  localparam int SW = $clog2(ND) + SUBPIX_F;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready, in_stall, frame_done;
  rgb_t in_left, in_right;
  logic          out_valid [PR];
  coord_t        out_x [PR], out_y [PR];
  logic [SW-1:0] out_disp [PR];
  logic          out_outlier [PR];

  stereo_core #(.W(W), .H(H), .ND(ND), .PD(PD), .PR(PR), .WSEG(WSEG), .LMAX(LMAX),
                .TAU(TAU), .P1(P1), .P2(P2), .UNIQ_PCT(UQ)) dut (
    .clk, .rst_n, .start, .in_valid, .in_ready, .in_left, .in_right,
    .out_valid, .out_x, .out_y, .out_disp, .out_outlier, .in_stall, .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_outl = 0, n_frac = 0;
  int seen [H][W];
  int got  [H][W];
  int gotl [H][W];
  longint cyc_count = 0;

  stereo_ref ref_m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (in_stall) n_stall++;
    for (int i = 0; i < PR; i++) begin
      if (out_valid[i]) begin
        seen[out_y[i]][out_x[i]]++;
        got[out_y[i]][out_x[i]]  = int'(out_disp[i]);
        gotl[out_y[i]][out_x[i]] = int'(out_outlier[i]);
      end
    end
  end

  task automatic make_images(input int seed);
    int dummy = $urandom(seed);
    rgb_t tex [H][W + 2 * ND];
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
        int d = (x >= 110 && x < 170 && y >= 10 && y < 38) ? 100 : 20;
        ref_m.L[y][x] = tex[y][x + ND - 1];
        ref_m.R[y][x] = tex[y][x + ND - 1 + d];
        if ($urandom_range(0, 7) == 0) ref_m.R[y][x].g = ref_m.R[y][x].g ^ 8'h07;
      end
  endtask

  task automatic run_frame();
    longint t0;
    int expect_cyc;
    foreach (seen[y, x]) seen[y][x] = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc_count;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid = 1;
        in_left  = ref_m.L[y][x];
        in_right = ref_m.R[y][x];
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
    in_valid = 0;
    while (!frame_done) @(posedge clk);
    expect_cyc = NBAND * NSEG * K * CYC;
    $display("frame cycles %0d, schedule %0d", cyc_count - t0, expect_cyc);
    check(cyc_count - t0 >= expect_cyc && cyc_count - t0 <= expect_cyc + (LMAX + 2 + PR) * W + 2 * K * (WSEG + 2 * PR) + 4 * W,
          "frame time against the band/segment/pass schedule");
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        check(seen[y][x] == 1, $sformatf("pixel (%0d,%0d) produced %0d times", x, y, seen[y][x]));
        check(got[y][x] == ref_m.disp[y][x],
              $sformatf("disp (%0d,%0d) got %0d expected %0d", x, y, got[y][x], ref_m.disp[y][x]));
        check(gotl[y][x] == ref_m.outl[y][x], $sformatf("outlier flag (%0d,%0d)", x, y));
        if (gotl[y][x]) n_outl++;
        if (got[y][x] % 16 != 0) n_frac++;
      end
  endtask

  always @(posedge clk) cyc_count++;

  initial begin
    ref_m = new(W, H, ND, WSEG, LMAX, TAU, P1, P2, UQ);
    make_images(7);
    ref_m.run();
    $display("reference: %0d uniqueness failures, %0d L-R failures", ref_m.n_uniq_fail, ref_m.n_lr_fail);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame();
    make_images(11);
    ref_m.run();
    run_frame();
    $display("mechanisms: stall=%0d passes/segment=%0d segments/row=%0d uniq_fail=%0d lr_fail=%0d outliers=%0d fractional=%0d",
             n_stall, K, NSEG, ref_m.n_uniq_fail, ref_m.n_lr_fail, n_outl, n_frac);
    check(n_stall > 0, "input stall seen");
    check(K > 1, "several passes per segment");
    check(NSEG > 1, "several segments per row");
    check(ref_m.n_uniq_fail > 0, "uniqueness failure seen");
    check(ref_m.n_lr_fail > 0, "L-R consistency failure seen");
    check(n_outl > 0, "outlier filled");
    check(n_frac > 0, "sub-pixel output seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
