// tb_postproc: streams rows of final cost vectors (built around a piecewise disparity map
// with noise, so some pixels pass and some fail the checks) into postproc together with the WTA
// results, one pixel every few cycles and rows back to back, and compares every output
// disparity and outlier flag with the software model: diagonal right-view disparity, L-R
// consistency within 1, uniqueness, and filling with the smaller nearest reliable neighbour.
// Also checks that each row is scanned out within 2*W + 2 cycles of its last pixel.
module tb_postproc;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 20, H = 6, ND = 8, DW = $clog2(ND), SW = DW + SUBPIX_F, GAP = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  coord_t in_x, in_y;
  logic [CFIN_W-1:0] in_cfin [ND];
  logic [DW-1:0] in_dint;
  logic [SW-1:0] in_dsub;
  logic in_unique;
  logic out_valid, out_outlier, busy;
  coord_t out_x, out_y;
  logic [SW-1:0] out_disp;

  postproc #(.W(W), .ND(ND)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_out = 0, n_outl = 0;
  int last_in_cyc [H], last_out_cyc [H];
  int cycn = 0;
  stereo_ref m;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycn++;
    if (out_valid) begin
      automatic int x = out_x, y = out_y;
      n_out++;
      last_out_cyc[y] = cycn;
      checks++;
      if (int'(out_disp) != m.disp[y][x] || int'(out_outlier) != m.outl[y][x]) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d) got %0d/%0d exp %0d/%0d", x, y, out_disp, out_outlier,
                                    m.disp[y][x], m.outl[y][x]);
      end
      if (out_outlier) n_outl++;
    end
  end

  initial begin
    m = new(W, H, ND, W, 1, 20, 10, 60, 5);
    m.cfin = new[H];
    foreach (m.cfin[y]) begin
      m.cfin[y] = new[W];
      foreach (m.cfin[y][x]) begin
        automatic int td = (x >= 6 && x < 13) ? 5 : 1;
        m.cfin[y][x] = new[ND];
        foreach (m.cfin[y][x][d]) m.cfin[y][x][d] = (d > td ? d - td : td - d) * 40 + $urandom_range(0, 70);
      end
    end
    m.run_post();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int s[3];
        m.wta(m.cfin[y][x], s);
        in_valid = 1; in_x = coord_t'(x); in_y = coord_t'(y);
        for (int d = 0; d < ND; d++) in_cfin[d] = CFIN_W'(m.cfin[y][x][d]);
        in_dint = DW'(s[0]); in_dsub = SW'(s[1]); in_unique = s[2][0];
        @(negedge clk);
        in_valid = 0;
        last_in_cyc[y] = cycn;
        repeat (GAP - 1) @(negedge clk);
      end
    repeat (3 * W) @(negedge clk);
    checks++;
    if (n_out != W * H || n_outl == 0) begin failures++; $display("FAIL: %0d outputs, %0d outliers", n_out, n_outl); end
    for (int y = 0; y < H; y++) begin
      checks++;
      if (last_out_cyc[y] - last_in_cyc[y] > 2 * W + 2) begin failures++; $display("FAIL: row %0d late", y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
