// tb_stereo_ctrl: runs the controller over a frame with the input always offering pixels and
// checks, against an independent list of (band, segment, pass, column) reads: every read
// address (left column, right column = left - k*PD, window top row), the total read count
// bands * segments * passes * (WSEG + 2*LMAX + PD + 3), that every row a read touches was
// completely written before, that a write never lands in a line-buffer row a pending read still
// needs, that the writes run in raster order, and that the input is stalled at least once.
module tb_stereo_ctrl;
  import stereo_pkg::*;
  localparam int W = 8, H = 16, PR = 2, PD = 2, ND = 4, WSEG = 4, LMAX = 1;
  localparam int K = ND / PD, NSEG = W / WSEG, NBAND = H / PR, CYC = WSEG + 2 * LMAX + PD + 3;
  localparam int NWIN = PR + 2 * LMAX + 4, NR = NWIN + PR;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic in_ready, wr_en, rd_en, busy, stalled;
  coord_t wr_x, wr_y, rd_xl, rd_xr, rd_ytop;
  logic [15:0] rd_k, rd_seg, rd_band;

  stereo_ctrl #(.W(W), .H(H), .PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0, n_stall = 0;
  int rows_done = 0, cur_band = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stalled) n_stall++;
    if (wr_en) begin
      chk(int'(wr_x) == n_wr % W && int'(wr_y) == n_wr / W, "raster write order");
      // rows still needed by the band being read (or waited for) start at cur_band*PR-LMAX-2
      chk(int'(wr_y) < cur_band * PR - LMAX - 2 + NR, "write into a row still in use");
      n_wr++;
      if (int'(wr_x) == W - 1) rows_done++;
    end
    if (rd_en) begin
      automatic int t = n_rd % CYC;
      automatic int k = (n_rd / CYC) % K;
      automatic int s = (n_rd / (CYC * K)) % NSEG;
      automatic int b = n_rd / (CYC * K * NSEG);
      automatic int xl = s * WSEG - LMAX - PD - 1 + t;
      automatic int last_row = b * PR + PR + LMAX + 1;
      if (last_row > H - 1) last_row = H - 1;
      chk(int'(rd_xl) == xl && int'(rd_xr) == xl - k * PD && int'(rd_ytop) == b * PR - LMAX - 2 &&
          int'(rd_k) == k && int'(rd_seg) == s && int'(rd_band) == b,
          $sformatf("read %0d address", n_rd));
      chk(rows_done > last_row, "read before its rows were written");
      cur_band = b;
      if (t == CYC - 1 && k == K - 1 && s == NSEG - 1) cur_band = b + 1;
      n_rd++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    in_valid = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    chk(n_rd == NBAND * NSEG * K * CYC, $sformatf("read count %0d", n_rd));
    chk(n_wr == W * H, "all pixels written");
    chk(n_stall > 0, "input stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
