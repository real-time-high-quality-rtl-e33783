// tb_sgm_optimizer: random aggregated costs for a whole small image are served segment by
// segment from a testbench model of the reorder buffer (one-cycle read latency, two banks).
// For every pixel the optimizer's final cost vector C_final = L_r0 + L_r1 + L_r2 + L_r3 is
// compared with the software model's path costs, which follow the same restart rules (image
// borders, r2 at segment ends). Checks the slot timing too: each segment must finish in
// (WSEG + 2*(PR-1)) * K cycles, and every pixel must appear exactly once.
module tb_sgm_optimizer;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 12, H = 6, PR = 2, PD = 2, ND = 8, WSEG = 6, K = ND / PD, G = 2 * PD;

  logic clk = 0, rst_n = 0, seg_ready = 0, seg_bank = 0, busy, rb_bank;
  logic [15:0] seg_band, seg_idx;
  logic rb_en [PR];
  logic [15:0] rb_col [PR], rb_grp [PR];
  cost_t rb_data [PR][G];
  logic px_valid [PR];
  coord_t px_x [PR], px_y [PR];
  logic [CFIN_W-1:0] px_cfin [PR][ND];

  sgm_optimizer #(.W(W), .PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG), .P1(10), .P2(60)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int bank [2][PR][WSEG][ND];
  int seen [H][W];
  stereo_ref m;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reorder buffer model.
  always @(posedge clk)
    for (int i = 0; i < PR; i++)
      if (rb_en[i])
        for (int j = 0; j < G; j++) rb_data[i][j] <= cost_t'(bank[rb_bank][i][rb_col[i]][rb_grp[i] * G + j]);

  always @(posedge clk)
    for (int i = 0; i < PR; i++)
      if (px_valid[i]) begin
        automatic int x = px_x[i], y = px_y[i];
        seen[y][x]++;
        for (int d = 0; d < ND; d++) begin
          checks++;
          if (int'(px_cfin[i][d]) != m.cfin[y][x][d]) begin
            failures++;
            if (failures < 10) $display("FAIL: (%0d,%0d) d=%0d got %0d exp %0d", x, y, d, px_cfin[i][d], m.cfin[y][x][d]);
          end
        end
      end

  initial begin
    int gs = 0;
    m = new(W, H, ND, WSEG, 2, 20, 10, 60, 5);
    m.agg = new[H];
    foreach (m.agg[y]) begin
      m.agg[y] = new[W];
      foreach (m.agg[y][x]) begin
        m.agg[y][x] = new[ND];
        foreach (m.agg[y][x][d]) m.agg[y][x][d] = (x / 3 + y + d) % 5 == 0 ? $urandom_range(0, 20) : $urandom_range(40, 255);
      end
    end
    m.run_sgm();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < H / PR; b++)
      for (int s = 0; s < W / WSEG; s++) begin
        automatic int t0;
        for (int i = 0; i < PR; i++)
          for (int c = 0; c < WSEG; c++)
            for (int d = 0; d < ND; d++) bank[gs % 2][i][c][d] = m.agg[b * PR + i][s * WSEG + c][d];
        seg_ready = 1; seg_bank = 1'(gs % 2); seg_band = 16'(b); seg_idx = 16'(s);
        @(negedge clk);
        seg_ready = 0;
        t0 = 0;
        while (busy) begin @(negedge clk); t0++; end
        checks++;
        if (t0 != (WSEG + 2 * (PR - 1)) * K) begin
          failures++; $display("FAIL: segment took %0d cycles", t0);
        end
        repeat (3) @(negedge clk);
        gs++;
      end
    foreach (seen[y, x]) begin
      checks++;
      if (seen[y][x] != 1) begin failures++; $display("FAIL: pixel (%0d,%0d) seen %0d", x, y, seen[y][x]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
