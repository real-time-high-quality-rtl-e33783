// tb_cost_agg_unit: feeds random cost columns with random vertical arms (per column) and
// random horizontal arms (per centre column) into one aggregation unit and checks each
// normalised aggregated cost against a direct sum over the support region built from the
// vertical arms of the pixels on the horizontal arm, divided by its pixel count. Also checks
// the output tag (column in_cl - LMAX) and the one-cycle latency.
module tb_cost_agg_unit;
  import stereo_pkg::*;
  localparam int PR = 3, LMAX = 4, NC = PR + 2 * LMAX, NCOL = 60;

  logic clk = 0, rst_n = 0, in_valid = 0;
  coord_t in_cl;
  cost_t in_cost [NC];
  logic [7:0] vup [PR], vdn [PR], hl [PR], hr [PR];
  logic out_valid;
  coord_t out_x;
  cost_t out_agg [PR];

  cost_agg_unit #(.PR(PR), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cst [NCOL][NC];
  int au [NCOL][PR], ad [NCOL][PR], al [NCOL][PR], ar [NCOL][PR];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cst[c, r]) cst[c][r] = $urandom_range(0, 255);
    foreach (au[c, i]) begin
      au[c][i] = $urandom_range(0, LMAX); ad[c][i] = $urandom_range(0, LMAX);
      al[c][i] = $urandom_range(0, LMAX); ar[c][i] = $urandom_range(0, LMAX);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCOL; c++) begin
      in_valid = 1; in_cl = coord_t'(c + 100);
      for (int r = 0; r < NC; r++) in_cost[r] = cost_t'(cst[c][r]);
      for (int i = 0; i < PR; i++) begin
        vup[i] = 8'(au[c][i]); vdn[i] = 8'(ad[c][i]);
        // horizontal arms belong to centre column c - LMAX
        hl[i] = (c >= LMAX) ? 8'(al[c - LMAX][i]) : 8'd0;
        hr[i] = (c >= LMAX) ? 8'(ar[c - LMAX][i]) : 8'd0;
      end
      @(negedge clk);
      in_valid = 0;
      if (c >= 2 * LMAX) begin
        automatic int x = c - LMAX;
        checks++;
        if (!out_valid || int'(out_x) != x + 100) begin failures++; $display("FAIL: tag"); end
        for (int i = 0; i < PR; i++) begin
          automatic int s = 0, n = 0;
          for (int q = x - al[x][i]; q <= x + ar[x][i]; q++) begin
            for (int r = LMAX + i - au[q][i]; r <= LMAX + i + ad[q][i]; r++) s += cst[q][r];
            n += au[q][i] + ad[q][i] + 1;
          end
          checks++;
          if (int'(out_agg[i]) != s / n) begin
            failures++;
            if (failures < 10) $display("FAIL: x=%0d row %0d got %0d exp %0d", x, i, out_agg[i], s / n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
