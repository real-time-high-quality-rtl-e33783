// tb_sgm_path_unit: random previous path-cost vectors, minima and current costs, for every
// group and both restart settings, checked against equation (8) with 8-bit saturation worked
// out in the testbench. Includes vectors with large costs so that saturation happens.
module tb_sgm_path_unit;
  import stereo_pkg::*;
  localparam int ND = 12, G = 4, P1 = 10, P2 = 60;

  cost_t c [G];
  logic [15:0] grp;
  cost_t prev [ND];
  cost_t prev_min;
  logic restart;
  cost_t l [G];

  sgm_path_unit #(.ND(ND), .G(G), .P1(P1), .P2(P2)) dut (.*);

  int checks = 0, failures = 0, nsat = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic int pm = 1000;
      automatic int hi = (n % 4 == 0) ? 255 : 120;
      for (int d = 0; d < ND; d++) begin
        prev[d] = cost_t'($urandom_range(0, hi));
        if (prev[d] < pm) pm = prev[d];
      end
      prev_min = cost_t'(pm);
      restart = (n % 7 == 0);
      for (int g = 0; g < ND / G; g++) begin
        grp = 16'(g);
        for (int j = 0; j < G; j++) c[j] = cost_t'($urandom_range(0, (n % 4 == 0) ? 255 : 100));
        #1;
        for (int j = 0; j < G; j++) begin
          automatic int d = g * G + j, e, b;
          b = pm + P2;
          if (prev[d] < b) b = prev[d];
          if (d > 0 && prev[d-1] + P1 < b) b = prev[d-1] + P1;
          if (d < ND - 1 && prev[d+1] + P1 < b) b = prev[d+1] + P1;
          e = restart ? int'(c[j]) : int'(c[j]) + b - pm;
          if (e > 255) begin e = 255; nsat++; end
          checks++;
          if (int'(l[j]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL: n=%0d d=%0d got %0d exp %0d", n, d, l[j], e);
          end
        end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
