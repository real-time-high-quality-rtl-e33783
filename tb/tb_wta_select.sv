// tb_wta_select: random final-cost vectors (some with planted sharp or flat minima and ties)
// checked against the software model's WTA: best disparity (smallest on a tie), runner-up
// outside the neighbours, uniqueness decision and sub-pixel parabola fit.
module tb_wta_select;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int ND = 16, DW = $clog2(ND);

  logic [CFIN_W-1:0] cfin [ND];
  logic [DW-1:0] d_int;
  logic [DW+SUBPIX_F-1:0] d_sub;
  logic unique_ok;
  logic [CFIN_W-1:0] c_min;

  wta_select #(.ND(ND), .UNIQ_PCT(5)) dut (.*);

  int checks = 0, failures = 0, n_nonuniq = 0, n_frac = 0;
  stereo_ref m;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(4, 4, ND, 4, 1, 20, 10, 60, 5);
    for (int n = 0; n < 2000; n++) begin
      automatic int v[] = new[ND];
      automatic int s[3];
      for (int d = 0; d < ND; d++) v[d] = $urandom_range(200, 1000);
      case (n % 4)
        0: v[$urandom_range(0, ND - 1)] = $urandom_range(50, 150);     // clear winner
        1: begin automatic int a = $urandom_range(0, ND - 1); v[a] = 100; v[(a + 5) % ND] = 102; end
        2: begin v[3] = 90; v[9] = 90; end                                // tie
        default: ;
      endcase
      for (int d = 0; d < ND; d++) cfin[d] = CFIN_W'(v[d]);
      #1;
      m.wta(v, s);
      checks++;
      if (int'(d_int) != s[0] || int'(d_sub) != s[1] || int'(unique_ok) != s[2] || int'(c_min) != v[s[0]]) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d got %0d/%0d/%0d exp %0d/%0d/%0d", n, d_int, d_sub, unique_ok, s[0], s[1], s[2]);
      end
      if (!s[2]) n_nonuniq++;
      if (s[1] % 16 != 0) n_frac++;
    end
    checks++;
    if (n_nonuniq == 0 || n_frac == 0) begin failures++; $display("FAIL: cases not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
