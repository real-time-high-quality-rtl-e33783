// tb_reorder_buffer: fills both banks pass by pass (PD disparities per write, as the
// aggregation does) with random costs, then reads every pixel's vector back in groups of 2*PD
// with independent column and group per row port, and compares with the testbench's copy. It
// also checks that writing one bank leaves the other bank untouched (ping-pong).
module tb_reorder_buffer;
  import stereo_pkg::*;
  localparam int PR = 2, PD = 2, ND = 8, WSEG = 5, G = 2 * PD, K = ND / PD;

  logic clk = 0, wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [15:0] wr_col, wr_k;
  cost_t wr_cost [PR][PD];
  logic rd_en [PR];
  logic [15:0] rd_col [PR], rd_grp [PR];
  cost_t rd_data [PR][G];

  reorder_buffer #(.PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int ref_m [2][PR][WSEG][ND];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input int b);
    for (int k = 0; k < K; k++)
      for (int c = 0; c < WSEG; c++) begin
        wr_en = 1; wr_bank = 1'(b); wr_col = 16'(c); wr_k = 16'(k);
        for (int i = 0; i < PR; i++)
          for (int j = 0; j < PD; j++) begin
            ref_m[b][i][c][k * PD + j] = $urandom_range(0, 255);
            wr_cost[i][j] = cost_t'(ref_m[b][i][c][k * PD + j]);
          end
        @(negedge clk);
      end
    wr_en = 0;
  endtask

  task automatic readback(input int b);
    for (int n = 0; n < 40; n++) begin
      automatic int cc [PR], gg [PR];
      rd_bank = 1'(b);
      for (int i = 0; i < PR; i++) begin
        cc[i] = $urandom_range(0, WSEG - 1); gg[i] = $urandom_range(0, K / 2 - 1);
        rd_en[i] = 1; rd_col[i] = 16'(cc[i]); rd_grp[i] = 16'(gg[i]);
      end
      @(negedge clk);
      for (int i = 0; i < PR; i++) begin
        rd_en[i] = 0;
        for (int j = 0; j < G; j++) begin
          checks++;
          if (int'(rd_data[i][j]) != ref_m[b][i][cc[i]][gg[i] * G + j]) begin
            failures++;
            if (failures < 10) $display("FAIL: bank %0d row %0d col %0d d %0d", b, i, cc[i], gg[i] * G + j);
          end
        end
      end
    end
  endtask

  initial begin
    foreach (rd_en[i]) rd_en[i] = 0;
    @(negedge clk);
    fill(0);
    fill(1);
    readback(0);
    readback(1);
    fill(0);
    readback(1);
    readback(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
