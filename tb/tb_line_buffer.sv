// tb_line_buffer: writes a random image row by row into a small line buffer and, after each row,
// reads every column window whose rows are still held (the last NR rows), including windows that
// reach above the image or past its sides. Expected data come from the testbench's own copy of
// the images: in-image pixels as written, everything outside the image zero. Read latency is one
// cycle.
module tb_line_buffer;
  import stereo_pkg::*;
  localparam int W = 8, H = 6, NR = 4, NWIN = 3;

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  coord_t wr_x, wr_y, rd_xl, rd_xr, rd_ytop;
  rgb_t wr_left, wr_right;
  rgb_t rd_left [NWIN], rd_right [NWIN];

  line_buffer #(.W(W), .H(H), .NR(NR), .NWIN(NWIN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  rgb_t imgl [H][W], imgr [H][W];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t expv(input int which, input int x, input int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return '0;
    return which ? imgr[y][x] : imgl[y][x];
  endfunction

  initial begin
    foreach (imgl[y, x]) begin
      imgl[y][x] = rgb_t'($urandom);
      imgr[y][x] = rgb_t'($urandom);
    end
    @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        wr_en = 1; wr_x = coord_t'(x); wr_y = coord_t'(y);
        wr_left = imgl[y][x]; wr_right = imgr[y][x];
        @(negedge clk);
      end
      wr_en = 0;
      // Windows whose in-image rows are all among the last NR written.
      for (int yt = y - NR + 1; yt <= y - NWIN + 1 + 1; yt++) begin
        for (int x = -1; x <= W; x++) begin
          automatic int xr = x - 2;
          rd_en = 1; rd_xl = coord_t'(x); rd_xr = coord_t'(xr); rd_ytop = coord_t'(yt);
          @(negedge clk);
          rd_en = 0;
          for (int i = 0; i < NWIN; i++) begin
            automatic int yy = yt + i;
            if (yy > y) continue;                 // not written yet
            checks++;
            if (rd_left[i] !== expv(0, x, yy) || rd_right[i] !== expv(1, xr, yy)) begin
              failures++;
              if (failures < 10) $display("FAIL: x=%0d ytop=%0d row %0d", x, yt, i);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
