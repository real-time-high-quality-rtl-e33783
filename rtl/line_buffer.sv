// line_buffer: row buffer for the left and right images with a wide column read port.
//
// Each image is held in NR row memories of W pixels; image row y lives in memory y % NR and the
// rows arrive progressively through the write port. A read returns one column of NWIN
// consecutive rows, starting at row rd_ytop, for the left image at column rd_xl and for the
// right image at column rd_xr: each row memory is read at the same column and a multiplexer puts
// the NWIN outputs in row order, so one whole column window comes out per cycle. Rows or
// columns outside the image read as zero. The controller keeps the rows being read from being
// overwritten (it holds off the writer), so the buffer itself does no bookkeeping.
//
// Following the document, the buffer is built from many narrow memories to get one wide output
// port, and its depth covers the aggregation window plus the rows being loaded for the next
// band. This design stores RGB only; the census vectors are computed on the fly from the window
// (see cost_init), so NWIN includes two extra rows above and below for the 5x5 census.
//
// Timing: the read data is registered, valid one cycle after rd_en.
module line_buffer
  import stereo_pkg::*;
#(
  parameter int W    = 1600,
  parameter int H    = 1200,
  parameter int NR   = 36,
  parameter int NWIN = 32
) (
  input  logic   clk,
  input  logic   wr_en,
  input  coord_t wr_x,
  input  coord_t wr_y,
  input  rgb_t   wr_left,
  input  rgb_t   wr_right,
  input  logic   rd_en,
  input  coord_t rd_xl,
  input  coord_t rd_xr,
  input  coord_t rd_ytop,
  output rgb_t   rd_left  [NWIN],
  output rgb_t   rd_right [NWIN]
);

  rgb_t mem_l [NR][W];
  rgb_t mem_r [NR][W];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_l[int'(wr_y) % NR][int'(wr_x)] <= wr_left;
      mem_r[int'(wr_y) % NR][int'(wr_x)] <= wr_right;
    end
  end

  function automatic logic in_img(input int x, input int y);
    return (x >= 0) && (x < W) && (y >= 0) && (y < H);
  endfunction

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int i = 0; i < NWIN; i++) begin
        automatic int y = int'(rd_ytop) + i;
        automatic int s = (y < 0) ? 0 : y % NR;
        rd_left[i]  <= in_img(int'(rd_xl), y) ? mem_l[s][in_img(int'(rd_xl), y) ? int'(rd_xl) : 0] : '0;
        rd_right[i] <= in_img(int'(rd_xr), y) ? mem_r[s][in_img(int'(rd_xr), y) ? int'(rd_xr) : 0] : '0;
      end
    end
  end

endmodule
