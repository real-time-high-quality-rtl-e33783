// reorder_buffer: ping-pong buffer that turns the multi-pass aggregated-cost stream of one image
// segment into per-pixel cost vectors for the semiglobal optimizer.
//
// Aggregation visits a segment of WSEG columns K = ND/PD times, producing PD disparities of PR
// rows per cycle in each pass. Semiglobal optimization needs all ND disparities of a pixel
// together. The buffer holds PR x WSEG x ND 8-bit costs per bank; one bank is written by the
// aggregation while the other is read by the optimizer, and the two swap every segment. Its size,
// PR * WSEG * ND * 8 * 2 bits, depends on the segment width and not on the image width, which is
// the point of the segmented dataflow.
//
// Write port: PD costs of each of the PR rows for (wr_bank, wr_col, pass wr_k), i.e. disparities
// wr_k*PD .. wr_k*PD+PD-1. Read ports: one per row, each returning 2*PD costs (the optimizer's
// disparity parallelism) of group rd_grp at column rd_col of bank rd_bank, registered (one cycle).
module reorder_buffer
  import stereo_pkg::*;
#(
  parameter int PR   = 4,
  parameter int PD   = 16,
  parameter int ND   = 128,
  parameter int WSEG = 400,
  localparam int G   = 2 * PD
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic        wr_bank,
  input  logic [15:0] wr_col,
  input  logic [15:0] wr_k,
  input  cost_t       wr_cost [PR][PD],
  input  logic        rd_bank,
  input  logic        rd_en  [PR],
  input  logic [15:0] rd_col [PR],
  input  logic [15:0] rd_grp [PR],
  output cost_t       rd_data [PR][G]
);

  cost_t mem [2][PR][WSEG][ND];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < PR; i++)
        for (int j = 0; j < PD; j++)
          mem[wr_bank][i][int'(wr_col)][int'(wr_k) * PD + j] <= wr_cost[i][j];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < PR; i++) begin
      if (rd_en[i]) begin
        for (int j = 0; j < G; j++)
          rd_data[i][j] <= mem[rd_bank][i][int'(rd_col[i])][int'(rd_grp[i]) * G + j];
      end
    end
  end

endmodule
