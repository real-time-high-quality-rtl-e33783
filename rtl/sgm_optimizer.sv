// sgm_optimizer: semiglobal optimization with row-level and disparity-level parallelism.
//
// When the aggregation has finished all K passes of a segment (seg_ready), the optimizer works
// through the segment held in the reorder buffer bank seg_bank. It has PR lanes (sgm_lane), one
// per row of the band, and runs in slots of K cycles. Lane i handles column c = slot - 2*i of
// the segment, so each row runs two pixels behind the row above: by then the pixel above-right
// (needed by direction r2) is finished. A segment takes WSEG + 2*(PR-1) slots, which fits in the
// K*(WSEG + PD + 2*LMAX + 4) cycles the aggregation spends on the next segment.
//
// Upper-row path costs (directions r0, r1, r2) are kept in one memory per lane, written by the
// lane of the row above. Lane 0 takes its upper row from lane PR-1 of the previous band, which
// finished long ago, so its memory spans the image width W; the other lanes only need the
// current segment, WSEG columns. A path restarts (L = C) where its previous pixel is outside the
// image; in addition r2 restarts at the last column of each segment, whose upper-right
// neighbour belongs to the next segment and is not yet computed for rows below the first.
//
// Follows the document: four directions (right-bottom, bottom, left-bottom, right), PR rows in
// parallel, upper-row results buffered and delayed by different amounts per direction. This
// design's own choices: the two-column stagger, the memory organisation and the r2 restart at
// segment ends, which the document does not discuss.
//
// Interface: seg_ready is a pulse with seg_bank/seg_band/seg_idx; it must not arrive while busy.
// Reorder-buffer reads are issued at cyc 0..K/2-1 of a lane's slot. px_valid[i] pulses with the
// final cost vector px_cfin[i] of pixel (px_x[i], px_y[i]) at cyc K/2+1 of its slot.
module sgm_optimizer
  import stereo_pkg::*;
#(
  parameter int W    = 1600,
  parameter int PR   = 4,
  parameter int PD   = 16,
  parameter int ND   = 128,
  parameter int WSEG = 400,
  parameter int P1   = 10,
  parameter int P2   = 60,
  localparam int G   = 2 * PD,
  localparam int K   = ND / PD,
  localparam int NSLOT = WSEG + 2 * (PR - 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seg_ready,
  input  logic        seg_bank,
  input  logic [15:0] seg_band,
  input  logic [15:0] seg_idx,
  output logic        busy,
  output logic        rb_bank,
  output logic        rb_en  [PR],
  output logic [15:0] rb_col [PR],
  output logic [15:0] rb_grp [PR],
  input  cost_t       rb_data [PR][G],
  output logic        px_valid [PR],
  output coord_t      px_x [PR],
  output coord_t      px_y [PR],
  output logic [CFIN_W-1:0] px_cfin [PR][ND]
);

  logic [15:0] slot, cyc, band, sidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      slot    <= '0;
      cyc     <= '0;
      band    <= '0;
      sidx    <= '0;
      rb_bank <= 1'b0;
    end else if (!busy) begin
      if (seg_ready) begin
        busy    <= 1'b1;
        slot    <= '0;
        cyc     <= '0;
        band    <= seg_band;
        sidx    <= seg_idx;
        rb_bank <= seg_bank;
      end
    end else begin
      if (cyc == 16'(K - 1)) begin
        cyc <= '0;
        if (slot == 16'(NSLOT - 1)) busy <= 1'b0;
        slot <= slot + 16'd1;
      end else begin
        cyc <= cyc + 16'd1;
      end
    end
  end

  // Per-lane position in the segment.
  logic        act   [PR];
  logic signed [31:0] col [PR];
  logic signed [31:0] xg  [PR];
  logic signed [31:0] yg  [PR];
  logic        rs    [PR][4];
  logic        res_v [PR];
  cost_t       lr    [PR][3][ND];
  cost_t       lmin  [PR][3];

  always_comb begin
    for (int i = 0; i < PR; i++) begin
      col[i] = int'(slot) - 2 * i;
      act[i] = busy && (col[i] >= 0) && (col[i] < WSEG);
      xg[i]  = int'(sidx) * WSEG + col[i];
      yg[i]  = int'(band) * PR + i;
      rs[i][0] = (xg[i] == 0) || (yg[i] == 0);
      rs[i][1] = (yg[i] == 0);
      rs[i][2] = (yg[i] == 0) || (col[i] == WSEG - 1) || (xg[i] == W - 1);
      rs[i][3] = (xg[i] == 0);
      rb_en[i]  = act[i] && (cyc < 16'(K / 2));
      rb_col[i] = 16'(col[i]);
      rb_grp[i] = cyc;
    end
  end

  for (genvar i = 0; i < PR; i++) begin : g_lane
    localparam int SRC   = (i + PR - 1) % PR;       // lane of the row above
    localparam int DEPTH = (i == 0) ? W : WSEG;
    cost_t mem0 [DEPTH][ND];
    cost_t mem1 [DEPTH][ND];
    cost_t mem2 [DEPTH][ND];
    cost_t min0 [DEPTH];
    cost_t min1 [DEPTH];
    cost_t min2 [DEPTH];
    cost_t q0 [ND], q1 [ND], q2 [ND];
    cost_t qm0, qm1, qm2;
    logic signed [31:0] rd_a, rd_b, wr_a;

    // Read column x (or the segment column) and the one to its right.
    assign rd_a = (i == 0) ? xg[i] : col[i];
    assign rd_b = (rd_a + 1 < DEPTH) ? rd_a + 1 : rd_a;
    // The lane above writes at its own column.
    assign wr_a = (i == 0) ? xg[SRC] : col[SRC];

    always_ff @(posedge clk) begin
      if (act[i] && cyc == 16'd0) begin
        q0  <= mem0[rd_a];
        q1  <= mem1[rd_a];
        q2  <= mem2[rd_b];
        qm0 <= min0[rd_a];
        qm1 <= min1[rd_a];
        qm2 <= min2[rd_b];
      end
      if (res_v[SRC]) begin
        mem0[wr_a] <= lr[SRC][0];
        mem1[wr_a] <= lr[SRC][1];
        mem2[wr_a] <= lr[SRC][2];
        min0[wr_a] <= lmin[SRC][0];
        min1[wr_a] <= lmin[SRC][1];
        min2[wr_a] <= lmin[SRC][2];
      end
    end

    sgm_lane #(.ND(ND), .PD(PD), .P1(P1), .P2(P2)) u_lane (
      .clk,
      .act(act[i]), .cyc(cyc), .rs(rs[i]), .c_grp(rb_data[i]),
      .up_r0(q0), .up_r0_min(qm0), .up_r1(q1), .up_r1_min(qm1), .up_r2(q2), .up_r2_min(qm2),
      .res_valid(res_v[i]), .l_r(lr[i]), .l_min(lmin[i]), .cfin(px_cfin[i]));

    assign px_valid[i] = res_v[i];
    assign px_x[i]     = coord_t'(xg[i]);
    assign px_y[i]     = coord_t'(yg[i]);
  end

  // A new segment may only arrive once the previous one is finished.
  assert property (@(posedge clk) disable iff (!rst_n) !(seg_ready && busy))
    else $error("sgm_optimizer: segment ready while busy");

endmodule
