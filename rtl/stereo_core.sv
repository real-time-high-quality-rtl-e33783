// stereo_core: real-time stereo matching core (AD-Census, cross-based aggregation, four-direction
// semiglobal optimization, WTA, postprocessing) with hybrid row/disparity parallelism.
//
// A rectified RGB stereo pair enters as one left/right pixel pair per cycle in raster order
// (in_valid/in_ready, stalled while the line buffer is full). Disparities leave on PR parallel
// streams, one per row of the band being processed, each in column order, as fixed-point values
// with 4 fractional bits and a flag for pixels that were outliers and got filled.
//
// Datapath, in order:
//   stereo_ctrl      band / segment / pass sequencing and input flow control
//   line_buffer      NR rows of both images, read one column of NWIN rows per cycle
//   cost_init        census + AD initial costs for PD disparities of every window row
//   arm_gen          cross arms of the left image
//   cost_agg_unit xPD  vertical-then-horizontal aggregation, normalised, PR rows each
//   reorder_buffer   ping-pong segment buffer: multi-pass stream -> per-pixel cost vectors
//   sgm_optimizer    PR lanes, 2*PD disparities per cycle, four path directions
//   wta_select xPR   winner-takes-all, uniqueness, sub-pixel refinement
//   postproc xPR     L-R consistency, outlier filling
// Pipeline from line-buffer read to aggregated cost: 3 cycles (read register, census window,
// aggregation register).
//
// Parameter defaults are the document's main configuration: 1600x1200 pixels, 128 disparity
// levels, PD = 16, PR = 4, WSEG = 400, LMAX = 12. P1, P2, TAU and UNIQ_PCT are this design's.
// Each frame is started with start; frame_done pulses when the last disparity has been sent.
module stereo_core
  import stereo_pkg::*;
#(
  parameter int W        = 1600,
  parameter int H        = 1200,
  parameter int ND       = 128,
  parameter int PD       = 16,
  parameter int PR       = 4,
  parameter int WSEG     = 400,
  parameter int LMAX     = 12,
  parameter int TAU      = 20,
  parameter int P1       = 10,
  parameter int P2       = 60,
  parameter int UNIQ_PCT = 5,
  localparam int NWIN = PR + 2 * LMAX + 4,
  localparam int NC   = PR + 2 * LMAX,
  localparam int NR   = NWIN + PR,
  localparam int K    = ND / PD,
  localparam int NSEG = W / WSEG,
  localparam int G    = 2 * PD,
  localparam int DW   = $clog2(ND),
  localparam int SW   = DW + SUBPIX_F
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  output logic          in_ready,
  input  rgb_t          in_left,
  input  rgb_t          in_right,
  output logic          out_valid   [PR],
  output coord_t        out_x       [PR],
  output coord_t        out_y       [PR],
  output logic [SW-1:0] out_disp    [PR],
  output logic          out_outlier [PR],
  output logic          in_stall,
  output logic          frame_done
);

  // ---------------- control and line buffer ----------------
  logic        wr_en;
  coord_t      wr_x, wr_y;
  logic        rd_en;
  coord_t      rd_xl, rd_xr, rd_ytop;
  logic [15:0] rd_k, rd_seg, rd_band;
  logic        ctrl_busy;

  stereo_ctrl #(.W(W), .H(H), .PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG), .LMAX(LMAX)) u_ctrl (
    .clk, .rst_n, .start, .in_valid, .in_ready, .wr_en, .wr_x, .wr_y,
    .rd_en, .rd_xl, .rd_xr, .rd_ytop, .rd_k, .rd_seg, .rd_band, .busy(ctrl_busy),
    .stalled(in_stall));

  rgb_t lb_left [NWIN];
  rgb_t lb_right [NWIN];

  line_buffer #(.W(W), .H(H), .NR(NR), .NWIN(NWIN)) u_lb (
    .clk, .wr_en, .wr_x, .wr_y, .wr_left(in_left), .wr_right(in_right),
    .rd_en, .rd_xl, .rd_xr, .rd_ytop, .rd_left(lb_left), .rd_right(lb_right));

  // Tags travel alongside: stage 1 = line-buffer output, 2 = census window, 3 = aggregated.
  logic        v1, v2, v3;
  coord_t      rc1, yt1;
  logic [15:0] k1, k2, k3, s1, s2, s3, b1, b2, b3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      rc1 <= '0; yt1 <= '0;
      k1 <= '0; k2 <= '0; k3 <= '0; s1 <= '0; s2 <= '0; s3 <= '0; b1 <= '0; b2 <= '0; b3 <= '0;
    end else begin
      v1 <= rd_en; v2 <= v1; v3 <= v2;
      if (rd_en) begin rc1 <= rd_xl; yt1 <= rd_ytop; k1 <= rd_k; s1 <= rd_seg; b1 <= rd_band; end
      if (v1) begin k2 <= k1; s2 <= s1; b2 <= b1; end
      if (v2) begin k3 <= k2; s3 <= s2; b3 <= b2; end
    end
  end

  // ---------------- cost initialization and arms ----------------
  logic   ci_valid;
  coord_t ci_cl, ci_yc;
  cost_t  ci_cost [PD][NC];
  rgb_t   ci_lpix [NC];

  cost_init #(.W(W), .H(H), .PD(PD), .PR(PR), .LMAX(LMAX)) u_ci (
    .clk, .rst_n, .in_valid(v1), .in_rc(rc1), .in_ytop(yt1), .in_k(k1),
    .in_left(lb_left), .in_right(lb_right),
    .out_valid(ci_valid), .out_cl(ci_cl), .out_yc(ci_yc), .out_cost(ci_cost), .out_lpix(ci_lpix));

  logic [7:0] vup [PR], vdn [PR], hl [PR], hr [PR];

  arm_gen #(.W(W), .H(H), .PR(PR), .LMAX(LMAX), .TAU(TAU)) u_arm (
    .clk, .in_valid(ci_valid), .in_cl(ci_cl), .in_yc(ci_yc), .in_lpix(ci_lpix),
    .vup, .vdn, .hl, .hr);

  // ---------------- cost aggregation, one unit per disparity of the pass ----------------
  logic   ag_valid [PD];
  coord_t ag_x [PD];
  cost_t  ag_cost [PD][PR];

  for (genvar j = 0; j < PD; j++) begin : g_agg
    cost_agg_unit #(.PR(PR), .LMAX(LMAX)) u_agg (
      .clk, .rst_n, .in_valid(ci_valid), .in_cl(ci_cl), .in_cost(ci_cost[j]),
      .vup, .vdn, .hl, .hr,
      .out_valid(ag_valid[j]), .out_x(ag_x[j]), .out_agg(ag_cost[j]));
  end

  // ---------------- reorder buffer ----------------
  int          seg_x0, wcol;
  logic        rb_wr;
  logic        rb_wbank;
  cost_t       rb_wdata [PR][PD];
  assign seg_x0   = int'(s3) * WSEG;
  assign wcol     = int'(ag_x[0]) - seg_x0;
  assign rb_wr    = v3 && ag_valid[0] && (wcol >= 0) && (wcol < WSEG);
  assign rb_wbank = 1'(int'(b3) * NSEG + int'(s3));
  always_comb
    for (int i = 0; i < PR; i++)
      for (int j = 0; j < PD; j++) rb_wdata[i][j] = ag_cost[j][i];

  logic        rb_rbank;
  logic        rb_ren [PR];
  logic [15:0] rb_rcol [PR], rb_rgrp [PR];
  cost_t       rb_rdata [PR][G];

  reorder_buffer #(.PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG)) u_rb (
    .clk, .wr_en(rb_wr), .wr_bank(rb_wbank), .wr_col(16'(wcol)), .wr_k(k3), .wr_cost(rb_wdata),
    .rd_bank(rb_rbank), .rd_en(rb_ren), .rd_col(rb_rcol), .rd_grp(rb_rgrp), .rd_data(rb_rdata));

  // Segment complete after the last column of the last pass.
  logic        seg_ready, seg_bank;
  logic [15:0] seg_band, seg_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_ready <= 1'b0;
      seg_bank  <= 1'b0;
      seg_band  <= '0;
      seg_idx   <= '0;
    end else begin
      seg_ready <= rb_wr && (int'(k3) == K - 1) && (wcol == WSEG - 1);
      seg_bank  <= rb_wbank;
      seg_band  <= b3;
      seg_idx   <= s3;
    end
  end

  // ---------------- semiglobal optimization ----------------
  logic              px_valid [PR];
  coord_t            px_x [PR], px_y [PR];
  logic [CFIN_W-1:0] px_cfin [PR][ND];
  logic              sgm_busy;

  sgm_optimizer #(.W(W), .PR(PR), .PD(PD), .ND(ND), .WSEG(WSEG), .P1(P1), .P2(P2)) u_sgm (
    .clk, .rst_n, .seg_ready, .seg_bank, .seg_band, .seg_idx, .busy(sgm_busy),
    .rb_bank(rb_rbank), .rb_en(rb_ren), .rb_col(rb_rcol), .rb_grp(rb_rgrp), .rb_data(rb_rdata),
    .px_valid, .px_x, .px_y, .px_cfin);

  // ---------------- disparity selection and postprocessing, per row lane ----------------
  logic pp_busy [PR];
  for (genvar i = 0; i < PR; i++) begin : g_post
    logic [DW-1:0]     d_int;
    logic [SW-1:0]     d_sub;
    logic              uniq;
    logic [CFIN_W-1:0] cmin;

    wta_select #(.ND(ND), .UNIQ_PCT(UNIQ_PCT)) u_wta (
      .cfin(px_cfin[i]), .d_int, .d_sub, .unique_ok(uniq), .c_min(cmin));

    postproc #(.W(W), .ND(ND)) u_pp (
      .clk, .rst_n, .in_valid(px_valid[i]), .in_x(px_x[i]), .in_y(px_y[i]),
      .in_cfin(px_cfin[i]), .in_dint(d_int), .in_dsub(d_sub), .in_unique(uniq),
      .out_valid(out_valid[i]), .out_x(out_x[i]), .out_y(out_y[i]), .out_disp(out_disp[i]),
      .out_outlier(out_outlier[i]), .busy(pp_busy[i]));
  end

  // ---------------- frame completion ----------------
  int unsigned nout;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nout       <= 0;
      frame_done <= 1'b0;
    end else begin
      automatic int unsigned n = nout;
      for (int i = 0; i < PR; i++) if (out_valid[i]) n++;
      frame_done <= 1'b0;
      if (start) begin
        nout <= 0;
      end else if (n == W * H) begin
        nout       <= 0;
        frame_done <= 1'b1;
      end else begin
        nout <= n;
      end
    end
  end

endmodule
