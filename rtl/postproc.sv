// postproc: outlier detection and handling for one image row at a time.
//
// Pixels of a row arrive in column order, each with its final cost vector and the WTA results.
// Outlier detection:
//   * uniqueness: from wta_select;
//   * left-right consistency: the right-view disparity D_R(xr) is the d minimising
//     C_final(xr + d, d), taken along the diagonal of the left cost volume. A window of ND
//     (cost, d) pairs tracks the running minimum for right pixels x-ND+1 .. x and retires one
//     entry per pixel; the row end retires the rest. A left pixel with disparity D_L(x) is
//     consistent when |D_L(x) - D_R(x - D_L(x))| <= LR_TOL.
// Outlier handling: an outlier takes the smaller of the nearest reliable disparities to its left
// and to its right (0 when the row has none).
// Because the right neighbour can be anywhere in the row, the row is stored (ping-pong, one
// bank filling while the other is worked off) and handled in two scans after the row is
// complete: right to left to record the nearest reliable pixel to the right, then left to right
// to emit the result with the nearest reliable pixel to the left. Output is one pixel per cycle,
// 2*W + 1 cycles after the row's last pixel at most.
//
// Follows the document: L-R consistency and uniqueness checks mark outliers; the smaller of the
// nearest reliable left and right values replaces them; sub-pixel values (from wta_select) are
// what is propagated. The diagonal D_R scheme, LR_TOL = 1 and the row scans are this design's.
//
// Interface: in_valid with in_x/in_y/in_cfin and the WTA results (rows in column order, each
// row complete before the next starts). out_valid/out_x/out_y/out_disp/out_outlier stream the
// row. A row must not complete while the previous one is still being scanned out.
module postproc
  import stereo_pkg::*;
#(
  parameter int W      = 1600,
  parameter int ND     = 128,
  parameter int LR_TOL = 1,
  localparam int DW    = $clog2(ND),
  localparam int SW    = DW + SUBPIX_F
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  coord_t            in_x,
  input  coord_t            in_y,
  input  logic [CFIN_W-1:0] in_cfin [ND],
  input  logic [DW-1:0]     in_dint,
  input  logic [SW-1:0]     in_dsub,
  input  logic              in_unique,
  output logic              out_valid,
  output coord_t            out_x,
  output coord_t            out_y,
  output logic [SW-1:0]     out_disp,
  output logic              out_outlier,
  output logic              busy
);

  typedef struct packed {
    logic [CFIN_W:0] c;
    logic [DW-1:0]   d;
  } cand_t;

  localparam cand_t EMPTY = '{c: {1'b1, {CFIN_W{1'b0}}}, d: '0};

  cand_t         win [ND];
  logic [DW-1:0] dl  [2][W];
  logic [SW-1:0] ds  [2][W];
  logic          uq  [2][W];
  logic [DW-1:0] dr  [2][W];
  coord_t        rowy [2];
  logic          wbank;

  // Diagonal window after this pixel: shift by one, then offer C(x, d) to right pixel x - d.
  cand_t nw [ND];
  always_comb begin
    for (int k = 0; k < ND; k++) nw[k] = (k == 0 || in_x == 0) ? EMPTY : win[k-1];
    for (int d = 0; d < ND; d++) begin
      if (int'(in_x) - d >= 0 && {1'b0, in_cfin[d]} < nw[d].c) nw[d] = '{c: {1'b0, in_cfin[d]}, d: DW'(d)};
    end
  end

  // Scan state.
  typedef enum logic [1:0] {IDLE, SCAN_R, SCAN_L} phase_t;
  phase_t        phase;
  logic          fb;
  int            sx;
  logic          vld  [W];
  logic [SW-1:0] nrv  [W];
  logic          nrok [W];
  logic [SW-1:0] run_v;
  logic          run_ok;

  logic row_done;
  assign row_done = in_valid && (int'(in_x) == W - 1);
  assign busy = (phase != IDLE);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      win <= nw;
      dl[wbank][int'(in_x)] <= in_dint;
      ds[wbank][int'(in_x)] <= in_dsub;
      uq[wbank][int'(in_x)] <= in_unique;
      if (int'(in_x) >= ND) dr[wbank][int'(in_x) - ND] <= win[ND-1].d;
      if (row_done) begin
        for (int k = 0; k < ND; k++) if (W - 1 - k >= 0) dr[wbank][W - 1 - k] <= nw[k].d;
        rowy[wbank] <= in_y;
      end
    end
  end

  // Consistency of pixel sx in the bank being scanned.
  logic cons;
  always_comb begin
    automatic int xr = sx - int'(dl[fb][sx]);
    automatic int dd;
    cons = 1'b0;
    if (xr >= 0) begin
      dd = int'(dl[fb][sx]) - int'(dr[fb][xr]);
      cons = (dd <= LR_TOL) && (dd >= -LR_TOL);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= IDLE;
      wbank       <= 1'b0;
      fb          <= 1'b0;
      sx          <= 0;
      run_v       <= '0;
      run_ok      <= 1'b0;
      out_valid   <= 1'b0;
      out_x       <= '0;
      out_y       <= '0;
      out_disp    <= '0;
      out_outlier <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (row_done) wbank <= ~wbank;
      case (phase)
        IDLE: begin
          if (row_done) begin
            phase  <= SCAN_R;
            fb     <= wbank;
            sx     <= W - 1;
            run_ok <= 1'b0;
          end
        end
        SCAN_R: begin
          vld[sx]  <= uq[fb][sx] && cons;
          nrv[sx]  <= run_v;
          nrok[sx] <= run_ok;
          if (uq[fb][sx] && cons) begin
            run_v  <= ds[fb][sx];
            run_ok <= 1'b1;
          end
          if (sx == 0) begin
            phase  <= SCAN_L;
            run_ok <= 1'b0;
          end else begin
            sx <= sx - 1;
          end
        end
        SCAN_L: begin
          out_valid <= 1'b1;
          out_x     <= coord_t'(sx);
          out_y     <= rowy[fb];
          if (vld[sx]) begin
            out_disp    <= ds[fb][sx];
            out_outlier <= 1'b0;
            run_v       <= ds[fb][sx];
            run_ok      <= 1'b1;
          end else begin
            out_outlier <= 1'b1;
            if (run_ok && nrok[sx]) out_disp <= (run_v < nrv[sx]) ? run_v : nrv[sx];
            else if (run_ok)        out_disp <= run_v;
            else if (nrok[sx])      out_disp <= nrv[sx];
            else                    out_disp <= '0;
          end
          if (sx == W - 1) phase <= IDLE;
          else sx <= sx + 1;
        end
        default: phase <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(row_done && phase != IDLE))
    else $error("postproc: row finished while the previous row is still being scanned");

endmodule
