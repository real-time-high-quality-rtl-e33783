// cost_init: AD-Census initial cost for a column of rows at PD disparities per cycle.
//
// Every cycle the line buffer delivers one column window (NWIN rows) of the left image at read
// column rc and of the right image at column rc - k*PD, where k is the pass number. Five
// consecutive columns are kept in shift registers, so the 5x5 census vector (24 bits: neighbour
// luma below centre luma) of every row of the window is computed at centre column rc - 2. The
// right image's centre column (pixel and census) then goes through a shift register of PD - 1
// stages: its output delayed by j cycles belongs to right column (rc - 2) - k*PD - j, so the
// cost for disparity d = k*PD + j is formed against the left centre column. For each of the
// NC = PR + 2*LMAX centre rows and each j:
//   C_I = T_AD(C_AD) + T_census(hamming)     (equation (5), tables in stereo_pkg, sum <= 254)
// A right pixel left of the image (x - d < 0) gives the largest cost, 255.
//
// Follows the document: AD over RGB, census Hamming distance, robust function by look-up table,
// 8-bit costs, the right stream delayed by 0..PD-1 cycles. This design's own choices: the census
// is computed from the window instead of being stored in the line buffer, its window is 5x5 on
// luma (R+2G+B)/4, neighbours outside the image give a 0 bit, and lambda_AD = 10, lambda_census = 30.
//
// Interface: in_valid with in_rc/in_k/in_ytop qualifies one line-buffer column; outputs are
// valid one cycle later (combinational on the window registers, stable until the next
// in_valid) and tagged with the left centre column out_cl and the top row of
// the NC centre rows out_yc. Warm-up: costs are right once five columns plus j have been
// shifted in within the same pass; the controller starts each pass early enough for that.
module cost_init
  import stereo_pkg::*;
#(
  parameter int W    = 1600,
  parameter int H    = 1200,
  parameter int PD   = 16,
  parameter int PR   = 4,
  parameter int LMAX = 12,
  localparam int NWIN = PR + 2 * LMAX + 4,
  localparam int NC   = PR + 2 * LMAX
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  coord_t in_rc,
  input  coord_t in_ytop,
  input  logic [15:0] in_k,
  input  rgb_t   in_left  [NWIN],
  input  rgb_t   in_right [NWIN],
  output logic   out_valid,
  output coord_t out_cl,
  output coord_t out_yc,
  output cost_t  out_cost [PD][NC],
  output rgb_t   out_lpix [NC]
);

  // Robust-function tables, built at elaboration.
  logic [6:0] lut_ad [256];
  logic [6:0] lut_cs [CENSUS_W+1];
  for (genvar i = 0; i < 256; i++) begin : g_lut_ad
    localparam logic [6:0] V = robust_lut(i, DECAY_AD);
    assign lut_ad[i] = V;
  end
  for (genvar i = 0; i <= CENSUS_W; i++) begin : g_lut_cs
    localparam logic [6:0] V = robust_lut(i, DECAY_CENSUS);
    assign lut_cs[i] = V;
  end

  // Five-column windows; index 0 is the newest column.
  rgb_t wl [5][NWIN];
  rgb_t wr [5][NWIN];
  logic cvl [5];
  logic cvr [5];

  coord_t rc_r;
  assign rc_r = coord_t'(int'(in_rc) - int'(in_k) * PD);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int c = 4; c > 0; c--) begin
        wl[c]  <= wl[c-1];
        wr[c]  <= wr[c-1];
        cvl[c] <= cvl[c-1];
        cvr[c] <= cvr[c-1];
      end
      wl[0]  <= in_left;
      wr[0]  <= in_right;
      cvl[0] <= (int'(in_rc) >= 0) && (int'(in_rc) < W);
      cvr[0] <= (int'(rc_r) >= 0) && (int'(rc_r) < W);
    end
  end

  // Rows of the window inside the image (the window's top row is constant during a pass).
  coord_t ytop_q;
  always_ff @(posedge clk) if (in_valid) ytop_q <= in_ytop;

  function automatic logic [CENSUS_W-1:0] census_at(input rgb_t win [5][NWIN], input logic cv [5],
                                                    input int r, input int ytop);
    logic [CENSUS_W-1:0] v;
    logic [7:0] ctr;
    int n;
    ctr = luma(win[2][r]);
    n = 0;
    v = '0;
    for (int dr = -2; dr <= 2; dr++) begin
      for (int dc = -2; dc <= 2; dc++) begin
        if (dr != 0 || dc != 0) begin
          automatic int y = ytop + r + dr;
          automatic logic ok = cv[2 - dc] && (y >= 0) && (y < H);
          v[n] = ok && (luma(win[2 - dc][r + dr]) < ctr);
          n++;
        end
      end
    end
    return v;
  endfunction

  // Census of the centre column of both images.
  logic [CENSUS_W-1:0] cen_l [NC];
  logic [CENSUS_W-1:0] cen_r [NC];
  always_comb begin
    for (int r = 0; r < NC; r++) begin
      cen_l[r] = census_at(wl, cvl, r + 2, int'(ytop_q));
      cen_r[r] = census_at(wr, cvr, r + 2, int'(ytop_q));
    end
  end

  // Right-image delay line: stage j holds the centre column j cycles ago.
  logic [CENSUS_W-1:0] dl_cen [PD][NC];
  rgb_t                dl_pix [PD][NC];
  logic                dl_ok  [PD];
  always_comb begin
    dl_cen[0] = cen_r;
    for (int r = 0; r < NC; r++) dl_pix[0][r] = wr[2][r + 2];
    dl_ok[0] = cvr[2];
  end
  if (PD > 1) begin : g_delay
    logic [CENSUS_W-1:0] sr_cen [1:PD-1][NC];
    rgb_t                sr_pix [1:PD-1][NC];
    logic                sr_ok  [1:PD-1];
    always_ff @(posedge clk) begin
      if (in_valid) begin
        sr_cen[1] <= dl_cen[0];
        sr_pix[1] <= dl_pix[0];
        sr_ok[1]  <= dl_ok[0];
        for (int j = 2; j < PD; j++) begin
          sr_cen[j] <= sr_cen[j-1];
          sr_pix[j] <= sr_pix[j-1];
          sr_ok[j]  <= sr_ok[j-1];
        end
      end
    end
    always_comb begin
      for (int j = 1; j < PD; j++) begin
        dl_cen[j] = sr_cen[j];
        dl_pix[j] = sr_pix[j];
        dl_ok[j]  = sr_ok[j];
      end
    end
  end

  // Pipeline tags: the centre column lags the read column by two.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cl    <= '0;
      out_yc    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cl <= coord_t'(int'(in_rc) - 2);
        out_yc <= coord_t'(int'(in_ytop) + 2);
      end
    end
  end

  // Costs and the left centre pixels are combinational on the window registers; they belong
  // to column out_cl and stay stable until the next in_valid.
  always_comb begin
    for (int r = 0; r < NC; r++) out_lpix[r] = wl[2][r + 2];
    for (int j = 0; j < PD; j++) begin
      for (int r = 0; r < NC; r++) begin
        if (dl_ok[j]) begin
          out_cost[j][r] = cost_t'(9'(lut_ad[ad_cost(wl[2][r + 2], dl_pix[j][r])]) +
                                   9'(lut_cs[$countones(cen_l[r] ^ dl_cen[j][r])]));
        end else begin
          out_cost[j][r] = cost_t'(255);
        end
      end
    end
  end

endmodule
