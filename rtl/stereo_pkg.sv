// stereo_pkg: types, constants and small functions shared by the stereo matching core.
//
// The core matches a rectified RGB stereo pair with AD-Census initial costs, cross-based cost
// aggregation on a support region built from vertical arms, four-direction semiglobal
// optimization, winner-takes-all selection and postprocessing. All costs are 8-bit fixed point.
// The two robust-function tables of the initial cost, 1 - exp(-c/lambda), are computed here at
// elaboration with an integer recurrence, so no table file is needed:
//   e(0) = 65536, e(c+1) = (e(c) * DECAY + 32768) >> 16, table(c) = (127 * (65536 - e(c)) + 32768) >> 16
// where DECAY = round(65536 * exp(-1/lambda)). lambda_AD = 10 and lambda_census = 30 are this
// design's choice (the usual AD-Census values); each table saturates at 127, so their sum fits 8 bits.
package stereo_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int COST_W   = 8;    // initial, aggregated and path costs
  localparam int CFIN_W   = 10;   // sum of the four path costs
  localparam int CENSUS_W = 24;   // 5x5 census window without its centre
  localparam int SUBPIX_F = 4;    // fractional bits of the output disparity

  localparam int unsigned DECAY_AD     = 59299;  // round(65536*exp(-1/10))
  localparam int unsigned DECAY_CENSUS = 63387;  // round(65536*exp(-1/30))

  typedef logic [COST_W-1:0] cost_t;
  typedef logic signed [15:0] coord_t;   // image row or column, may point outside the image

  // Robust function table entry for value c.
  function automatic logic [6:0] robust_lut(input int unsigned c, input int unsigned decay);
    longint unsigned e;
    e = 65536;
    for (int unsigned i = 0; i < c; i++) e = (e * decay + 32768) >> 16;
    return 7'((127 * (65536 - e) + 32768) >> 16);
  endfunction

  // Luma used by the census transform: (R + 2G + B) / 4.
  function automatic logic [7:0] luma(input rgb_t p);
    return 8'((10'(p.r) + 10'(p.g) + 10'(p.g) + 10'(p.b)) >> 2);
  endfunction

  function automatic logic [7:0] absdiff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Largest per-channel difference, used by the cross arm rule.
  function automatic logic [7:0] color_dist(input rgb_t a, input rgb_t b);
    logic [7:0] dr, dg, db, m;
    dr = absdiff(a.r, b.r);
    dg = absdiff(a.g, b.g);
    db = absdiff(a.b, b.b);
    m = (dr > dg) ? dr : dg;
    return (m > db) ? m : db;
  endfunction

  // AD cost of equation (4): mean of the three absolute colour differences.
  function automatic logic [7:0] ad_cost(input rgb_t a, input rgb_t b);
    logic [9:0] s;
    s = 10'(absdiff(a.r, b.r)) + 10'(absdiff(a.g, b.g)) + 10'(absdiff(a.b, b.b));
    return 8'(s / 3);
  endfunction

endpackage
