// stereo_ctrl: frame sequencing of the stereo matching core.
//
// The image is processed in bands of PR rows. Each band is cut into W/WSEG segments of WSEG
// columns, and each segment is streamed K = ND/PD times (passes), pass k covering disparities
// k*PD .. k*PD+PD-1. A pass reads CYC = WSEG + 2*LMAX + PD + 3 consecutive columns from the line
// buffer, starting at column xs - LMAX - PD - 1 of a segment starting at xs: the extra columns
// fill the right-image delay line (PD), the horizontal aggregation window (LMAX each side) and
// the 5x5 census window (3) before the segment's first column is due, the preheating the
// document describes. The right image is read at column rc - k*PD.
//
// The controller also owns the input side. Pixels are written row by row; the input is stalled
// (in_ready low) when the next row would overwrite a line-buffer row the current band still
// reads. A band starts once all rows it needs (LMAX + 2 below it) are in, or the frame is
// complete.
//
// Follows the document: bands of PR rows, segments, K passes per segment, the right read
// address offset by k*PD, W_seg + P_D + 2*L_max cycles per pass (plus three of this design for
// the census window). The stall rule and the start condition are this design's.
//
// Interface: start begins a frame (H*W pixels on in_valid/in_ready). rd_* is one column read
// per cycle with its tag (pass, segment, band). busy stays high until the last read is issued.
module stereo_ctrl
  import stereo_pkg::*;
#(
  parameter int W    = 1600,
  parameter int H    = 1200,
  parameter int PR   = 4,
  parameter int PD   = 16,
  parameter int ND   = 128,
  parameter int WSEG = 400,
  parameter int LMAX = 12,
  localparam int NWIN = PR + 2 * LMAX + 4,
  localparam int NR   = NWIN + PR,
  localparam int K    = ND / PD,
  localparam int NSEG = W / WSEG,
  localparam int NBAND = H / PR,
  localparam int CYC  = WSEG + 2 * LMAX + PD + 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // input pixel stream
  input  logic        in_valid,
  output logic        in_ready,
  output logic        wr_en,
  output coord_t      wr_x,
  output coord_t      wr_y,
  // column reads
  output logic        rd_en,
  output coord_t      rd_xl,
  output coord_t      rd_xr,
  output coord_t      rd_ytop,
  output logic [15:0] rd_k,
  output logic [15:0] rd_seg,
  output logic [15:0] rd_band,
  output logic        busy,
  output logic        stalled
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN} state_t;
  state_t state;

  logic        in_done;
  logic [15:0] band, seg, k, t;

  logic signed [31:0] low_row, need_rows;
  assign low_row   = int'(band) * PR - LMAX - 2;
  assign need_rows = (int'(band) * PR + PR + LMAX + 2 < H) ? int'(band) * PR + PR + LMAX + 2 : H;

  // Input side.
  assign in_ready = (state != S_IDLE) && !in_done && (int'(wr_y) < low_row + NR);
  assign wr_en    = in_valid && in_ready;
  assign stalled  = in_valid && !in_ready && (state != S_IDLE) && !in_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_x    <= '0;
      wr_y    <= '0;
      in_done <= 1'b0;
    end else if (start) begin
      wr_x    <= '0;
      wr_y    <= '0;
      in_done <= 1'b0;
    end else if (wr_en) begin
      if (int'(wr_x) == W - 1) begin
        wr_x <= '0;
        wr_y <= wr_y + 1'b1;
        if (int'(wr_y) == H - 1) in_done <= 1'b1;
      end else begin
        wr_x <= wr_x + 1'b1;
      end
    end
  end

  // Read side.
  logic signed [31:0] xs;
  assign xs = int'(seg) * WSEG;
  assign rd_en   = (state == S_RUN);
  assign rd_xl   = coord_t'(xs - LMAX - PD - 1 + int'(t));
  assign rd_xr   = coord_t'(xs - LMAX - PD - 1 + int'(t) - int'(k) * PD);
  assign rd_ytop = coord_t'(int'(band) * PR - LMAX - 2);
  assign rd_k    = k;
  assign rd_seg  = seg;
  assign rd_band = band;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      band  <= '0;
      seg   <= '0;
      k     <= '0;
      t     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_WAIT;
          band  <= '0;
          seg   <= '0;
          k     <= '0;
          t     <= '0;
        end
        S_WAIT: if (in_done || int'(wr_y) >= need_rows) state <= S_RUN;
        S_RUN: begin
          if (int'(t) == CYC - 1) begin
            t <= '0;
            if (int'(k) == K - 1) begin
              k <= '0;
              if (int'(seg) == NSEG - 1) begin
                seg <= '0;
                if (int'(band) == NBAND - 1) begin
                  state <= S_IDLE;
                end else begin
                  band  <= band + 1'b1;
                  state <= S_WAIT;
                end
              end else begin
                seg <= seg + 1'b1;
              end
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (W % WSEG == 0) else $error("stereo_ctrl: W must be a multiple of WSEG");
    assert (H % PR == 0)   else $error("stereo_ctrl: H must be a multiple of PR");
    assert (ND % PD == 0)  else $error("stereo_ctrl: ND must be a multiple of PD");
  end

endmodule
