// dwt2d_top - two-stage pipelined multi-level 2-D db2 wavelet transform.
//
// An IMG_W x IMG_H image enters as a raster stream, one 16-bit sample per
// clock. Stage 1 (control unit 1 + PU1) filters each row with the db2 low-
// and high-pass filters and decimates by two; stage 2 (Buffer 2, control
// unit 2 + PU2) filters the columns of that result the same way and emits
// the four sub-bands LL, LH, HL, HH of the level, each coefficient tagged
// with level, band, row and column. The LL of every level below LEVELS is
// written to a small ring in Buffer 1 and fed back into stage 1 as the
// input of the next level, so the same two stages compute all levels.
// Levels are interleaved: stage 1 alternates between image samples and
// fed-back LL samples (a waiting higher-level sample goes right after each
// image sample, an image sample right after each higher-level sample), so
// level j+1 is computed while level j is still coming in. Boundaries use
// periodic extension.
//
// Timing: with a continuous input and out_ready held high, PU1 and PU2 each
// produce at most one coefficient per clock. The first level-1 coefficient
// leaves 3*IMG_W + 10 clocks after the first sample is accepted. After the
// last row of each level, stage 2 spends 3*width clocks on the periodic
// boundary rows. A 256 x 256 image with two levels takes 83,566 clocks
// from first sample to last coefficient (65,536 of them taking input).
//
// Interface: in_valid/in_ready/in_data for the image; out_valid/out_ready
// plus data and tags for the coefficients; rst_n is an asynchronous,
// active-low reset.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int IMG_W  = 256,
  parameter int IMG_H  = 256,
  parameter int LEVELS = 2,
  parameter int LVW    = $clog2(LEVELS + 1),
  parameter int ORW    = $clog2(IMG_H / 2),
  parameter int OCW    = $clog2(IMG_W / 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  sample_t         in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output sample_t         out_data,
  output logic [LVW-1:0]  out_level,
  output band_t           out_band,
  output logic [ORW-1:0]  out_row,
  output logic [OCW-1:0]  out_col,
  output logic            out_last,
  // status: a sample of level st_level entered stage 1 this clock
  // (st_issue), stage 2 is in its boundary flush (st_flushing)
  output logic            st_issue,
  output logic [LVW-1:0]  st_level,
  output logic            st_flushing
);

  localparam int B1DEPTH = ll_base(IMG_W, LEVELS) > 1 ? ll_base(IMG_W, LEVELS) : 2;
  localparam int B2COLS  = col_base(IMG_W, LEVELS + 1);
  localparam int B2PW    = $clog2(IMG_W) + 1;
  localparam int B1AW    = $clog2(B1DEPTH);
  localparam int TAGW2   = 1 + LVW + 2 + ORW + OCW;

  // the smallest level must still span one filter window
  initial begin
    assert ((IMG_W >> (LEVELS - 1)) >= 4 && (IMG_H >> (LEVELS - 1)) >= 4)
      else $error("dwt2d_top: level %0d would be narrower than 4 samples", LEVELS);
    assert ((1 << $clog2(IMG_W)) == IMG_W && (1 << $clog2(IMG_H)) == IMG_H)
      else $error("dwt2d_top: image sides must be powers of two");
  end

  // Buffer 1
  logic            b1_rd_en, b1_wr_en;
  logic [B1AW-1:0] b1_rd_addr, b1_wr_addr;
  sample_t         b1_rd_data, b1_wr_data;

  // stage 1 <-> stage 2
  logic            ll_wr_valid;
  logic [LVW-1:0]  ll_wr_level;
  logic            t1_valid, t1_ready, t1_high;
  win_t            t1_win;
  logic [LVW-1:0]  t1_level;
  logic            h_valid, h_ready;
  sample_t         h_data;
  logic [LVW-1:0]  h_level;

  // stage 2 internals
  logic [B2PW-1:0] b2_col;
  logic            b2_push;
  logic [1:0]      b2_first_we;
  sample_t         b2_din;
  win_t            b2_rows;
  sample_t         b2_first [2];
  logic            t2_valid, t2_ready, t2_high;
  win_t            t2_win;
  logic [TAGW2-1:0] t2_tag, r2_tag;
  logic            r2_valid, r2_ready;
  sample_t         r2_data;


  dwt_buf1 #(.DEPTH(B1DEPTH), .AW(B1AW)) u_buf1 (
    .clk     (clk),
    .wr_en   (b1_wr_en),
    .wr_addr (b1_wr_addr),
    .wr_data (b1_wr_data),
    .rd_en   (b1_rd_en),
    .rd_addr (b1_rd_addr),
    .rd_data (b1_rd_data)
  );

  dwt_ctrl1 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LEVELS(LEVELS), .LVW(LVW), .B1AW(B1AW)) u_ctrl1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_data    (in_data),
    .b1_rd_en   (b1_rd_en),
    .b1_rd_addr (b1_rd_addr),
    .b1_rd_data (b1_rd_data),
    .ll_wr_valid (ll_wr_valid),
    .ll_wr_level (ll_wr_level),
    .pu_valid   (t1_valid),
    .pu_ready   (t1_ready),
    .pu_win     (t1_win),
    .pu_high    (t1_high),
    .pu_level   (t1_level),
    .issue_valid (st_issue),
    .issue_level (st_level)
  );

  dwt_pu #(.TAGW(LVW)) u_pu1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (t1_valid),
    .in_ready  (t1_ready),
    .in_win    (t1_win),
    .in_high   (t1_high),
    .in_tag    (t1_level),
    .out_valid (h_valid),
    .out_ready (h_ready),
    .out_data  (h_data),
    .out_tag   (h_level)
  );

  dwt_buf2 #(.COLS(B2COLS), .PW(B2PW)) u_buf2 (
    .clk      (clk),
    .col      (b2_col),
    .push     (b2_push),
    .first_we (b2_first_we),
    .din      (b2_din),
    .rows     (b2_rows),
    .first    (b2_first)
  );

  dwt_ctrl2 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LEVELS(LEVELS), .LVW(LVW), .B1AW(B1AW),
              .ORW(ORW), .OCW(OCW), .TAGW(TAGW2)) u_ctrl2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (h_valid),
    .in_ready    (h_ready),
    .in_data     (h_data),
    .in_level    (h_level),
    .b2_col      (b2_col),
    .b2_push     (b2_push),
    .b2_first_we (b2_first_we),
    .b2_din      (b2_din),
    .b2_rows     (b2_rows),
    .b2_first    (b2_first),
    .pu_valid    (t2_valid),
    .pu_ready    (t2_ready),
    .pu_win      (t2_win),
    .pu_high     (t2_high),
    .pu_tag      (t2_tag),
    .res_valid   (r2_valid),
    .res_ready   (r2_ready),
    .res_data    (r2_data),
    .res_tag     (r2_tag),
    .out_valid   (out_valid),
    .out_ready   (out_ready),
    .out_data    (out_data),
    .out_level   (out_level),
    .out_band    (out_band),
    .out_row     (out_row),
    .out_col     (out_col),
    .out_last    (out_last),
    .b1_wr_en    (b1_wr_en),
    .b1_wr_addr  (b1_wr_addr),
    .b1_wr_data  (b1_wr_data),
    .ll_wr_valid (ll_wr_valid),
    .ll_wr_level (ll_wr_level),
    .flushing    (st_flushing)
  );

  dwt_pu #(.TAGW(TAGW2)) u_pu2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (t2_valid),
    .in_ready  (t2_ready),
    .in_win    (t2_win),
    .in_high   (t2_high),
    .in_tag    (t2_tag),
    .out_valid (r2_valid),
    .out_ready (r2_ready),
    .out_data  (r2_data),
    .out_tag   (r2_tag)
  );

endmodule
