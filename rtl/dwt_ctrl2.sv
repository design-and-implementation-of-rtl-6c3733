// dwt_ctrl2 - control unit 2: vertical filtering tasks synchronised to stage 1.
//
// Stage 1 delivers each row of horizontal coefficients as columns
// p = 0..M-1 (p = 2k + horizontal band), with the samples of different
// levels interleaved. Control unit 2 counts row r and column p of every
// level separately, keeps every column's last four rows in that level's
// region of Buffer 2, and issues to PU2:
//   r odd,  r >= 3 : vertical low-pass  on rows r-3..r (new sample included)
//   r even, r >= 4 : vertical high-pass on rows r-4..r-1 (all from Buffer 2)
// so the first vertical output needs 3*M+1 stage-1 samples and every later
// one two new rows, one task per arriving sample. After the last row of a
// level the unit stops accepting and runs a flush of three passes over the
// columns: the high-pass of rows N-4..N-1, then low- and high-pass of the
// periodic window {rows N-2, N-1, 0, 1}. Rows 0 and 1 are kept for that
// in Buffer 2.
//
// Results of PU2 are tagged with level, sub-band, row and column and leave
// on the out_* stream. LL results of every level but the last are also
// written to that level's ring in Buffer 1 (at base + write pointer) as the
// next level's input; ll_wr_valid/level tell control unit 1 that one more
// word is there. LL words of a level leave in raster order, so the next
// level reads them in the order written.
//
// Interface: valid/ready everywhere; Buffer 2 is read combinationally at
// b2_col and written on the clock edge.
module dwt_ctrl2
  import dwt_pkg::*;
#(
  parameter int IMG_W  = 256,
  parameter int IMG_H  = 256,
  parameter int LEVELS = 2,
  parameter int LVW    = $clog2(LEVELS + 1),
  parameter int B1AW   = $clog2(ll_base(IMG_W, LEVELS) > 1 ? ll_base(IMG_W, LEVELS) : 2),
  parameter int ORW    = $clog2(IMG_H / 2),
  parameter int OCW    = $clog2(IMG_W / 2),
  parameter int TAGW   = 1 + LVW + 2 + ORW + OCW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // horizontal coefficients from PU1
  input  logic                      in_valid,
  output logic                      in_ready,
  input  sample_t                   in_data,
  input  logic [LVW-1:0]            in_level,
  // Buffer 2
  output logic [$clog2(IMG_W)+0:0]  b2_col,
  output logic                      b2_push,
  output logic [1:0]                b2_first_we,
  output sample_t                   b2_din,
  input  win_t                      b2_rows,
  input  sample_t                   b2_first [2],
  // task port to PU2
  output logic                      pu_valid,
  input  logic                      pu_ready,
  output win_t                      pu_win,
  output logic                      pu_high,
  output logic [TAGW-1:0]           pu_tag,
  // results of PU2
  input  logic                      res_valid,
  output logic                      res_ready,
  input  sample_t                   res_data,
  input  logic [TAGW-1:0]           res_tag,
  // sub-band output
  output logic                      out_valid,
  input  logic                      out_ready,
  output sample_t                   out_data,
  output logic [LVW-1:0]            out_level,
  output band_t                     out_band,
  output logic [ORW-1:0]            out_row,
  output logic [OCW-1:0]            out_col,
  output logic                      out_last,
  // LL write-back to Buffer 1
  output logic                      b1_wr_en,
  output logic [B1AW-1:0]           b1_wr_addr,
  output sample_t                   b1_wr_data,
  // LL write notice to control unit 1
  output logic                      ll_wr_valid,
  output logic [LVW-1:0]            ll_wr_level,
  // status
  output logic                      flushing
);

  localparam int LOGW = $clog2(IMG_W);
  localparam int LOGH = $clog2(IMG_H);

  typedef struct packed {
    logic           last;
    logic [LVW-1:0] level;
    band_t          band;
    logic [ORW-1:0] row;
    logic [OCW-1:0] col;
  } tag_t;

  typedef enum logic {S_RUN, S_FLUSH} st_e;

  st_e             st;
  logic [LOGW-1:0] pl [LEVELS];   // per level: column of the next sample
  logic [LOGH-1:0] rl [LEVELS];   // per level: row of the next sample
  logic [LOGW-1:0] p;
  logic [LOGH-1:0] r;
  int              li;
  assign li = (in_level == '0) ? 0 : int'(in_level) - 1;
  assign p  = pl[li];
  assign r  = rl[li];

  // per-level region bases
  logic [LOGW:0]   cbase [LEVELS + 1];
  logic [B1AW-1:0] wbase [LEVELS + 1];
  logic [LOGW:0]   wmask [LEVELS + 1];
  logic [LOGW:0]   wptr  [LEVELS + 1];   // Buffer 1 ring write pointers
  always_comb begin
    for (int j = 0; j <= LEVELS; j++) begin
      cbase[j] = (LOGW+1)'(col_base(IMG_W, j > 0 ? j : 1));
      wbase[j] = B1AW'(ll_base(IMG_W, j > 0 ? j : 1));
      wmask[j] = (LOGW+1)'((IMG_W >> (j > 0 ? j - 1 : 0)) - 1);
    end
  end
  logic [1:0]      fpass;  // flush pass 0..2
  logic [LOGW-1:0] fcol;
  logic [LVW-1:0]  flvl;

  logic [LOGW:0]   cols_in, cols_fl;
  logic [LOGH:0]   rows_in, rows_fl;
  assign cols_in = (LOGW+1)'(IMG_W >> (in_level - 1));
  assign rows_in = (LOGH+1)'(IMG_H >> (in_level - 1));
  assign cols_fl = (LOGW+1)'(IMG_W >> (flvl - 1));
  assign rows_fl = (LOGH+1)'(IMG_H >> (flvl - 1));

  logic accept, p_last, r_last, f_last;
  assign in_ready = (st == S_RUN) && pu_ready;
  assign accept   = in_valid && in_ready;
  assign p_last   = ((LOGW+1)'(p) == cols_in - 1);
  assign r_last   = ((LOGH+1)'(r) == rows_in - 1);
  assign f_last   = (fpass == 2'd2) && ((LOGW+1)'(fcol) == cols_fl - 1);
  assign flushing = (st == S_FLUSH);

  // ------------------------------------------------------------ Buffer 2
  assign b2_col         = (st == S_RUN) ? cbase[in_level] + (LOGW+1)'(p)
                                        : cbase[flvl] + (LOGW+1)'(fcol);
  assign b2_din         = in_data;
  assign b2_push        = accept;
  assign b2_first_we[0] = accept && (r == '0);
  assign b2_first_we[1] = accept && (r == LOGH'(1));

  // ------------------------------------------------------------ tasks
  tag_t ttag;
  always_comb begin
    pu_valid   = 1'b0;
    pu_win     = b2_rows;
    pu_high    = 1'b0;
    ttag       = '0;
    ttag.level = in_level;
    ttag.col   = OCW'(p >> 1);
    if (st == S_RUN) begin
      if (in_valid && r >= LOGH'(3)) begin
        pu_valid  = 1'b1;
        ttag.band = band_t'({p[0], ~r[0]});
        if (r[0]) begin
          pu_win   = {in_data, b2_rows[3], b2_rows[2], b2_rows[1]};
          pu_high  = 1'b0;
          ttag.row = ORW'((r - LOGH'(3)) >> 1);
        end else begin
          pu_win   = b2_rows;
          pu_high  = 1'b1;
          ttag.row = ORW'((r - LOGH'(4)) >> 1);
        end
      end
    end else begin
      pu_valid   = 1'b1;
      ttag.level = flvl;
      ttag.col   = OCW'(fcol >> 1);
      ttag.last  = f_last;
      if (fpass == 2'd0) begin
        pu_win   = b2_rows;
        pu_high  = 1'b1;
        ttag.row = ORW'((rows_fl >> 1) - (LOGH+1)'(2));
      end else begin
        pu_win   = {b2_first[1], b2_first[0], b2_rows[3], b2_rows[2]};
        pu_high  = (fpass == 2'd2);
        ttag.row = ORW'((rows_fl >> 1) - (LOGH+1)'(1));
      end
      ttag.band = band_t'({fcol[0], pu_high});
    end
    pu_tag = ttag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_RUN;
      for (int j = 0; j < LEVELS; j++) begin
        pl[j] <= '0;
        rl[j] <= '0;
      end
      fpass <= '0;
      fcol  <= '0;
      flvl  <= LVW'(1);
    end else if (st == S_RUN) begin
      if (accept) begin
        if (p_last) begin
          pl[li] <= '0;
          if (r_last) begin
            rl[li] <= '0;
            st    <= S_FLUSH;
            fpass <= '0;
            fcol  <= '0;
            flvl  <= in_level;
          end else begin
            rl[li] <= r + 1'b1;
          end
        end else begin
          pl[li] <= p + 1'b1;
        end
      end
    end else if (pu_ready) begin
      if ((LOGW+1)'(fcol) == cols_fl - 1) begin
        fcol  <= '0;
        fpass <= fpass + 2'd1;
        if (fpass == 2'd2) st <= S_RUN;
      end else begin
        fcol <= fcol + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ results
  tag_t otag;
  assign otag       = tag_t'(res_tag);
  assign out_valid  = res_valid;
  assign res_ready  = out_ready;
  assign out_data   = res_data;
  assign out_level  = otag.level;
  assign out_band   = otag.band;
  assign out_row    = otag.row;
  assign out_col    = otag.col;
  assign out_last   = otag.last;

  logic fire;
  assign fire       = res_valid && out_ready;
  assign b1_wr_en   = fire && (otag.band == BAND_LL) && (int'(otag.level) < LEVELS);
  assign b1_wr_addr = wbase[otag.level] + B1AW'(wptr[otag.level]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= LEVELS; j++) wptr[j] <= '0;
    end else if (b1_wr_en) begin
      wptr[otag.level] <= (wptr[otag.level] + 1'b1) & wmask[otag.level];
    end
  end
  assign b1_wr_data = res_data;
  assign ll_wr_valid = b1_wr_en;
  assign ll_wr_level = otag.level;

endmodule
