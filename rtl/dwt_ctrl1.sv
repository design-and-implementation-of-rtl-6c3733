// dwt_ctrl1 - control unit 1: level scheduling and horizontal filtering tasks.
//
// Sources. Level 1 reads the image (C^0) from the in_* stream, row by row.
// Level j > 1 reads the LL of level j-1 from its ring in Buffer 1, in the
// raster order stage 2 wrote it, as soon as it is there: the unit counts,
// per level, the LL words written (ll_wr_valid/ll_wr_level) against the
// words it has read, and reads at its own ring pointer.
//
// Level schedule. Each clock in which the input register frees up, one
// sample is taken:
//   - after a level-1 sample, the lowest higher level that has a sample
//     ready is served first, and level 1 only if none has;
//   - after a higher-level sample, level 1 (the lowest unfinished level)
//     is served first, and otherwise the lowest higher level that is ready.
// The levels of one image thus interleave sample by sample; the image
// stream is held off (in_ready low) for the clocks given to higher levels.
//
// Input register. Each sample passes through one 16-bit register: a plain
// register for the image stream, the read register of Buffer 1 otherwise.
//
// Horizontal tasks. Per level, a four-sample shift register holds
// x[c-4..c-1] of the current row. For a sample at column c the unit issues:
//   c odd,  c >= 3 : low-pass  on x[c-3..c]   (output k = (c-3)/2)
//   c even, c >= 4 : high-pass on x[c-4..c-1] (output k = (c-4)/2)
// At the end of a row of level j, three tasks remain (high-pass of the last
// full window, low- and high-pass of the periodic window {x[M-2], x[M-1],
// x[0], x[1]}). They wait in that level's tail registers and take the next
// free task slots: clocks whose sample (column 0..2 of any level) has no
// task of its own, or clocks with no sample. A sample whose own task would
// overtake its level's pending tail is held until the tail is out, which
// keeps every level's output order L0 H0 L1 H1 ... (column p = 2k + band).
//
// Interface: valid/ready on in_* and on the PU task port; Buffer 1 is read
// through b1_rd_en/b1_rd_addr with data one clock later. issue_valid and
// issue_level show which level's sample entered the input register.
module dwt_ctrl1
  import dwt_pkg::*;
#(
  parameter int IMG_W  = 256,
  parameter int IMG_H  = 256,
  parameter int LEVELS = 2,
  parameter int LVW    = $clog2(LEVELS + 1),
  parameter int B1AW   = $clog2(ll_base(IMG_W, LEVELS) > 1 ? ll_base(IMG_W, LEVELS) : 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  // image input (C^0)
  input  logic            in_valid,
  output logic            in_ready,
  input  sample_t         in_data,
  // Buffer 1 read port
  output logic            b1_rd_en,
  output logic [B1AW-1:0] b1_rd_addr,
  input  sample_t         b1_rd_data,
  // LL words written to Buffer 1 by stage 2
  input  logic            ll_wr_valid,
  input  logic [LVW-1:0]  ll_wr_level,
  // task port to PU1
  output logic            pu_valid,
  input  logic            pu_ready,
  output win_t            pu_win,
  output logic            pu_high,
  output logic [LVW-1:0]  pu_level,
  // status
  output logic            issue_valid,
  output logic [LVW-1:0]  issue_level
);

  localparam int LOGW = $clog2(IMG_W);
  localparam int LOGH = $clog2(IMG_H);
  localparam int CWID = LOGW;
  localparam int RWID = LOGH;
  localparam int AVW  = LOGW + LOGH + 1;   // holds a whole LL frame count

  // per-level constants
  logic [CWID:0]   cols   [LEVELS];
  logic [RWID:0]   rows   [LEVELS];
  logic [B1AW-1:0] rbase  [LEVELS];        // ring that level j+1 reads
  logic [CWID:0]   rmask  [LEVELS];        // ring size - 1
  always_comb begin
    for (int j = 0; j < LEVELS; j++) begin
      cols[j]  = (CWID+1)'(IMG_W >> j);
      rows[j]  = (RWID+1)'(IMG_H >> j);
      rbase[j] = B1AW'(ll_base(IMG_W, j > 0 ? j : 1));
      rmask[j] = (CWID+1)'((IMG_W >> (j > 0 ? j - 1 : 0)) - 1);
    end
  end

  // ---------------------------------------------------------------- issue side
  logic [CWID-1:0]  icol  [LEVELS];
  logic [RWID-1:0]  irow  [LEVELS];
  logic [AVW-1:0]   avail [LEVELS];        // LL words ready for level j (j > 0)
  logic [CWID:0]    rptr  [LEVELS];        // ring read pointer
  logic             last_was_l1;

  // ---------------------------------------------------------- input register
  logic             xv;
  logic             xsrc_buf;
  sample_t          x_ext;
  logic [CWID-1:0]  xcol;
  logic             xlast_col;
  logic [LVW-1:0]   xlvl;
  sample_t          x;
  assign x = xsrc_buf ? b1_rd_data : x_ext;

  // ------------------------------------------------------------ window state
  win_t             sr       [LEVELS];
  sample_t          f0       [LEVELS];
  sample_t          f1       [LEVELS];
  win_t             tail_win [LEVELS];
  sample_t          tail_f0  [LEVELS];
  sample_t          tail_f1  [LEVELS];
  logic [1:0]       tail_cnt [LEVELS];

  int  xi;                 // level index of the registered sample
  assign xi = int'(xlvl) - 1;

  // ------------------------------------------------------------ scheduling
  logic             any_high;
  int               hsel;  // lowest higher level with a sample ready
  always_comb begin
    any_high = 1'b0;
    hsel     = 1;
    for (int j = LEVELS - 1; j >= 1; j--)
      if (avail[j] != '0) begin
        any_high = 1'b1;
        hsel     = j;
      end
  end

  logic own_task, blocked, samp_go, consume, advance;
  logic any_tail, tail_go, take_ext, take_buf;
  int   tsel;

  assign own_task = xv && (xcol >= CWID'(3));
  assign blocked  = own_task && (tail_cnt[xi] != 2'd0);
  assign samp_go  = own_task && !blocked;
  assign consume  = xv && pu_ready && !blocked;
  assign advance  = !xv || consume;

  always_comb begin
    any_tail = 1'b0;
    tsel     = 0;
    for (int j = LEVELS - 1; j >= 0; j--)
      if (tail_cnt[j] != 2'd0) begin
        any_tail = 1'b1;
        tsel     = j;
      end
  end
  assign tail_go = pu_ready && !samp_go && any_tail;

  // image stream is served unless a higher level has the turn
  assign in_ready = advance && !(last_was_l1 && any_high);
  assign take_ext = in_valid && in_ready;
  assign take_buf = advance && any_high && !take_ext;
  assign b1_rd_en = take_buf;
  assign b1_rd_addr = rbase[hsel] + B1AW'(rptr[hsel]);

  assign issue_valid = take_ext || take_buf;
  assign issue_level = take_buf ? LVW'(hsel + 1) : LVW'(1);

  // ------------------------------------------------------------ task select
  always_comb begin
    pu_valid = 1'b0;
    pu_win   = sr[xi];
    pu_high  = 1'b0;
    pu_level = xlvl;
    if (samp_go) begin
      pu_valid = 1'b1;
      if (xcol[0]) begin
        pu_win  = {x, sr[xi][3], sr[xi][2], sr[xi][1]};
        pu_high = 1'b0;
      end else begin
        pu_win  = sr[xi];
        pu_high = 1'b1;
      end
    end else if (any_tail) begin
      pu_valid = 1'b1;
      pu_level = LVW'(tsel + 1);
      if (tail_cnt[tsel] == 2'd3) begin
        pu_win  = tail_win[tsel];
        pu_high = 1'b1;
      end else begin
        pu_win  = {tail_f1[tsel], tail_f0[tsel], tail_win[tsel][3], tail_win[tsel][2]};
        pu_high = (tail_cnt[tsel] == 2'd1);
      end
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_was_l1 <= 1'b0;
      xv          <= 1'b0;
      xsrc_buf    <= 1'b0;
      x_ext       <= '0;
      xcol        <= '0;
      xlast_col   <= 1'b0;
      xlvl        <= LVW'(1);
      for (int j = 0; j < LEVELS; j++) begin
        icol[j]     <= '0;
        irow[j]     <= '0;
        avail[j]    <= '0;
        rptr[j]     <= '0;
        sr[j]       <= '0;
        f0[j]       <= '0;
        f1[j]       <= '0;
        tail_win[j] <= '0;
        tail_f0[j]  <= '0;
        tail_f1[j]  <= '0;
        tail_cnt[j] <= '0;
      end
    end else begin
      // ---- take a new sample into the input register
      if (advance) begin
        xv <= take_ext || take_buf;
        if (take_ext || take_buf) begin
          automatic int j = take_buf ? hsel : 0;
          last_was_l1 <= take_ext;
          xsrc_buf    <= take_buf;
          if (take_ext) x_ext <= in_data;
          xcol        <= icol[j];
          xlast_col   <= ((CWID+1)'(icol[j]) == cols[j] - 1);
          xlvl        <= LVW'(j + 1);
          if (take_buf) rptr[j] <= (rptr[j] + 1'b1) & rmask[j];
          if ((CWID+1)'(icol[j]) == cols[j] - 1) begin
            icol[j] <= '0;
            if ((RWID+1)'(irow[j]) == rows[j] - 1) irow[j] <= '0;
            else                                   irow[j] <= irow[j] + 1'b1;
          end else begin
            icol[j] <= icol[j] + 1'b1;
          end
        end
      end

      // ---- LL availability per level (written by stage 2, read here)
      for (int j = 1; j < LEVELS; j++)
        avail[j] <= avail[j] + AVW'(ll_wr_valid && int'(ll_wr_level) == j)
                             - AVW'(take_buf && hsel == j);

      // ---- consume the registered sample
      if (consume) begin
        sr[xi] <= {x, sr[xi][3], sr[xi][2], sr[xi][1]};
        if (xcol == CWID'(0)) f0[xi] <= x;
        if (xcol == CWID'(1)) f1[xi] <= x;
        if (xlast_col) begin
          tail_win[xi] <= {x, sr[xi][3], sr[xi][2], sr[xi][1]};
          tail_f0[xi]  <= f0[xi];
          tail_f1[xi]  <= f1[xi];
          tail_cnt[xi] <= 2'd3;
        end
      end
      if (tail_go) tail_cnt[tsel] <= tail_cnt[tsel] - 2'd1;
    end
  end

  // A finished row never finds its level's previous tail still pending, and
  // no ring of Buffer 1 ever holds more words than it has.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (consume && xlast_col) |-> (tail_cnt[xi] == 2'd0));
  for (genvar g = 1; g < LEVELS; g++) begin : g_avail_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     avail[g] <= AVW'(IMG_W >> (g - 1)));
  end

endmodule
