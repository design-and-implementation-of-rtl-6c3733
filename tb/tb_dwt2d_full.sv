// tb_dwt2d_full - full-size end-to-end test of the two-stage 2-D db2 DWT pipeline.
//
// Streams 3 images of 256 x 256 samples through dwt2d_top with 2 levels
// and checks every coefficient of every sub-band and level against a direct
// reference: rows filtered with y[k] = round(sum_i c[i]*x[(2k+i) mod n]) and
// saturated to 16 bits, then columns of that result filtered the same way.
// Image 0 is sent with no gaps and out_ready held high; it checks the first-
// output latency (3*W+10 clocks) and that the whole image, all levels, is done
// within one clock per stage-1 sample plus twice the stage-2 flushes and 64
// clocks. Later images use random input gaps and random out_ready,
// and are sent back to back, so a new image enters while the last level of
// the previous one is still in stage 2. The test counts how often each
// mechanism occurs (output back-pressure, input stall, level feedback,
// higher-level samples interleaved with level 1, stage-2 boundary flush,
// Buffer 1 ring wrap-around, horizontal and vertical periodic wrap outputs,
// saturation) and fails if one never does. It also keeps its own count of
// the LL words waiting in each Buffer 1 ring (LL outputs minus samples taken
// by the next level) and fails if one ever exceeds the ring size W >> (l-1).
module tb_dwt2d_full;
  import dwt_pkg::*;

  localparam int W      = 256;
  localparam int H      = 256;
  localparam int LV     = 2;
  localparam int NIMG   = 3;
  localparam int LVW    = $clog2(LV + 1);
  localparam int ORW    = $clog2(H / 2);
  localparam int OCW    = $clog2(W / 2);
  localparam int MAXCYC = 1000000;
  // One sample per clock through stage 1 for all levels, plus, per level,
  // twice the 3*width-clock stage-2 flush (stage 1 stalls behind it, and the
  // next level's last rows wait for it), and 64 clocks of pipeline fill.
  function automatic int img_bound();
    int t = 64;
    for (int l = 1; l <= LV; l++) t += (W >> (l - 1)) * (H >> (l - 1)) + 6 * (W >> (l - 1));
    return t;
  endfunction
  localparam int T_IMG0 = img_bound();

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid, in_ready;
  sample_t        in_data;
  logic           out_valid, out_ready;
  sample_t        out_data;
  logic [LVW-1:0] out_level;
  band_t          out_band;
  logic [ORW-1:0] out_row;
  logic [OCW-1:0] out_col;
  logic           out_last;
  logic           st_issue;
  logic [LVW-1:0] st_level;
  logic           st_flushing;

  dwt2d_top  dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ reference
  int img   [NIMG][H][W];
  int expv  [NIMG][LV+1][4][H/2][W/2];
  bit seen  [NIMG][LV+1][4][H/2][W/2];
  int hbuf  [2][H][W];
  int cur   [H][W];

  localparam int HT [4] = '{7913, 13705, 3672, -2120};
  localparam int GT [4] = '{-2120, -3672, 13705, -7913};

  function automatic int rsat(longint acc);
    longint r;
    r = (acc + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic build_reference(int n);
    int w, h, s;
    longint acc;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) cur[r][c] = img[n][r][c];
    w = W; h = H;
    for (int lv = 1; lv <= LV; lv++) begin
      for (int r = 0; r < h; r++)
        for (int k = 0; k < w / 2; k++)
          for (int b = 0; b < 2; b++) begin
            acc = 0;
            for (int i = 0; i < 4; i++)
              acc += longint'((b != 0) ? GT[i] : HT[i]) * cur[r][(2*k + i) % w];
            hbuf[b][r][k] = rsat(acc);
          end
      for (int hb = 0; hb < 2; hb++)
        for (int vb = 0; vb < 2; vb++)
          for (int k = 0; k < h / 2; k++)
            for (int q = 0; q < w / 2; q++) begin
              acc = 0;
              for (int i = 0; i < 4; i++)
                acc += longint'((vb != 0) ? GT[i] : HT[i]) * hbuf[hb][(2*k + i) % h][q];
              expv[n][lv][hb*2 + vb][k][q] = rsat(acc);
            end
      for (int k = 0; k < h / 2; k++)
        for (int q = 0; q < w / 2; q++) cur[k][q] = expv[n][lv][0][k][q];
      w = w / 2; h = h / 2;
    end
  endtask

  // ------------------------------------------------------------ stimulus
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  in_count = 0;
  bit  gaps = 1'b0;
  bit  rnd_ready = 1'b0;

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          if (n == 2) img[n][r][c] = int'($urandom_range(65535)) - 32768;  // full range
          else        img[n][r][c] = int'($urandom_range(4095)) - 1024;
        end
      build_reference(n);
    end
    in_valid = 1'b0;
    in_data  = '0;
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // the driver works on falling edges; the design samples on rising edges
    for (int n = 0; n < NIMG; n++) begin
      gaps = (n != 0);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          if (gaps) while ($urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_data  = sample_t'(img[n][r][c]);
          while (!in_ready) @(negedge clk);
        end
      if (n == 0) rnd_ready = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rnd_ready) out_ready <= ($urandom_range(4) != 0);
  end

  // ------------------------------------------------------------ checking
  int  out_img [LV+1];       // image whose level-l outputs are arriving
  int  out_cnt = 0, total_expected;
  int  first_in_cyc = -1, first_out_cyc = -1;
  int  n_bp = 0, n_in_stall = 0, n_feedback = 0, n_interleave = 0, n_flush = 0;
  int  img0_done_cyc = 0;
  int  n_hwrap = 0, n_vwrap = 0, n_sat = 0;
  logic prev_flush = 1'b0;
  // Buffer 1 rings: LL words of level l waiting for level l+1 (written
  // minus taken) never exceed the ring size W >> (l-1); count ring wraps.
  int  fb_lv [LV+2], occ [LV+2], max_occ = 0, n_ringwrap = 0;
  initial for (int l = 0; l < LV + 2; l++) begin fb_lv[l] = 0; occ[l] = 0; end

  initial begin
    total_expected = 0;
    for (int lv = 1; lv <= LV; lv++) total_expected += NIMG * (W >> lv) * (H >> lv) * 4;
    for (int lv = 0; lv <= LV; lv++) out_img[lv] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (first_in_cyc < 0) first_in_cyc = cyc;
      in_count++;
    end
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_bp++;
    if (st_flushing && !prev_flush) n_flush++;
    if (st_issue && st_level > 1) begin
      automatic int l = int'(st_level);
      n_feedback++;
      if (in_count % (W * H) != 0) n_interleave++;
      fb_lv[l]++;
      if (fb_lv[l] % (W >> (l - 2)) == 0) n_ringwrap++;
      occ[l - 1]--;
    end
    if (out_valid && out_ready && out_band == BAND_LL && int'(out_level) < LV) begin
      automatic int l = int'(out_level);
      occ[l]++;
      if (occ[l] > max_occ) max_occ = occ[l];
      checks++;
      if (occ[l] > (W >> (l - 1))) begin
        failures++;
        $display("ERROR: %0d LL words of level %0d waiting, ring holds %0d", occ[l], l, W >> (l - 1));
      end
    end
    prev_flush = st_flushing;

    if (out_valid && out_ready) begin
      automatic int lv = int'(out_level);
      automatic int n;
      if (first_out_cyc < 0) first_out_cyc = cyc;
      out_cnt++;
      checks++;
      if (lv < 1 || lv > LV || int'(out_row) >= (H >> lv) || int'(out_col) >= (W >> lv)) begin
        failures++;
        $display("ERROR: bad tag level=%0d row=%0d col=%0d", lv, out_row, out_col);
      end else begin
        n = out_img[lv];
        if (n >= NIMG) begin
          failures++;
          $display("ERROR: extra output at level %0d", lv);
        end else begin
          if (seen[n][lv][out_band][out_row][out_col]) begin
            failures++;
            $display("ERROR: duplicate img %0d L%0d %s (%0d,%0d)", n, lv, out_band.name(), out_row, out_col);
          end
          seen[n][lv][out_band][out_row][out_col] = 1'b1;
          if (int'(out_data) != expv[n][lv][out_band][out_row][out_col]) begin
            failures++;
            if (failures < 10)
              $display("ERROR: img %0d L%0d %s (%0d,%0d) got %0d exp %0d", n, lv, out_band.name(),
                       out_row, out_col, out_data, expv[n][lv][out_band][out_row][out_col]);
          end
          if (out_data == 16'sh7fff || out_data == 16'sh8000) n_sat++;
          if (int'(out_col) == (W >> lv) - 1) n_hwrap++;
          if (int'(out_row) == (H >> lv) - 1) n_vwrap++;
          if (out_last && lv == LV && n == 0) img0_done_cyc = cyc;
          if (out_last) out_img[lv]++;
        end
      end
    end
  end

  task automatic expect_event(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("ERROR: mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, count);
  endtask

  initial begin
    wait (rst_n);
    while (out_cnt < total_expected && cyc < MAXCYC) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (out_cnt != total_expected) begin
      failures++;
      $display("ERROR: %0d outputs, expected %0d", out_cnt, total_expected);
    end
    checks++;
    if (first_out_cyc - first_in_cyc != 3 * W + 10) begin
      failures++;
      $display("ERROR: first-output latency %0d, expected %0d", first_out_cyc - first_in_cyc, 3 * W + 10);
    end
    checks++;
    if (img0_done_cyc - first_in_cyc > T_IMG0) begin
      failures++;
      $display("ERROR: first image took %0d cycles, bound %0d", img0_done_cyc - first_in_cyc, T_IMG0);
    end
    $display("mechanisms:");
    expect_event("output back-pressure cycles", n_bp);
    expect_event("input stall cycles", n_in_stall);
    expect_event("higher-level samples from Buffer 1", n_feedback);
    expect_event("  of them interleaved with level 1", n_interleave);
    expect_event("stage 2 boundary flushes", n_flush);
    expect_event("Buffer 1 ring wrap-arounds", n_ringwrap);
    expect_event("horizontal wrap outputs", n_hwrap);
    expect_event("vertical wrap outputs", n_vwrap);
    expect_event("saturated outputs", n_sat);
    $display("latency %0d cycles, first image complete after %0d cycles, %0d outputs in %0d cycles",
             first_out_cyc - first_in_cyc, img0_done_cyc - first_in_cyc, out_cnt, cyc);
    $display("at most %0d LL words waiting in one Buffer 1 ring", max_occ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (MAXCYC + 1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
