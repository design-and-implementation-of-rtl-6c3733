// tb_dwt_ctrl2 - self-checking test of control unit 2 (dwt_ctrl2), run as
// stage 2 together with Buffer 2 and a PU.
//
// An 8 x 8, two-level instance is sent three frames of horizontal
// coefficients, each in raster order: a level-1 frame with a level-2 frame
// interleaved into it (one level-2 sample after every four level-1 ones),
// then a second level-1 frame, with random gaps and random out_ready.
// Every output must carry a valid tag and equal the vertical filter of its
// column, round(sum c[i]*f[(2k+i) mod h][p]) with p = 2*col + horizontal
// band, each exactly once. Level-1 LL results must also be written to
// Buffer 1 at (row*4+col) mod 8 (the 8-word ring) and announced on ll_wr_*, level-2 ones not.
module tb_dwt_ctrl2;
  import dwt_pkg::*;

  localparam int W = 8, H = 8, LV = 2, LVW = 2, B1AW = 3, ORW = 2, OCW = 2;
  localparam int TAGW = 1 + LVW + 2 + ORW + OCW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0, in_ready;
  sample_t         in_data = '0;
  logic [LVW-1:0]  in_level = '0;
  logic [3:0]      b2_col;
  logic            b2_push;
  logic [1:0]      b2_first_we;
  sample_t         b2_din;
  win_t            b2_rows;
  sample_t         b2_first [2];
  logic            pu_valid, pu_ready, pu_high;
  win_t            pu_win;
  logic [TAGW-1:0] pu_tag, res_tag;
  logic            res_valid, res_ready;
  sample_t         res_data;
  logic            out_valid, out_ready = 1'b1;
  sample_t         out_data;
  logic [LVW-1:0]  out_level;
  band_t           out_band;
  logic [ORW-1:0]  out_row;
  logic [OCW-1:0]  out_col;
  logic            out_last;
  logic            b1_wr_en;
  logic [B1AW-1:0] b1_wr_addr;
  sample_t         b1_wr_data;
  logic            ll_wr_valid;
  logic [LVW-1:0]  ll_wr_level;
  logic            flushing;

  dwt_ctrl2 #(.IMG_W(W), .IMG_H(H), .LEVELS(LV)) dut (.*);

  dwt_buf2 #(.COLS(W + W / 2), .PW(4)) u_buf2 (
    .clk(clk), .col(b2_col), .push(b2_push), .first_we(b2_first_we), .din(b2_din),
    .rows(b2_rows), .first(b2_first));

  dwt_pu #(.TAGW(TAGW)) u_pu (
    .clk(clk), .rst_n(rst_n), .in_valid(pu_valid), .in_ready(pu_ready), .in_win(pu_win),
    .in_high(pu_high), .in_tag(pu_tag), .out_valid(res_valid), .out_ready(res_ready),
    .out_data(res_data), .out_tag(res_tag));

  int checks = 0, failures = 0;

  localparam int HT [4] = '{7913, 13705, 3672, -2120};
  localparam int GT [4] = '{-2120, -3672, 13705, -7913};
  localparam int FL [3] = '{1, 2, 1};

  int frame [3][H][W];
  int expv  [3][4][H/2][W/2];
  bit seen  [3][4][H/2][W/2];

  function automatic int rsat(longint acc);
    longint r = (acc + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    for (int f = 0; f < 3; f++) begin
      automatic int w = W >> (FL[f] - 1), h = H >> (FL[f] - 1);
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) frame[f][r][c] = int'($urandom_range(8191)) - 4096;
      for (int hb = 0; hb < 2; hb++)
        for (int vb = 0; vb < 2; vb++)
          for (int k = 0; k < h / 2; k++)
            for (int q = 0; q < w / 2; q++) begin
              longint acc;
              acc = 0;
              for (int i = 0; i < 4; i++)
                acc += longint'((vb != 0) ? GT[i] : HT[i]) * frame[f][(2*k + i) % h][2*q + hb];
              expv[f][hb*2 + vb][k][q] = rsat(acc);
            end
    end
  end

  // send order: frame 1 (level 2) interleaved into frame 0, then frame 2
  typedef struct { int f; int r; int c; } item_t;
  item_t seq[$];
  initial begin
    int n1 = 0;
    for (int i = 0; i < H * W; i++) begin
      seq.push_back('{0, i / W, i % W});
      if (i % 4 == 3 && n1 < 16) begin
        seq.push_back('{1, n1 / 4, n1 % 4});
        n1++;
      end
    end
    for (int i = 0; i < H * W; i++) seq.push_back('{2, i / W, i % W});
  end

  // driver (falling edges)
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (seq[i]) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = sample_t'(frame[seq[i].f][seq[i].r][seq[i].c]);
      in_level = LVW'(FL[seq[i].f]);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(posedge clk) out_ready <= ($urandom_range(3) != 0);

  int nout = 0, ndone = 0, nwr = 0;
  int lvl_frames [2] = '{0, 0};   // frames finished per level
  function automatic int frame_of(int lv, int k);
    return (lv == 2) ? 1 : (k == 0 ? 0 : 2);
  endfunction
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int lv, cur_f;
      lv = int'(out_level);
      cur_f = (lv == 1 || lv == 2) ? frame_of(lv, lvl_frames[lv - 1]) : 3;
      nout++;
      checks++;
      if (cur_f > 2 || lv != FL[cur_f] || int'(out_row) >= (H >> lv) || int'(out_col) >= (W >> lv)) begin
        failures++;
        $display("ERROR: bad output tag level %0d row %0d col %0d", lv, out_row, out_col);
      end else begin
        if (seen[cur_f][out_band][out_row][out_col]) begin
          failures++;
          $display("ERROR: duplicate output");
        end
        seen[cur_f][out_band][out_row][out_col] = 1'b1;
        if (int'(out_data) != expv[cur_f][out_band][out_row][out_col]) begin
          failures++;
          $display("ERROR: frame %0d %s (%0d,%0d) got %0d expected %0d", cur_f, out_band.name(),
                   out_row, out_col, out_data, expv[cur_f][out_band][out_row][out_col]);
        end
        checks++;
        if (b1_wr_en != (out_band == BAND_LL && lv == 1) ||
            (b1_wr_en && (int'(b1_wr_addr) != (int'(out_row) * 4 + int'(out_col)) % 8 || b1_wr_data != out_data))) begin
          failures++;
          $display("ERROR: Buffer 1 write wrong for frame %0d %s (%0d,%0d)", cur_f, out_band.name(), out_row, out_col);
        end
        if (b1_wr_en) nwr++;
        checks++;
        if (ll_wr_valid != b1_wr_en || (ll_wr_valid && ll_wr_level != out_level)) begin
          failures++;
          $display("ERROR: LL write notice wrong");
        end
        if (out_last) begin
          lvl_frames[lv - 1]++;
          ndone++;
        end
      end
    end else if (ll_wr_valid || b1_wr_en) begin
      failures++;
      $display("ERROR: LL write without an output");
    end
  end

  initial begin
    wait (ndone == 3);
    repeat (10) @(posedge clk);
    checks++;
    if (nout != 64 + 16 + 64 || nwr != 32) begin
      failures++;
      $display("ERROR: %0d outputs (expected 144), %0d Buffer 1 writes (expected 32)", nout, nwr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired after %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
