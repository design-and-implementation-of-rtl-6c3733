// tb_dwt_ctrl1 - self-checking test of control unit 1 (dwt_ctrl1).
//
// An 8 x 8, two-level instance. The test plays Buffer 1 (an 8-word ring
// with a one-clock read) and stage 2: it announces one level-1 LL word
// (ll_wr_valid) after every four level-1 tasks, as stage 2 would. It also
// takes the place of PU1 and checks every task it is offered, level by
// level: for each row, in order, the low- and high-pass windows x[2k..2k+3]
// (indices modulo the row length). Two images pass through both levels,
// the first without gaps and with PU1 always ready, the second with random
// input gaps and a random pu_ready. On every sample taken it checks the
// level schedule: after a level-1 sample a ready level-2 sample goes first,
// and after a level-2 sample a waiting image sample goes first.
module tb_dwt_ctrl1;
  import dwt_pkg::*;

  localparam int W = 8, H = 8, LV = 2, LVW = 2, B1AW = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0, in_ready;
  sample_t         in_data = '0;
  logic            b1_rd_en;
  logic [B1AW-1:0] b1_rd_addr;
  sample_t         b1_rd_data;
  logic            ll_wr_valid = 1'b0;
  logic [LVW-1:0]  ll_wr_level = '0;
  logic            pu_valid, pu_ready = 1'b1, pu_high;
  win_t            pu_win;
  logic [LVW-1:0]  pu_level, issue_level;
  logic            issue_valid;

  dwt_ctrl1 #(.IMG_W(W), .IMG_H(H), .LEVELS(LV)) dut (.*);

  int checks = 0, failures = 0;

  // Buffer 1 model
  int mem [8];
  always @(posedge clk) if (b1_rd_en) b1_rd_data <= sample_t'(mem[b1_rd_addr]);

  typedef struct { int w[4]; bit hi; int lvl; } task_t;
  task_t exp_q [2][$];
  int img [2][H][W];
  int llv [2][16];

  task automatic add_frame(int fr [H][W], int w, int h, int lvl);
    task_t t;
    for (int r = 0; r < h; r++)
      for (int k = 0; k < w / 2; k++)
        for (int b = 0; b < 2; b++) begin
          for (int i = 0; i < 4; i++) t.w[i] = fr[r][(2*k + i) % w];
          t.hi = bit'(b);
          t.lvl = lvl;
          exp_q[lvl-1].push_back(t);
        end
  endtask

  int ntask = 0, l1_tasks = 0;
  bit random_mode = 1'b0;

  initial begin
    int f [H][W];
    for (int n = 0; n < 2; n++) begin
      for (int a = 0; a < 16; a++) llv[n][a] = int'($urandom_range(65535)) - 32768;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[n][r][c] = int'($urandom_range(65535)) - 32768;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) f[r][c] = img[n][r][c];
      add_frame(f, W, H, 1);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) f[r][c] = llv[n][r*4 + c];
      add_frame(f, 4, 4, 2);
    end
  end

  // image driver (falling edges)
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2; n++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          if (n == 1) while ($urandom_range(2) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_data = sample_t'(img[n][r][c]);
          while (!in_ready) @(negedge clk);
        end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(posedge clk) if (random_mode) pu_ready <= ($urandom_range(2) != 0);

  // stage-2 stand-in: one LL word of level 1 per four level-1 tasks
  initial begin
    for (int a = 0; a < 32; a++) begin
      wait (l1_tasks >= 64 * (a / 16) + 4 * (a % 16 + 1));
      if (a == 16) random_mode = 1'b1;
      @(negedge clk);
      mem[a % 8] = llv[a / 16][a % 16];
      ll_wr_valid = 1'b1;
      ll_wr_level = 2'd1;
      @(negedge clk);
      ll_wr_valid = 1'b0;
    end
  end

  // level schedule
  int tb_avail = 0, prev_lvl = 0, n_l2_first = 0, n_l1_first = 0;
  always @(posedge clk) if (rst_n) begin
    if (issue_valid) begin
      if (prev_lvl == 1 && tb_avail > 0) begin
        checks++;
        n_l2_first++;
        if (issue_level != 2'd2) begin
          failures++;
          $display("ERROR: level-1 sample taken although a level-2 sample was ready");
        end
      end
      if (prev_lvl == 2 && in_valid) begin
        checks++;
        n_l1_first++;
        if (issue_level != 2'd1) begin
          failures++;
          $display("ERROR: level-2 sample taken although an image sample was waiting");
        end
      end
      prev_lvl = int'(issue_level);
    end
    tb_avail += int'(ll_wr_valid) - int'(issue_valid && issue_level == 2'd2);
  end

  always @(posedge clk) if (rst_n && pu_valid && pu_ready) begin
    task_t e;
    checks++;
    ntask++;
    if (pu_level < 2'd1 || pu_level > 2'd2 || exp_q[pu_level - 1].size() == 0) begin
      failures++;
      $display("ERROR: unexpected task");
    end else begin
      e = exp_q[pu_level - 1].pop_front();
      if (pu_level == 2'd1) l1_tasks++;
      if (int'(pu_level) != e.lvl || pu_high != e.hi ||
          int'(pu_win[0]) != e.w[0] || int'(pu_win[1]) != e.w[1] ||
          int'(pu_win[2]) != e.w[2] || int'(pu_win[3]) != e.w[3]) begin
        failures++;
        $display("ERROR: task %0d: level %0d high %0d win %0d %0d %0d %0d; expected level %0d high %0d win %0d %0d %0d %0d",
                 ntask, pu_level, pu_high, pu_win[0], pu_win[1], pu_win[2], pu_win[3],
                 e.lvl, e.hi, e.w[0], e.w[1], e.w[2], e.w[3]);
      end
    end
  end

  initial begin
    wait (ntask == 160);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0 || n_l2_first == 0 || n_l1_first == 0) begin
      failures++;
      $display("ERROR: %0d+%0d tasks missing; schedule cases seen %0d, %0d",
               exp_q[0].size(), exp_q[1].size(), n_l2_first, n_l1_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired after %0d tasks", ntask);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
