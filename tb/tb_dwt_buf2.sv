// tb_dwt_buf2 - self-checking test of Buffer 2 (dwt_buf2).
//
// Pushes random rows into an 8-column instance, marking the first two rows
// with first_we, and after every push checks, on a random column, that rows
// holds that column's last four pushed values (oldest in rows[0]) and that
// first holds its rows 0 and 1.
module tb_dwt_buf2;
  import dwt_pkg::*;

  localparam int COLS = 8;

  logic          clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]    col = '0;
  logic          push = 1'b0;
  logic [1:0]    first_we = '0;
  sample_t       din = '0;
  win_t          rows;
  sample_t       first [2];

  dwt_buf2 #(.COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  int hist [COLS][$];
  int head [COLS][2];

  initial begin
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        col = 3'(c); push = 1'b1;
        din = sample_t'($urandom_range(65535));
        first_we = (r == 0) ? 2'b01 : (r == 1) ? 2'b10 : 2'b00;
        hist[c].push_back(int'(din));
        if (r < 2) head[c][r] = int'(din);
        @(negedge clk);
        push = 1'b0; first_we = '0;
        col = 3'($urandom_range(COLS - 1));
        #1;
        if (hist[col].size() >= 4) begin
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (int'(rows[i]) != hist[col][hist[col].size() - 4 + i]) begin
              failures++;
              $display("ERROR: col %0d rows[%0d] got %0d", col, i, rows[i]);
            end
          end
          for (int i = 0; i < 2; i++) begin
            checks++;
            if (int'(first[i]) != head[col][i]) begin
              failures++;
              $display("ERROR: col %0d first[%0d] got %0d", col, i, first[i]);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
