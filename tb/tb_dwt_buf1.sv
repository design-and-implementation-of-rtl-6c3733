// tb_dwt_buf1 - self-checking test of Buffer 1 (dwt_buf1).
//
// Fills a 64-word instance with random words, then reads every address back
// and checks that rd_data shows mem[addr] one clock after rd_en and that it
// holds while rd_en is low. A last pass writes and reads different addresses
// in the same clock, as the level feedback does, and checks both.
module tb_dwt_buf1;
  import dwt_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = 6;

  logic          clk = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  sample_t       wr_data = '0, rd_data;

  dwt_buf1 #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  int model [DEPTH];

  task automatic check(int exp, string what);
    checks++;
    if (int'(rd_data) != exp) begin
      failures++;
      $display("ERROR: %s: got %0d expected %0d", what, rd_data, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a);
      wr_data = sample_t'($urandom_range(65535));
      model[a] = int'(wr_data);
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      check(model[a], "read");
      rd_en = 1'b0; rd_addr = AW'(a ^ 1);
      @(negedge clk);
      check(model[a], "hold");
    end
    // write behind the read, same clock
    for (int a = 8; a < DEPTH; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      wr_en = 1'b1; wr_addr = AW'(a - 8);
      wr_data = sample_t'($urandom_range(65535));
      model[a - 8] = int'(wr_data);
      @(negedge clk);
      check(model[a], "read beside write");
    end
    wr_en = 1'b0;
    for (int a = 0; a < DEPTH - 8; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      check(model[a], "read back");
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
