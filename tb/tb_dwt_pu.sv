// tb_dwt_pu - self-checking test of the processing unit dwt_pu.
//
// Feeds random four-sample windows with random low/high selection and a
// running tag, first with a continuous input and the output always ready
// (checks the three-clock latency and one result per clock), then with
// random input gaps and random output back-pressure. Each result is compared
// with round(sum c[i]*x[i] / 2^14) saturated to 16 bits, computed here from
// the db2 taps, and must come out in order with its tag.
module tb_dwt_pu;
  import dwt_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 1'b0, in_ready, in_high = 1'b0;
  win_t       in_win = '0;
  logic [7:0] in_tag = '0;
  logic       out_valid, out_ready = 1'b1;
  sample_t    out_data;
  logic [7:0] out_tag;

  dwt_pu #(.TAGW(8)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int HT [4] = '{7913, 13705, 3672, -2120};
  localparam int GT [4] = '{-2120, -3672, 13705, -7913};

  typedef struct { int val; int tag; int cyc; } exp_t;
  exp_t q[$];

  function automatic int ref_out(win_t w, logic hi);
    longint acc = 0, r;
    for (int i = 0; i < 4; i++) acc += longint'(hi ? GT[i] : HT[i]) * longint'($signed(w[i]));
    r = (acc + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  int sent = 0, got = 0;
  bit phase2 = 1'b0;
  localparam int N1 = 200, N2 = 800;

  // driver on falling edges
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N1 + N2; n++) begin
      if (n >= N1) begin
        phase2 = 1'b1;
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < 4; i++)
        in_win[i] = (n % 7 == 0) ? sample_t'(($urandom_range(1) != 0) ? 16'sh7fff : 16'sh8000)
                                 : sample_t'($urandom_range(65535));
      in_high = 1'($urandom_range(1));
      in_tag  = 8'(n);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(posedge clk) if (phase2) out_ready <= ($urandom_range(2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) q.push_back('{ref_out(in_win, in_high), int'(in_tag), cyc});
    if (out_valid && out_ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output");
      end else begin
        e = q.pop_front();
        if (int'(out_data) != e.val || int'(out_tag) != e.tag) begin
          failures++;
          $display("ERROR: got %0d tag %0d, expected %0d tag %0d", out_data, out_tag, e.val, e.tag);
        end
        if (!phase2) begin
          checks++;
          if (cyc - e.cyc != 3) begin
            failures++;
            $display("ERROR: latency %0d, expected 3", cyc - e.cyc);
          end
        end
      end
      got++;
    end
  end

  initial begin
    wait (got == N1 + N2);
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("ERROR: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
