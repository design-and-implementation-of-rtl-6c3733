// dwt_pu - processing unit (PU) of one pipeline stage.
//
// Computes one db2 filter output per clock: y = round(sum_i c[i]*win[i]),
// with c = low-pass taps when in_high=0 and high-pass taps when in_high=1.
// The same unit serves stage 1 (horizontal) and stage 2 (vertical); only the
// control units that feed it differ.
//
// Following the design's intra-stage parallelism, the 4-tap filtering is split
// into two independent 2-tap subtasks, (c0*x0 + c1*x1) and (c2*x2 + c3*x3),
// that run side by side on four multipliers and two adders; a final adder
// joins the two partial sums and the result is rounded and saturated to
// 16 bits. Three register stages: products, partial sums, result.
//
// Interface: valid/ready on both sides. The whole pipe advances when the
// output is empty or accepted (in_ready = !out_valid || out_ready), so a
// stall at the output holds every stage. in_tag rides along unchanged and
// leaves with its result, three accepted cycles later.
module dwt_pu
  import dwt_pkg::*;
#(
  parameter int TAGW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  win_t             in_win,
  input  logic             in_high,
  input  logic [TAGW-1:0]  in_tag,
  output logic             out_valid,
  input  logic             out_ready,
  output sample_t          out_data,
  output logic [TAGW-1:0]  out_tag
);

  logic en;
  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  // stage 1: four products
  logic signed [31:0] prod_q [TAPS];
  logic               v1;
  logic [TAGW-1:0]    tag1;

  // stage 2: two partial sums (the two subtasks)
  logic signed [32:0] part_a, part_b;
  logic               v2;
  logic [TAGW-1:0]    tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
      for (int i = 0; i < TAPS; i++) prod_q[i] <= '0;
      part_a    <= '0;
      part_b    <= '0;
      out_data  <= '0;
      tag1      <= '0;
      tag2      <= '0;
      out_tag   <= '0;
    end else if (en) begin
      v1 <= in_valid;
      tag1 <= in_tag;
      for (int i = 0; i < TAPS; i++)
        prod_q[i] <= 32'($signed(in_win[i])) * 32'(in_high ? G_TAP[i] : H_TAP[i]);
      v2     <= v1;
      tag2   <= tag1;
      part_a <= 33'(prod_q[0]) + 33'(prod_q[1]);
      part_b <= 33'(prod_q[2]) + 33'(prod_q[3]);
      out_valid <= v2;
      out_tag   <= tag2;
      out_data  <= round_sat(36'(part_a) + 36'(part_b));
    end
  end

endmodule
