// dwt_buf1 - Buffer 1: the level feedback store in front of stage 1.
//
// Holds the LL (approximation) sub-band that stage 2 produces at level j and
// gives it back, one word per read, as the input of level j+1. One write port
// (from the stage-2 output) and one read port (from control unit 1). Reads are
// synchronous with an enable: rd_data changes only on a clock edge with
// rd_en=1, and otherwise holds, so the read register doubles as the 16-bit
// input register of stage 1.
//
// The array is split into one ring per fed-back level: the LL of level j
// goes, in the raster order it is produced, into a ring of IMG_W >> (j-1)
// words (two LL rows) at base ll_base(IMG_W, j). The addressing (write and
// read pointers) lives in the two control units; this block is only the
// memory. Because level j+1 takes its samples almost as soon as they are
// written, a ring never holds more than about one LL row; at 256 x 256 with
// two levels at most 129 of the 256 words are ever waiting.
module dwt_buf1
  import dwt_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  sample_t       wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output sample_t       rd_data
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
