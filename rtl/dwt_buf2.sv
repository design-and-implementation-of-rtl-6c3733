// dwt_buf2 - Buffer 2: the column line buffer between stage 1 and stage 2.
//
// For every column p of the stage-1 output (horizontal L and H coefficients
// interleaved, p = 2k + band) it keeps the four most recent rows, oldest
// first, in rows[0..3], and separately the first two rows of the frame in
// first[0..1], which the periodic extension needs for the last vertical
// output. A push of din into column col shifts that column's entry by one
// row. first_we[i] writes din as row i of the frame.
//
// Reads are combinational on the same column address col, so control unit 2
// can read a column's history and push the new sample in the same cycle
// (read before write). Storage: COLS x 4 words plus COLS x 2 words. In the
// top level the columns are split into one region per level (IMG_W columns
// for level 1, IMG_W/2 for level 2, ...), so levels being filtered at the
// same time never share a column entry.
module dwt_buf2
  import dwt_pkg::*;
#(
  parameter int COLS = 256,
  parameter int PW   = $clog2(COLS)
) (
  input  logic          clk,
  input  logic [PW-1:0] col,
  input  logic          push,
  input  logic [1:0]    first_we,
  input  sample_t       din,
  output win_t          rows,
  output sample_t       first [2]
);

  win_t                 hist [COLS];
  sample_t [1:0]        head [COLS];

  assign rows     = hist[col];
  assign first[0] = head[col][0];
  assign first[1] = head[col][1];

  always_ff @(posedge clk) begin
    if (push) hist[col] <= {din, hist[col][3], hist[col][2], hist[col][1]};
    if (first_we[0]) head[col][0] <= din;
    if (first_we[1]) head[col][1] <= din;
  end

endmodule
