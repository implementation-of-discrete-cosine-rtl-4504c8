// transpose_buffer: 8 x 8 word array between the two 1-D DCT passes.
//
// The row transform delivers all eight results of one row at once; they are
// written as row wr_row (element l into column l). The column transform then
// reads one column at a time: rd_data[r] is the word in row r of column
// rd_col. Reading a column of what was written as rows is the transposition.
//
// Timing: a write takes effect at the clock edge; the column read is
// combinational (the array is flip-flops). The array is not reset: the
// controller writes all eight rows before it reads any column.
// The document describes this buffer by its function; the register-array
// organisation and the one-row-per-write port are this design's choice.
module transpose_buffer #(
  parameter int W = dct_pkg::TB_W    // word width
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [2:0]          wr_row,
  input  logic signed [W-1:0] wr_data [8],
  input  logic [2:0]          rd_col,
  output logic signed [W-1:0] rd_data [8]
);
  logic signed [W-1:0] mem [8][8];   // mem[row][col]

  always_ff @(posedge clk)
    if (wr_en)
      for (int l = 0; l < 8; l++) mem[wr_row][l] <= wr_data[l];

  always_comb
    for (int r = 0; r < 8; r++) rd_data[r] = mem[r][rd_col];

endmodule
