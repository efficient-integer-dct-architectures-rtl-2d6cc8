// tbuf_folded: N x N register transposition buffer of the folded 2-D DCT.
//
// N*N registers in N rows and N columns. A write stores an N-vector into one
// column, the column whose enable EN_j (wr_en[j]) is high; a read selects one
// row through N N:1 multiplexers. Writing the column results of the first
// 1-D pass and reading rows afterwards transposes the block. This is the
// buffer the document describes; the data registers have no reset because
// every register is written before it is read.
//
// Interface: wr_en one-hot column enables, wr_col[i] is the value for row i;
// rd_row_sel chooses the row, rd_row[j] is the value in column j.
// Timing: write at the rising clock edge; the read path is combinational
// from the registers.
module tbuf_folded #(
  parameter int unsigned N  = 32,
  parameter int unsigned DW = 21
) (
  input  logic                     clk,
  input  logic [N-1:0]             wr_en,
  input  logic signed [DW-1:0]     wr_col [N],
  input  logic [$clog2(N)-1:0]     rd_row_sel,
  output logic signed [DW-1:0]     rd_row [N]
);

  logic signed [DW-1:0] r [N][N];   // r[row][column]

  always_ff @(posedge clk)
    for (int j = 0; j < N; j++)
      if (wr_en[j])
        for (int i = 0; i < N; i++) r[i][j] <= wr_col[i];

  always_comb
    for (int j = 0; j < N; j++) rd_row[j] = r[rd_row_sel][j];

endmodule
