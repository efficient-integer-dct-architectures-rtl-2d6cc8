// tbuf_fullpar: N x N transposition buffer of the full-parallel 2-D DCT.
//
// An array of register cells (tbuf_rc) that is read and written one line per
// cycle, where a line is a row (dir_row = 1) or a column (dir_row = 0). In a
// step the old contents of line idx appear on rd_data and the new vector is
// stored into the same line at the clock edge, so reading and writing go on
// concurrently. If one block is written column by column, reading row by row
// returns its transpose while the next block is written row by row, and so
// on, the direction alternating every N steps. The document describes the
// buffer and its alternation; the N (2N-1):1 output multiplexers are built
// here as an N:1 row pick and an N:1 column pick followed by a 2:1 choice.
//
// Interface: rd_data[p] / wr_data[p] is element p along the line (the column
// index in a row, the row index in a column).
// Timing: write at the rising clock edge when step is high; rd_data is
// combinational from the registers, idx and dir_row.
module tbuf_fullpar #(
  parameter int unsigned N  = 32,
  parameter int unsigned DW = 21
) (
  input  logic                     clk,
  input  logic                     step,
  input  logic                     dir_row,
  input  logic [$clog2(N)-1:0]     idx,
  input  logic signed [DW-1:0]     wr_data [N],
  output logic signed [DW-1:0]     rd_data [N]
);

  logic signed [DW-1:0] q [N][N];   // q[row][column]

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic load;
      assign load = step && (dir_row ? (idx == i) : (idx == j));
      tbuf_rc #(.DW(DW)) u_rc (
        .clk    (clk),
        .load   (load),
        .dir_row(dir_row),
        .d_row  (wr_data[j]),   // writing row i: element j is column j
        .d_col  (wr_data[i]),   // writing column j: element i is row i
        .q      (q[i][j])
      );
    end
  end

  // output multiplexer p: the cell on row p (in the selected column) or on
  // column p (in the selected row)
  always_comb
    for (int p = 0; p < N; p++)
      rd_data[p] = dir_row ? q[idx][p] : q[p][idx];

endmodule
