// tbuf_rc: register cell of the full-parallel transposition buffer.
//
// One register with a 2:1 multiplexer at its input: it takes its row's
// input (dir_row = 1, the cell is in the row being written) or its column's
// input (dir_row = 0) when its load enable is high, and holds otherwise.
// Follows the register cell the document describes.
//
// Timing: loads at the rising clock edge; q is the register output.
module tbuf_rc #(
  parameter int unsigned DW = 21
) (
  input  logic                 clk,
  input  logic                 load,
  input  logic                 dir_row,
  input  logic signed [DW-1:0] d_row,
  input  logic signed [DW-1:0] d_col,
  output logic signed [DW-1:0] q
);

  always_ff @(posedge clk)
    if (load) q <= dir_row ? d_row : d_col;

endmodule
