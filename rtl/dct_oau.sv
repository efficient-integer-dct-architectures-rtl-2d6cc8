// dct_oau: output adder unit of the N-point integer DCT (stage 3).
//
// Forms the odd coefficients y(2k+1) = sum_i c_N[2k+1][i] * b(i). Every
// product needed is already available from the shift-add units as
// t[i][j] = b(i) * c_N[2j+1][0]; entry (2k+1, i) of the HEVC matrix equals
// +/- one of those constants, and dct_pkg::oau_sel/oau_neg pick which and with
// which sign at elaboration. The N/2 signed terms of each coefficient are then
// summed in a binary adder tree of log2(N)-1 levels, as the document describes.
//
// Interface: t is indexed [i][j] (sample i, constant j); yo[k] = y(2k+1).
// Timing: purely combinational.
module dct_oau
  import dct_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned DW = 21
) (
  input  logic signed [DW-1:0] t  [N/2][N/2],
  output logic signed [DW-1:0] yo [N/2]
);

  localparam int unsigned H    = N / 2;
  localparam int unsigned LVLS = $clog2(H);   // log2(N) - 1 adder levels

  for (genvar k = 0; k < H; k++) begin : g_row
    logic [H-1:0] neg;
    int unsigned  sel [H];

    for (genvar i = 0; i < H; i++) begin : g_term
      assign neg[i] = oau_neg(N, k, i);
      assign sel[i] = oau_sel(N, k, i);
    end

    // level 0 holds the signed terms; level l adds pairs of level l-1
    always_comb begin
      logic signed [DW-1:0] node [H];
      for (int i = 0; i < H; i++)
        node[i] = neg[i] ? -t[i][sel[i]] : t[i][sel[i]];
      for (int l = 1; l <= LVLS; l++)
        for (int n = 0; n < (H >> l); n++)
          node[n] = node[2*n] + node[2*n+1];
      yo[k] = node[0];
    end
  end

endmodule
