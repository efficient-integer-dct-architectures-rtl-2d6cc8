// dct_sau: shift-add unit of the N-point integer DCT.
//
// Multiplies one butterfly difference b(i) by each of the N/2 constants that
// appear in the odd rows of the HEVC N-point matrix (N=4: 83, 36; N=8: 89, 75,
// 50, 18; N=16 and 32 likewise), using only shifts and adders as a multiplier-
// less multiple-constant multiplication. Each constant is expanded into
// canonical signed digits at elaboration (dct_pkg::csd_pos/csd_neg) and the
// shifted copies of b are added or subtracted. The document gives the unit's
// role and the constants; the digit expansion without sharing of partial sums
// between constants is this design's own choice.
//
// Interface: b is a signed DW-bit sample, t[j] = b * c_N[2j+1][0] modulo 2^DW.
// Timing: purely combinational.
module dct_sau
  import dct_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned DW = 21
) (
  input  logic signed [DW-1:0] b,
  output logic signed [DW-1:0] t [N/2]
);

  for (genvar j = 0; j < N / 2; j++) begin : g_const
    localparam int C = sau_const(N, j);
    localparam logic [CW:0] POS = csd_pos(C);
    localparam logic [CW:0] NEG = csd_neg(C);

    always_comb begin
      logic signed [DW-1:0] acc;
      acc = '0;
      for (int p = 0; p <= CW; p++) begin
        if (POS[p]) acc = acc + (b <<< p);
        if (NEG[p]) acc = acc - (b <<< p);
      end
      t[j] = acc;
    end
  end

endmodule
