// dct_ctrl: control unit of one level of the reusable N-point DCT.
//
// The mode m is log2(transform size) - 2 (00: 4-point, 01: 8, 10: 16,
// 11: 32). sel1 is high when this level computes its full N-point transform:
// it steers the input multiplexers of the first (N/2)-point unit to the
// folded sums a(i), enables the IAU/SAU/OAU path and gates the second
// (N/2)-point unit off. sel2 is the mode handed to the two (N/2)-point units:
// the same mode when they work on their own halves, the (N/2)-point mode when
// this level computes N points. For N = 8 only sel1 matters (the sub-units are
// 4-point leaves). The truth table follows the document's description of the
// control signals; the encoding of m for N = 8 and 16 inside a 2-bit field is
// this design's own.
//
// Interface: m in, sel1 and sel2 out. Timing: purely combinational.
module dct_ctrl
  import dct_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [1:0] m,
  output logic       sel1,
  output logic [1:0] sel2
);

  localparam logic [1:0] FULL = 2'($clog2(N) - 2);

  always_comb begin
    sel1 = (m == FULL);
    sel2 = sel1 ? FULL - 2'd1 : m;
  end

endmodule
