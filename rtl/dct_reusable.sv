// dct_reusable: reusable N-point HEVC integer DCT (N = 8, 16 or 32).
//
// One N-point, two N/2-point, ... or N/4 four-point transforms per cycle,
// selected by the mode m, so N coefficients come out every cycle whatever the
// size. The structure is the one the document proposes:
//  * two (N/2)-point units, themselves reusable units down to dct4;
//  * N/2 2:1 multiplexers in front of the first unit choose the IAU sums
//    a(i) (N-point mode) or the samples x(0..N/2-1) (smaller sizes);
//  * N/2 AND gates clear the input of the second unit in N-point mode, and
//    N AND gates clear the IAU input in the smaller sizes (data gating: the
//    unused logic sees constant zeros and does not toggle);
//  * the SAUs and the OAU give the odd coefficients; their outputs are
//    multiplexed with those of the second unit;
//  * dct_ctrl derives sel1 (N-point mode) and the sub-unit mode sel2.
//
// Output lanes: y[0..N/2-1] are the first unit's lanes, y[N/2..N-1] are the
// odd coefficients y(1), y(3), ... in N-point mode and the second unit's
// lanes otherwise. dct_pkg::lane_seg/lane_coef give the segment and
// coefficient index of every lane. No reordering network is added.
//
// Interface: m (2 bits), x[0..N-1] signed W bits, y[0..N-1] signed OW bits.
// Timing: purely combinational.
//
// Lint note: the two half-size units are this module again. Verilator's lint
// of the unparameterized module reports 'y1' and 'y2' as undriven because it
// does not follow the recursive instances; the elaborated design drives them
// (the testbench checks every lane in every mode). For N = 8 the sub-units
// are dct4 leaves and sel2 is unused.
module dct_reusable
  import dct_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned W  = 9,
  parameter int unsigned OW = W + GROW
) (
  input  logic [1:0]           m,
  input  logic signed [W-1:0]  x [N],
  output logic signed [OW-1:0] y [N]
);

  localparam int unsigned H = N / 2;

  logic                 sel1;
  logic [1:0]           sel2;
  logic signed [OW-1:0] xg  [N];   // gated IAU input
  logic signed [OW-1:0] a   [H];
  logic signed [OW-1:0] b   [H];
  logic signed [OW-1:0] t   [H][H];
  logic signed [OW-1:0] yo  [H];
  logic signed [OW-1:0] in1 [H];   // first (N/2)-point unit input
  logic signed [OW-1:0] in2 [H];   // second (N/2)-point unit input
  logic signed [OW-1:0] y1  [H];
  logic signed [OW-1:0] y2  [H];

  dct_ctrl #(.N(N)) u_ctrl (.m(m), .sel1(sel1), .sel2(sel2));

  always_comb begin
    for (int i = 0; i < N; i++) xg[i] = OW'(x[i]) & {OW{sel1}};
    for (int i = 0; i < H; i++) begin
      in1[i] = sel1 ? a[i] : OW'(x[i]);
      in2[i] = OW'(x[H+i]) & {OW{~sel1}};
    end
  end

  dct_iau #(.N(N), .DW(OW)) u_iau (.x(xg), .a(a), .b(b));

  for (genvar i = 0; i < H; i++) begin : g_sau
    dct_sau #(.N(N), .DW(OW)) u_sau (.b(b[i]), .t(t[i]));
  end

  dct_oau #(.N(N), .DW(OW)) u_oau (.t(t), .yo(yo));

  if (H == 4) begin : g_sub4
    dct4 #(.W(OW), .OW(OW)) u_sub1 (.x(in1), .y(y1));
    dct4 #(.W(OW), .OW(OW)) u_sub2 (.x(in2), .y(y2));
  end else begin : g_sub
    dct_reusable #(.N(H), .W(OW), .OW(OW)) u_sub1 (.m(sel2), .x(in1), .y(y1));
    dct_reusable #(.N(H), .W(OW), .OW(OW)) u_sub2 (.m(sel2), .x(in2), .y(y2));
  end

  always_comb
    for (int k = 0; k < H; k++) begin
      y[k]   = y1[k];
      y[H+k] = sel1 ? yo[k] : y2[k];
    end

endmodule
