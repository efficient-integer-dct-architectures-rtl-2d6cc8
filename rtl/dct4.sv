// dct4: 4-point HEVC integer DCT.
//
// Stage 1 (IAU): a(0)=x0+x3, a(1)=x1+x2, b(0)=x0-x3, b(1)=x1-x2.
// Stage 2: two shift-add units form 83*b(i) and 36*b(i); the products by 64
// of a(0) and a(1) are plain wiring (a left shift by 6).
// Stage 3 (OAU): y0 = 64a0 + 64a1, y2 = 64a0 - 64a1, y1 = 83b0 + 36b1,
// y3 = 36b0 - 83b1. This is the structure the document gives for the
// four-point unit; it is also the leaf of the larger units.
//
// Interface: x[0..3] signed W bits, y[0..3] signed OW bits in natural order.
// Internal arithmetic is OW bits wide, so results are exact for OW >= W+8.
// Timing: purely combinational.
module dct4
  import dct_pkg::*;
#(
  parameter int unsigned W  = 9,
  parameter int unsigned OW = W + GROW
) (
  input  logic signed [W-1:0]  x [4],
  output logic signed [OW-1:0] y [4]
);

  logic signed [OW-1:0] xe [4];
  logic signed [OW-1:0] a  [2];
  logic signed [OW-1:0] b  [2];
  logic signed [OW-1:0] t  [2][2];
  logic signed [OW-1:0] yo [2];

  always_comb
    for (int i = 0; i < 4; i++) xe[i] = OW'(x[i]);

  dct_iau #(.N(4), .DW(OW)) u_iau (.x(xe), .a(a), .b(b));

  for (genvar i = 0; i < 2; i++) begin : g_sau
    dct_sau #(.N(4), .DW(OW)) u_sau (.b(b[i]), .t(t[i]));
  end

  dct_oau #(.N(4), .DW(OW)) u_oau (.t(t), .yo(yo));

  assign y[0] = (a[0] <<< 6) + (a[1] <<< 6);
  assign y[2] = (a[0] <<< 6) - (a[1] <<< 6);
  assign y[1] = yo[0];
  assign y[3] = yo[1];

endmodule
