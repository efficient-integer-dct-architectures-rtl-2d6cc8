// dct_n: generalized N-point HEVC integer DCT (N = 8, 16 or 32).
//
// The even coefficients of an N-point DCT are the (N/2)-point DCT of the
// folded sums a(i) = x(i) + x(N-1-i); the odd coefficients are a constant
// (N/2)x(N/2) matrix times the differences b(i) = x(i) - x(N-1-i). The unit is
// therefore an input adder unit (IAU), an (N/2)-point DCT (this module again,
// down to dct4), N/2 shift-add units (SAU, one per b(i)) and an output adder
// unit (OAU) with an adder tree of log2(N)-1 levels. This is the structure the
// document proposes; the recursion that builds it is how this RTL expresses it.
//
// Interface: x[0..N-1] signed W bits, y[0..N-1] signed OW bits in natural
// coefficient order (y[k] = sum_n c_N[k][n] x[n], exact for OW >= W+12).
// Timing: purely combinational.
//
// Lint note: the module instantiates itself for the even half. Verilator's
// lint of the unparameterized module reports 'ye' as undriven because it
// does not follow the recursive instance; the elaborated design drives it
// (the testbench checks every output against a direct matrix product).
module dct_n
  import dct_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned W  = 9,
  parameter int unsigned OW = W + GROW
) (
  input  logic signed [W-1:0]  x [N],
  output logic signed [OW-1:0] y [N]
);

  localparam int unsigned H = N / 2;

  logic signed [OW-1:0] xe [N];
  logic signed [OW-1:0] a  [H];
  logic signed [OW-1:0] b  [H];
  logic signed [OW-1:0] t  [H][H];
  logic signed [OW-1:0] ye [H];
  logic signed [OW-1:0] yo [H];

  always_comb
    for (int i = 0; i < N; i++) xe[i] = OW'(x[i]);

  dct_iau #(.N(N), .DW(OW)) u_iau (.x(xe), .a(a), .b(b));

  // even half: (N/2)-point DCT of a
  if (H == 4) begin : g_even4
    dct4 #(.W(OW), .OW(OW)) u_even (.x(a), .y(ye));
  end else begin : g_even
    dct_n #(.N(H), .W(OW), .OW(OW)) u_even (.x(a), .y(ye));
  end

  // odd half: SAUs and OAU
  for (genvar i = 0; i < H; i++) begin : g_sau
    dct_sau #(.N(N), .DW(OW)) u_sau (.b(b[i]), .t(t[i]));
  end

  dct_oau #(.N(N), .DW(OW)) u_oau (.t(t), .yo(yo));

  always_comb
    for (int k = 0; k < H; k++) begin
      y[2*k]   = ye[k];
      y[2*k+1] = yo[k];
    end

endmodule
