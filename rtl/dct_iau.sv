// dct_iau: input adder unit of the N-point integer DCT (stage 1).
//
// Folds the input vector about its centre: a(i) = x(i) + x(N-1-i) feeds the
// (N/2)-point DCT that yields the even coefficients, b(i) = x(i) - x(N-1-i)
// feeds the shift-add units that yield the odd ones. Arithmetic is modulo
// 2^DW; the enclosing unit chooses DW so that every final output is exact.
//
// Interface: x[0..N-1] in, a[0..N/2-1] and b[0..N/2-1] out, all signed DW bits.
// Timing: purely combinational.
module dct_iau #(
  parameter int unsigned N  = 32,
  parameter int unsigned DW = 21
) (
  input  logic signed [DW-1:0] x [N],
  output logic signed [DW-1:0] a [N/2],
  output logic signed [DW-1:0] b [N/2]
);

  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      a[i] = x[i] + x[N-1-i];
      b[i] = x[i] - x[N-1-i];
    end
  end

endmodule
