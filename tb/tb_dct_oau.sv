// tb_dct_oau: drives the output adder unit with the products an SAU array
// would give for random differences b(i) and checks every odd coefficient
// against the odd rows of the reference matrix, for N = 4, 8, 16 and 32.
module tb_dct_oau;
  import dct_ref_pkg::*;

  localparam int DW = 24;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic signed [DW-1:0] t4 [2][2],   y4 [2];
  logic signed [DW-1:0] t8 [4][4],   y8 [4];
  logic signed [DW-1:0] t16 [8][8],  y16 [8];
  logic signed [DW-1:0] t32 [16][16], y32 [16];

  dct_oau #(.N(4),  .DW(DW)) u4  (.t(t4),  .yo(y4));
  dct_oau #(.N(8),  .DW(DW)) u8  (.t(t8),  .yo(y8));
  dct_oau #(.N(16), .DW(DW)) u16 (.t(t16), .yo(y16));
  dct_oau #(.N(32), .DW(DW)) u32 (.t(t32), .yo(y32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint b [16];

  function automatic longint expv(input int n, input int k);
    longint acc = 0;
    for (int i = 0; i < n / 2; i++) acc += longint'(cn(n, 2 * k + 1, i)) * b[i];
    return acc;
  endfunction

  function automatic void chk(input int n, input int k, input longint got);
    checks++;
    if (got != expv(n, k)) begin
      failures++;
      if (failures < 10) $display("N=%0d k=%0d got %0d exp %0d", n, k, got, expv(n, k));
    end
  endfunction

  initial begin
    for (int v = 0; v < 200; v++) begin
      for (int i = 0; i < 16; i++) b[i] = rnd(10);
      for (int i = 0; i < 2; i++)  for (int j = 0; j < 2; j++)  t4[i][j]  = DW'(b[i] * cn(4, 2*j+1, 0));
      for (int i = 0; i < 4; i++)  for (int j = 0; j < 4; j++)  t8[i][j]  = DW'(b[i] * cn(8, 2*j+1, 0));
      for (int i = 0; i < 8; i++)  for (int j = 0; j < 8; j++)  t16[i][j] = DW'(b[i] * cn(16, 2*j+1, 0));
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) t32[i][j] = DW'(b[i] * cn(32, 2*j+1, 0));
      #1;
      for (int k = 0; k < 2; k++)  chk(4, k, y4[k]);
      for (int k = 0; k < 4; k++)  chk(8, k, y8[k]);
      for (int k = 0; k < 8; k++)  chk(16, k, y16[k]);
      for (int k = 0; k < 16; k++) chk(32, k, y32[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
