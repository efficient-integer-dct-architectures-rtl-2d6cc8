// tb_dct_reusable: checks the reusable 32-point unit (and an 8- and a
// 16-point instance) in every mode: each output lane must equal the
// reference coefficient of the segment and index that the lane carries
// (recursive lane order, computed independently in dct_ref_pkg::rlane).
module tb_dct_reusable;
  import dct_ref_pkg::*;

  localparam int W = 9, OW = W + 12;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic [1:0]           m;
  logic signed [W-1:0]  x8 [8],  x16 [16],  x32 [32];
  logic signed [OW-1:0] y8 [8],  y16 [16],  y32 [32];

  dct_reusable #(.N(8),  .W(W)) u8  (.m(m), .x(x8),  .y(y8));
  dct_reusable #(.N(16), .W(W)) u16 (.m(m), .x(x16), .y(y16));
  dct_reusable #(.N(32), .W(W)) u32 (.m(m), .x(x32), .y(y32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input int n, input int p, input longint got, input longint v [32]);
    int s, g;
    longint exp;
    s = 4 << m;
    g = rlane(n, s, p);
    exp = dct1(s, g % s, v, (g / s) * s);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("N=%0d S=%0d lane %0d got %0d exp %0d", n, s, p, got, exp);
    end
  endfunction

  initial begin
    longint v [32];
    for (int r = 0; r < 800; r++) begin
      m = 2'(r % 4);
      for (int n = 0; n < 32; n++) v[n] = (r < 8) ? ((r % 8 < 4) ? 255 : -256) : rnd(W);
      for (int n = 0; n < 8; n++)  x8[n]  = W'(v[n]);
      for (int n = 0; n < 16; n++) x16[n] = W'(v[n]);
      for (int n = 0; n < 32; n++) x32[n] = W'(v[n]);
      #1;
      if ((4 << m) <= 8)  for (int p = 0; p < 8; p++)  chk(8, p, y8[p], v);
      if ((4 << m) <= 16) for (int p = 0; p < 16; p++) chk(16, p, y16[p], v);
      for (int p = 0; p < 32; p++) chk(32, p, y32[p], v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
