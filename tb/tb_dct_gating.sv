// tb_dct_gating: checks the data gating of the reusable 32-point DCT at its
// 32-point level and at its first 16-point level, on random inputs in every
// mode. At a level
// that computes its full size, the second half-size unit must see an
// all-zero input; at a level that does not, the IAU (and with it the SAUs
// and the OAU) must. The outputs do not show the gating, so the check looks
// at the internal nets of each level.
module tb_dct_gating;
  import dct_ref_pkg::*;

  localparam int W = 9;

  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic [1:0]           m;
  logic signed [W-1:0]  x [32];
  logic signed [W+11:0] y [32];

  dct_reusable #(.N(32), .W(W)) dut (.m(m), .x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a level of size n is active on its IAU path when it computes n points;
  // below the top level that is also the case when the parent computes 2n
  function automatic void chk_level(input int n, input int size, input bit iau_zero, input bit in2_zero);
    bit full;
    full = (size == n);
    checks++;
    if (full && !in2_zero) begin
      failures++;
      $display("N=%0d level: second unit not gated in its full-size mode", n);
    end
    if (!full && !iau_zero) begin
      failures++;
      $display("N=%0d level: IAU not gated for size %0d", n, size);
    end
  endfunction

  initial begin
    int full_seen, small_seen;
    full_seen = 0; small_seen = 0;
    for (int r = 0; r < 400; r++) begin
      bit z32, z32b, z16, z16b;
      m = 2'(r % 4);
      for (int n = 0; n < 32; n++) begin
        x[n] = W'(rnd(W));
        if (x[n] == 0) x[n] = 1;      // non-zero input, so gating shows
      end
      #1;
      z32 = 1; z32b = 1; z16 = 1; z16b = 1;
      for (int i = 0; i < 32; i++) if (dut.xg[i] != 0) z32 = 0;
      for (int i = 0; i < 16; i++) if (dut.in2[i] != 0) z32b = 0;
      for (int i = 0; i < 16; i++) if (dut.g_sub.u_sub1.xg[i] != 0) z16 = 0;
      for (int i = 0; i < 8; i++)  if (dut.g_sub.u_sub1.in2[i] != 0) z16b = 0;
      chk_level(32, 4 << m, z32, z32b);
      chk_level(16, (m == 2'd3) ? 16 : (4 << m), z16, z16b);
      if (m == 2'd3) full_seen++; else small_seen++;
    end
    if (full_seen == 0 || small_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
