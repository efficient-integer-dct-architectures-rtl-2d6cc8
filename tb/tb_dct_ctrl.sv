// tb_dct_ctrl: exhaustive check of the reusable-DCT control unit for
// N = 8, 16 and 32: sel1 is high exactly in the unit's own size, and sel2
// asks the half-size units for half the size in that case and passes the
// mode on otherwise.
module tb_dct_ctrl;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic [1:0] m;
  logic       s1_8, s1_16, s1_32;
  logic [1:0] s2_8, s2_16, s2_32;

  dct_ctrl #(.N(8))  u8  (.m(m), .sel1(s1_8),  .sel2(s2_8));
  dct_ctrl #(.N(16)) u16 (.m(m), .sel1(s1_16), .sel2(s2_16));
  dct_ctrl #(.N(32)) u32 (.m(m), .sel1(s1_32), .sel2(s2_32));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input int n, input logic s1, input logic [1:0] s2);
    int size, full;
    logic [1:0] exp2;
    size = 4 << m;
    full = (size == n);
    exp2 = full ? 2'(m - 1) : m;
    checks++;
    if (s1 !== 1'(full)) begin failures++; $display("N=%0d m=%0d sel1=%0d", n, m, s1); end
    if (size <= n) begin
      checks++;
      if (s2 !== exp2) begin failures++; $display("N=%0d m=%0d sel2=%0d", n, m, s2); end
    end
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      m = 2'(i);
      #1;
      chk(8, s1_8, s2_8);
      chk(16, s1_16, s2_16);
      chk(32, s1_32, s2_32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
