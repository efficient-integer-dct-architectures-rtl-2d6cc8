// tb_dct_sau: checks every product of the shift-add units for N = 4, 8, 16
// and 32 against b times the odd-row constant of the reference matrix, for
// extreme and random samples. Combinational.
module tb_dct_sau;
  import dct_ref_pkg::*;

  localparam int DW = 21;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic signed [DW-1:0] b;
  logic signed [DW-1:0] t4 [2], t8 [4], t16 [8], t32 [16];

  dct_sau #(.N(4),  .DW(DW)) u4  (.b(b), .t(t4));
  dct_sau #(.N(8),  .DW(DW)) u8  (.b(b), .t(t8));
  dct_sau #(.N(16), .DW(DW)) u16 (.b(b), .t(t16));
  dct_sau #(.N(32), .DW(DW)) u32 (.b(b), .t(t32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input int n, input int j, input longint got);
    longint exp;
    exp = longint'(cn(n, 2 * j + 1, 0)) * longint'(b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("N=%0d j=%0d b=%0d got %0d exp %0d", n, j, b, got, exp);
    end
  endfunction

  initial begin
    for (int v = 0; v < 400; v++) begin
      case (v)
        0: b = 1;
        1: b = -1;
        2: b = 1023;
        3: b = -1024;
        default: b = DW'(rnd(13));   // products stay inside DW bits
      endcase
      #1;
      for (int j = 0; j < 2; j++)  chk(4, j, t4[j]);
      for (int j = 0; j < 4; j++)  chk(8, j, t8[j]);
      for (int j = 0; j < 8; j++)  chk(16, j, t16[j]);
      for (int j = 0; j < 16; j++) chk(32, j, t32[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
