// tb_dct_iau: checks the input adder unit (sums and differences of mirrored
// samples) for N = 4 and 32 with random inputs. Combinational.
module tb_dct_iau;
  import dct_ref_pkg::*;

  localparam int DW = 21;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic signed [DW-1:0] x4 [4], a4 [2], b4 [2];
  logic signed [DW-1:0] x32 [32], a32 [16], b32 [16];

  dct_iau #(.N(4),  .DW(DW)) u4  (.x(x4),  .a(a4),  .b(b4));
  dct_iau #(.N(32), .DW(DW)) u32 (.x(x32), .a(a32), .b(b32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("got %0d exp %0d", got, exp);
    end
  endfunction

  initial begin
    for (int v = 0; v < 200; v++) begin
      for (int i = 0; i < 4; i++)  x4[i]  = DW'(rnd(DW - 1));
      for (int i = 0; i < 32; i++) x32[i] = DW'(rnd(DW - 1));
      #1;
      for (int i = 0; i < 2; i++) begin
        chk(a4[i], longint'(x4[i]) + x4[3-i]);
        chk(b4[i], longint'(x4[i]) - x4[3-i]);
      end
      for (int i = 0; i < 16; i++) begin
        chk(a32[i], longint'(x32[i]) + x32[31-i]);
        chk(b32[i], longint'(x32[i]) - x32[31-i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
