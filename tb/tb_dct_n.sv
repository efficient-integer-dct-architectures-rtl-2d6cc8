// tb_dct_n: checks the generalized N-point DCT against a direct matrix
// product, for N = 8, 16 and 32, on corner vectors (all max, all min,
// alternating) and random vectors. The unit is combinational.
module tb_dct_n;
  import dct_ref_pkg::*;

  localparam int W  = 9;
  localparam int OW = W + 12;

  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic signed [W-1:0]  x8 [8],  x16 [16],  x32 [32];
  logic signed [OW-1:0] y8 [8],  y16 [16],  y32 [32];

  dct_n #(.N(8),  .W(W)) dut8  (.x(x8),  .y(y8));
  dct_n #(.N(16), .W(W)) dut16 (.x(x16), .y(y16));
  dct_n #(.N(32), .W(W)) dut32 (.x(x32), .y(y32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vec(input int kind);
    longint v [32];
    for (int n = 0; n < 32; n++)
      case (kind)
        0: v[n] = 255;
        1: v[n] = -256;
        2: v[n] = (n % 2) ? -256 : 255;
        3: v[n] = (n == 0) ? 255 : 0;
        default: v[n] = rnd(W);
      endcase
    for (int n = 0; n < 8; n++)  x8[n]  = W'(v[n]);
    for (int n = 0; n < 16; n++) x16[n] = W'(v[n]);
    for (int n = 0; n < 32; n++) x32[n] = W'(v[n]);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (longint'(y8[k]) != dct1(8, k, v, 0)) begin
        failures++;
        if (failures < 10) $display("N=8 k=%0d got %0d exp %0d", k, y8[k], dct1(8, k, v, 0));
      end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (longint'(y16[k]) != dct1(16, k, v, 0)) begin
        failures++;
        if (failures < 10) $display("N=16 k=%0d got %0d exp %0d", k, y16[k], dct1(16, k, v, 0));
      end
    end
    for (int k = 0; k < 32; k++) begin
      checks++;
      if (longint'(y32[k]) != dct1(32, k, v, 0)) begin
        failures++;
        if (failures < 10) $display("N=32 k=%0d got %0d exp %0d", k, y32[k], dct1(32, k, v, 0));
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) run_vec(t < 4 ? t : 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
