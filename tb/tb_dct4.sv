// tb_dct4: checks the 4-point DCT exhaustively over a grid of corner values
// and on random vectors against the 4x4 reference matrix. Combinational.
module tb_dct4;
  import dct_ref_pkg::*;

  localparam int W = 9, OW = W + 12;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic signed [W-1:0]  x [4];
  logic signed [OW-1:0] y [4];

  dct4 #(.W(W)) dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint v [32]);
    for (int n = 0; n < 4; n++) x[n] = W'(v[n]);
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (longint'(y[k]) != dct1(4, k, v, 0)) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d exp %0d", k, y[k], dct1(4, k, v, 0));
      end
    end
  endtask

  initial begin
    longint v [32];
    longint corner [3] = '{-256, 0, 255};
    for (int n = 0; n < 32; n++) v[n] = 0;
    for (int c = 0; c < 81; c++) begin
      v[0] = corner[c % 3]; v[1] = corner[(c / 3) % 3];
      v[2] = corner[(c / 9) % 3]; v[3] = corner[(c / 27) % 3];
      run(v);
    end
    for (int r = 0; r < 500; r++) begin
      for (int n = 0; n < 4; n++) v[n] = rnd(W);
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
