// tb_tbuf_fullpar: streams random blocks through the full-parallel
// transposition buffer, one line per step, the direction alternating every
// N steps, with idle cycles between some steps. Each line read must hold the
// previous block transposed: step i of a pass returns element i of every
// vector written in the previous pass.
module tb_tbuf_fullpar;
  import dct_ref_pkg::*;

  localparam int N = 8, DW = 21;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic                 clk;
  initial clk = 0;
  logic                 step;
  logic                 dir_row;
  logic [$clog2(N)-1:0] idx;
  logic signed [DW-1:0] wr_data [N];
  logic signed [DW-1:0] rd_data [N];

  tbuf_fullpar #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint prev [N][N], cur [N][N];   // [vector index][element]

  initial begin
    step = 0; dir_row = 0; idx = '0;
    for (int i = 0; i < N; i++) wr_data[i] = '0;
    for (int pass = 0; pass < 30; pass++) begin
      for (int s = 0; s < N; s++) begin
        @(negedge clk);
        if ($urandom_range(3, 0) == 0) begin   // idle cycle
          step = 0;
          for (int i = 0; i < N; i++) wr_data[i] = DW'(rnd(DW));
          @(negedge clk);
        end
        step = 1;
        dir_row = pass[0];
        idx = $clog2(N)'(s);
        for (int i = 0; i < N; i++) begin
          cur[s][i] = rnd(DW);
          wr_data[i] = DW'(cur[s][i]);
        end
        #1;
        if (pass > 0)
          for (int p = 0; p < N; p++) begin
            checks++;
            if (longint'(rd_data[p]) != prev[p][s]) begin
              failures++;
              if (failures < 10) $display("pass %0d step %0d lane %0d got %0d exp %0d",
                                          pass, s, p, rd_data[p], prev[p][s]);
            end
          end
      end
      @(negedge clk);
      step = 0;
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
