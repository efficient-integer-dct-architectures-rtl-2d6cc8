// tb_tbuf_folded: writes random N x N blocks column by column through the
// one-hot enables (in a shuffled column order, with idle cycles) and reads
// all rows back, checking that rows return the transposed data.
module tb_tbuf_folded;
  import dct_ref_pkg::*;

  localparam int N = 8, DW = 21;
  int checks, failures;
  initial begin checks = 0; failures = 0; end

  logic                 clk;
  initial clk = 0;
  logic [N-1:0]         wr_en;
  logic signed [DW-1:0] wr_col [N];
  logic [$clog2(N)-1:0] rd_row_sel;
  logic signed [DW-1:0] rd_row [N];

  tbuf_folded #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint mem [N][N];   // mem[column][row] as written

  initial begin
    int order [N];
    wr_en = '0;
    rd_row_sel = '0;
    for (int i = 0; i < N; i++) wr_col[i] = '0;
    for (int blk = 0; blk < 20; blk++) begin
      for (int j = 0; j < N; j++) order[j] = j;
      for (int j = N - 1; j > 0; j--) begin
        int r, tmp;
        r = $urandom_range(j, 0);
        tmp = order[j]; order[j] = order[r]; order[r] = tmp;
      end
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          mem[order[j]][i] = rnd(DW);
          wr_col[i] = DW'(mem[order[j]][i]);
        end
        wr_en = N'(1) << order[j];
        @(negedge clk);
        wr_en = '0;                        // idle cycle: nothing may change
        for (int i = 0; i < N; i++) wr_col[i] = DW'(rnd(DW));
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        rd_row_sel = $clog2(N)'(r);
        #1;
        for (int c = 0; c < N; c++) begin
          checks++;
          if (longint'(rd_row[c]) != mem[c][r]) begin
            failures++;
            if (failures < 10) $display("row %0d col %0d got %0d exp %0d", r, c, rd_row[c], mem[c][r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
