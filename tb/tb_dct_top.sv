// tb_dct_top: end-to-end test of dct_top at its default parameters (N = 32,
// W = 9). Both 2-D engines run concurrently from their own stream agents:
// back-to-back tiles in every size with timing checks, then tiles with gaps
// and idle periods. The generalized 1-D DCT is checked on random vectors at
// the same time. Each mechanism is counted and must occur at least once:
// every transform size in both engines, mode switches, input held off by the
// folded engine's row pass, gaps inside a tile, input and output overlapping
// in the full-parallel engine, and full-parallel drain passes.
module tb_dct_top;
  import dct_ref_pkg::*;
  import dct_pkg::GROW;

  localparam int N = 32, W = 9;

  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = !clk;
  initial begin repeat (3) @(posedge clk); #1 rst_n = 1; end

  logic fo_in_valid, fo_in_ready, fo_out_valid, fo_out_last, fo_done;
  logic [1:0] fo_in_mode, fo_out_mode;
  logic signed [W-1:0]        fo_in_col [N];
  logic signed [W+2*GROW-1:0] fo_out_row [N];
  logic fp_in_valid, fp_in_ready, fp_out_valid, fp_out_last, fp_done, fp_drain_active;
  logic [1:0] fp_in_mode, fp_out_mode;
  logic signed [W-1:0]        fp_in_col [N];
  logic signed [W+2*GROW-1:0] fp_out_vec [N];
  logic signed [W-1:0]        g_x [N];
  logic signed [W+GROW-1:0]   g_y [N];

  dct_top dut (.*);

  int fo_checks, fo_failures, fo_switch, fo_stall, fo_gap, fo_overlap, fo_timed;
  int fp_checks, fp_failures, fp_switch, fp_stall, fp_gap, fp_overlap, fp_timed;
  int fo_mode [4], fp_mode [4];

  tb_stream_agent #(.N(N), .W(W), .NT1(8), .NT2(12), .PERIOD(2 * N), .LAT(2 * N)) fo_agent (
    .clk, .in_valid(fo_in_valid), .in_ready(fo_in_ready), .in_mode(fo_in_mode),
    .in_col(fo_in_col), .out_valid(fo_out_valid), .out_last(fo_out_last),
    .out_mode(fo_out_mode), .out_vec(fo_out_row), .done(fo_done), .checks(fo_checks),
    .failures(fo_failures), .n_mode(fo_mode), .n_switch(fo_switch), .n_stall(fo_stall),
    .n_gap(fo_gap), .n_overlap(fo_overlap), .n_timed(fo_timed)
  );

  tb_stream_agent #(.N(N), .W(W), .NT1(8), .NT2(12), .PERIOD(N), .LAT(2 * N)) fp_agent (
    .clk, .in_valid(fp_in_valid), .in_ready(fp_in_ready), .in_mode(fp_in_mode),
    .in_col(fp_in_col), .out_valid(fp_out_valid), .out_last(fp_out_last),
    .out_mode(fp_out_mode), .out_vec(fp_out_vec), .done(fp_done), .checks(fp_checks),
    .failures(fp_failures), .n_mode(fp_mode), .n_switch(fp_switch), .n_stall(fp_stall),
    .n_gap(fp_gap), .n_overlap(fp_overlap), .n_timed(fp_timed)
  );

  // full-parallel drain passes
  int   n_drain;
  logic drain_d;
  initial begin n_drain = 0; drain_d = 0; end
  always @(negedge clk) begin
    if (fp_drain_active && !drain_d) n_drain++;
    drain_d <= fp_drain_active;
  end

  // generalized 1-D DCT, one random vector per cycle
  int g_checks, g_failures;
  initial begin
    longint v [32];
    g_checks = 0; g_failures = 0;
    for (int n = 0; n < N; n++) g_x[n] = '0;
    forever begin
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++) begin v[n] = rnd(W); g_x[n] = W'(v[n]); end
      #1;
      for (int k = 0; k < N; k++) begin
        g_checks++;
        if (longint'(g_y[k]) != dct1(N, k, v, 0)) begin
          g_failures++;
          if (g_failures < 5) $display("1-D k=%0d got %0d exp %0d", k, g_y[k], dct1(N, k, v, 0));
        end
      end
    end
  end

  int f;
  function automatic void need(input int count, input string what);
    if (count == 0) begin
      f++;
      $display("mechanism never exercised: %s", what);
    end
  endfunction

  initial begin
    f = 0;
    fork
      begin
        repeat (2) @(posedge clk);
        wait (fo_done && fp_done);
        repeat (5) @(posedge clk);
      end
      begin
        repeat (40000) @(posedge clk);
        $display("watchdog expired");
        f++;
      end
    join_any
    f += fo_failures + fp_failures + g_failures;
    for (int i = 0; i < 4; i++) begin
      need(fo_mode[i], $sformatf("folded %0d-point tiles", 4 << i));
      need(fp_mode[i], $sformatf("full-parallel %0d-point tiles", 4 << i));
    end
    need(fo_switch, "folded mode switch");
    need(fp_switch, "full-parallel mode switch");
    need(fo_stall, "folded input held off during row pass");
    need(fo_gap, "folded input gap");
    need(fp_gap, "full-parallel input gap");
    need(fp_overlap, "full-parallel concurrent input and output");
    need(n_drain, "full-parallel drain pass");
    need(fo_timed, "folded back-to-back timing");
    need(fp_timed, "full-parallel back-to-back timing");
    $display("folded: tiles %0d/%0d/%0d/%0d, switches %0d, held off %0d, gaps %0d, timed %0d",
             fo_mode[0], fo_mode[1], fo_mode[2], fo_mode[3], fo_switch, fo_stall, fo_gap, fo_timed);
    $display("full-parallel: tiles %0d/%0d/%0d/%0d, switches %0d, gaps %0d, overlap %0d, drains %0d, timed %0d",
             fp_mode[0], fp_mode[1], fp_mode[2], fp_mode[3], fp_switch, fp_gap, fp_overlap, n_drain, fp_timed);
    $display("generalized 1-D: %0d checks", g_checks);
    $display("TB_RESULT checks=%0d failures=%0d", fo_checks + fp_checks + g_checks, f);
    $finish;
  end
endmodule
