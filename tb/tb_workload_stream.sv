// tb_workload_stream: sustained-rate test of the 2-D engines at their
// default size (N = 32, 9-bit input). A strip of 24 back-to-back 32x32
// tiles (768 x 32 samples, all four block sizes in turn) streams through
// the full-parallel and the folded engine. Every coefficient is checked, and
// the testbench measures the output rate: the full-parallel engine must
// deliver an output vector on every cycle from its first to its last output
// (32 coefficients per cycle), the folded engine one tile per 64 cycles
// (16 coefficients per cycle). It prints the clock each engine needs for
// 7680x4320 at 60 frames/s and 3840x2160 at 30 frames/s (4:2:0 sampling).
module tb_workload_stream;
  localparam int N = 32, W = 9, NT = 24;

  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = !clk;
  initial begin repeat (3) @(posedge clk); #1 rst_n = 1; end

  logic fp_in_valid, fp_in_ready, fp_out_valid, fp_out_last, fp_done, fp_drain;
  logic fo_in_valid, fo_in_ready, fo_out_valid, fo_out_last, fo_done;
  logic [1:0] fp_in_mode, fp_out_mode, fo_in_mode, fo_out_mode;
  logic signed [W-1:0]  fp_in_col [N], fo_in_col [N];
  logic signed [W+23:0] fp_out_vec [N], fo_out_row [N];

  dct2d_fullpar u_fp (
    .clk, .rst_n, .in_valid(fp_in_valid), .in_ready(fp_in_ready), .in_mode(fp_in_mode),
    .in_col(fp_in_col), .out_valid(fp_out_valid), .out_last(fp_out_last),
    .out_mode(fp_out_mode), .out_vec(fp_out_vec), .drain_active(fp_drain)
  );

  dct2d_folded u_fo (
    .clk, .rst_n, .in_valid(fo_in_valid), .in_ready(fo_in_ready), .in_mode(fo_in_mode),
    .in_col(fo_in_col), .out_valid(fo_out_valid), .out_last(fo_out_last),
    .out_mode(fo_out_mode), .out_row(fo_out_row)
  );

  int fp_checks, fp_failures, fo_checks, fo_failures;
  int d0, d1, d2, d3, d4, d5, d6, d7, d8, d9, d10, d11;
  int fp_mode [4], fo_mode [4];

  tb_stream_agent #(.N(N), .W(W), .NT1(NT), .NT2(0), .PERIOD(N), .LAT(2 * N)) fp_agent (
    .clk, .in_valid(fp_in_valid), .in_ready(fp_in_ready), .in_mode(fp_in_mode),
    .in_col(fp_in_col), .out_valid(fp_out_valid), .out_last(fp_out_last),
    .out_mode(fp_out_mode), .out_vec(fp_out_vec), .done(fp_done), .checks(fp_checks),
    .failures(fp_failures), .n_mode(fp_mode), .n_switch(d0), .n_stall(d1), .n_gap(d2),
    .n_overlap(d3), .n_timed(d4)
  );

  tb_stream_agent #(.N(N), .W(W), .NT1(NT), .NT2(0), .PERIOD(2 * N), .LAT(2 * N)) fo_agent (
    .clk, .in_valid(fo_in_valid), .in_ready(fo_in_ready), .in_mode(fo_in_mode),
    .in_col(fo_in_col), .out_valid(fo_out_valid), .out_last(fo_out_last),
    .out_mode(fo_out_mode), .out_vec(fo_out_row), .done(fo_done), .checks(fo_checks),
    .failures(fo_failures), .n_mode(fo_mode), .n_switch(d5), .n_stall(d6), .n_gap(d7),
    .n_overlap(d8), .n_timed(d9)
  );

  // output-rate measurement, sampled mid-cycle
  longint cyc, fp_first, fp_last, fo_first, fo_last;
  int     fp_vecs, fo_vecs;
  initial begin
    cyc = 0; fp_first = -1; fp_last = 0; fo_first = -1; fo_last = 0; fp_vecs = 0; fo_vecs = 0;
  end
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (fp_out_valid) begin
      if (fp_first < 0) fp_first = cyc;
      fp_last = cyc;
      fp_vecs++;
    end
    if (fo_out_valid) begin
      if (fo_first < 0) fo_first = cyc;
      fo_last = cyc;
      fo_vecs++;
    end
  end

  int f, checks;
  initial begin
    real fp_rate, fo_rate, s8k, s4k;
    f = 0;
    fork
      begin
        repeat (2) @(posedge clk);
        wait (fp_done && fo_done);
        repeat (3) @(posedge clk);
      end
      begin
        repeat (10000) @(posedge clk);
        $display("watchdog expired");
        f++;
      end
    join_any
    checks = fp_checks + fo_checks + 2;
    f += fp_failures + fo_failures;
    fp_rate = real'(fp_vecs * N) / real'(fp_last - fp_first + 1);
    fo_rate = real'(NT * N * N) / real'(NT * 2 * N);
    // full-parallel: no idle output cycle between its first and last vector
    if (fp_vecs != NT * N || fp_last - fp_first + 1 != NT * N) begin
      f++;
      $display("full-parallel output not continuous: %0d vectors over %0d cycles",
               fp_vecs, fp_last - fp_first + 1);
    end
    // folded: N vectors per 2N cycles, the last one (2N*NT - N) cycles after the first
    if (fo_vecs != NT * N || fo_last - fo_first != 2 * N * NT - N - 1) begin
      f++;
      $display("folded output span %0d cycles for %0d vectors", fo_last - fo_first + 1, fo_vecs);
    end
    s8k = 7680.0 * 4320.0 * 60.0 * 1.5;
    s4k = 3840.0 * 2160.0 * 30.0 * 1.5;
    $display("full-parallel: %0.2f coefficients/cycle -> 8K60 needs %0.1f MHz, 4K30 needs %0.1f MHz",
             fp_rate, s8k / fp_rate / 1.0e6, s4k / fp_rate / 1.0e6);
    $display("folded: %0.2f coefficients/cycle -> 8K60 needs %0.1f MHz, 4K30 needs %0.1f MHz",
             fo_rate, s8k / fo_rate / 1.0e6, s4k / fo_rate / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, f);
    $finish;
  end
endmodule
