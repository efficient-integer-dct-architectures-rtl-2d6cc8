// tb_dct2d_fullpar: runs the full-parallel 2-D DCT at N = 32 through
// back-to-back tiles of every size (one tile per N cycles, last row 2N
// cycles after the first column, input and output overlapping) and then
// through tiles with random gaps and idle time, which start drain passes.
// Checks every output coefficient, the mode tag and the last-row flag.
module tb_dct2d_fullpar;
  localparam int N = 32, W = 9;

  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  logic drain_active;
  int n_drain;
  initial begin n_drain = 0; drain_d = 0; end
  logic drain_d;
  always @(negedge clk) begin
    if (drain_active && !drain_d) n_drain++;
    drain_d <= drain_active;
  end
  logic in_valid, in_ready, out_valid, out_last, done;
  logic [1:0] in_mode, out_mode;
  logic signed [W-1:0]    in_col [N];
  logic signed [W+23:0]   out_vec [N];
  int checks, failures, n_switch, n_stall, n_gap, n_overlap, n_timed;
  int n_mode [4];

  always #5 clk = !clk;
  initial begin repeat (3) @(posedge clk); #1 rst_n = 1; end

  dct2d_fullpar #(.N(N), .W(W)) dut (.*);

  tb_stream_agent #(.N(N), .W(W), .NT1(6), .NT2(8), .PERIOD(N), .LAT(2 * N)) agent (
    .clk, .in_valid, .in_ready, .in_mode, .in_col, .out_valid, .out_last, .out_mode,
    .out_vec(out_vec), .done, .checks, .failures, .n_mode, .n_switch, .n_stall, .n_gap,
    .n_overlap, .n_timed
  );

  int f;
  initial begin
    f = 0;
    fork
      begin
        repeat (2) @(posedge clk);
        wait (done);
        repeat (5) @(posedge clk);
      end
      begin
        repeat (20000) @(posedge clk);
        $display("watchdog expired");
        f++;
      end
    join_any
    f += failures;
    for (int i = 0; i < 4; i++) if (n_mode[i] == 0) begin f++; $display("mode %0d never ran", i); end
    if (n_stall == 0) begin f++; $display("input never held off"); end
    if (n_gap == 0) begin f++; $display("no input gap"); end
    if (n_overlap == 0) begin f++; $display("input and output never overlapped"); end
    if (n_drain == 0) begin f++; $display("no drain pass"); end
    $display("tiles per mode %0d %0d %0d %0d, switches %0d, stalls %0d, gaps %0d, timed %0d, overlap %0d, drains %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_stall, n_gap, n_timed, n_overlap, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, f);
    $finish;
  end
endmodule
