// tb_stream_agent: driver and scoreboard for a 2-D DCT engine.
//
// Sends NT1 tiles back to back (in_valid held high; every tile uses a new
// mode so every mode switch happens), then idles 3N cycles, then sends NT2
// tiles with random modes, random gaps between columns and random idle
// stretches between tiles. Every tile is random W-bit data (the first tile is
// all maximum, the second all minimum). The expected output is the 2-D
// transform of the tile, in the engine's lane order, computed by
// dct_ref_pkg. For the back-to-back tiles it also checks timing: a new tile
// starts every PERIOD cycles and its last output row arrives LAT cycles
// after its first column was accepted. Counters report how often each
// mechanism was exercised.
module tb_stream_agent
  import dct_ref_pkg::*;
#(
  parameter int N      = 32,
  parameter int W      = 9,
  parameter int OW     = W + 24,
  parameter int NT1    = 6,
  parameter int NT2    = 10,
  parameter int PERIOD = 2 * N,
  parameter int LAT    = 2 * N
) (
  input  logic                 clk,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic [1:0]           in_mode,
  output logic signed [W-1:0]  in_col [N],
  input  logic                 out_valid,
  input  logic                 out_last,
  input  logic [1:0]           out_mode,
  input  logic signed [OW-1:0] out_vec [N],
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_mode [4],     // tiles checked per mode
  output int                   n_switch,       // mode changes between tiles
  output int                   n_stall,        // cycles in_valid held while not ready
  output int                   n_gap,          // idle cycles inside a tile
  output int                   n_overlap,      // cycles accepting input while outputting
  output int                   n_timed         // back-to-back tiles whose timing was checked
);

  localparam int NT = NT1 + NT2;
  localparam int LN = $clog2(N);

  longint yexp  [NT][32][32];
  int     tmode [NT];
  longint t_first [NT];   // cycle of first accepted column
  longint cycle;
  int     tile_out, row_out;

  // sample mid-cycle, where every DUT output and input is settled
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready && out_valid) n_overlap++;
    if (out_valid) begin
      int s;
      s = 4 << tmode[tile_out];
      for (int p = 0; p < N; p++) begin
        longint e;
        e = yexp[tile_out][rlane(N, s, row_out)][rlane(N, s, p)];
        checks++;
        if (longint'(out_vec[p]) != e) begin
          failures++;
          if (failures < 10)
            $display("tile %0d row %0d lane %0d got %0d exp %0d", tile_out, row_out, p, out_vec[p], e);
        end
      end
      checks++;
      if (out_mode != 2'(tmode[tile_out])) begin
        failures++;
        $display("tile %0d wrong out_mode %0d", tile_out, out_mode);
      end
      checks++;
      if (out_last != (row_out == N - 1)) begin
        failures++;
        $display("tile %0d row %0d out_last %0d", tile_out, row_out, out_last);
      end
      if (row_out == N - 1) begin
        n_mode[tmode[tile_out]]++;
        if (tile_out < NT1) begin
          checks++;
          n_timed++;
          if (cycle - t_first[tile_out] != LAT) begin
            failures++;
            $display("tile %0d latency %0d expected %0d", tile_out, cycle - t_first[tile_out], LAT);
          end
          if (tile_out > 0) begin
            checks++;
            if (t_first[tile_out] - t_first[tile_out-1] != PERIOD) begin
              failures++;
              $display("tile %0d period %0d expected %0d", tile_out,
                       t_first[tile_out] - t_first[tile_out-1], PERIOD);
            end
          end
        end
        row_out = 0;
        tile_out++;
        if (tile_out == NT) done = 1;
      end else row_out++;
    end
  end

  // the driver changes its outputs just after a rising edge
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    longint x [32][32];
    longint y [32][32];
    cycle = 0; tile_out = 0; row_out = 0;
    done = 0; checks = 0; failures = 0; n_switch = 0; n_stall = 0;
    n_gap = 0; n_overlap = 0; n_timed = 0;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    in_valid = 0; in_mode = '0;
    for (int i = 0; i < N; i++) in_col[i] = '0;
    for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++) x[r][c] = 0;
    repeat (4) tick();
    for (int t = 0; t < NT; t++) begin
      tmode[t] = (t < NT1) ? (3 - (t % 4)) : int'($urandom_range(3, 0));
      if (t > 0 && tmode[t] != tmode[t-1]) n_switch++;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          x[r][c] = (t == 0) ? 255 : (t == 1) ? -256 : rnd(W);
      dct2_ref(N, 4 << tmode[t], x, y);
      yexp[t] = y;
      if (t == NT1) begin
        in_valid = 0;
        repeat (3 * N) tick();
      end
      if (t > NT1 && $urandom_range(2, 0) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(2 * N, 1)) tick();
      end
      for (int c = 0; c < N; c++) begin
        if (t >= NT1 && c > 0 && $urandom_range(4, 0) == 0) begin
          in_valid = 0;
          n_gap++;
          tick();
        end
        in_valid = 1;
        in_mode = 2'(tmode[t]);
        for (int r = 0; r < N; r++) in_col[r] = W'(x[r][c]);
        while (!in_ready) tick();
        if (c == 0) t_first[t] = cycle;
        tick();
      end
      if (t == NT - 1) in_valid = 0;
    end
    in_valid = 0;
  end

endmodule
