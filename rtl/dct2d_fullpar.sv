// dct2d_fullpar: full-parallel N x N 2-D HEVC integer DCT.
//
// Two reusable N-point 1-D DCTs around a transposition buffer (tbuf_fullpar)
// that reads and writes one line per step. The first DCT transforms the
// incoming column and the result overwrites the buffer line that is read in
// the same step; the line read out feeds the second DCT. Lines are columns
// for N steps and rows for the next N, alternating, so each block is stored
// in one direction and read out transposed in the other while the next block
// is written. With a continuous input stream one N-vector leaves every cycle
// (N coefficients per cycle), N steps after the matching input. This is the
// structure the document gives.
//
// This design's own additions: a valid/ready handshake; a drain pass that
// starts by itself when the input is idle at a block boundary while a block
// is still in the buffer (it writes zeros and holds in_ready low for its
// remaining N-1 cycles); the mode of each block travelling with it; an
// output register.
//
// Mode and output order are as in dct2d_folded: output step i of a block
// gives out_vec[p] = Y[r(i)][r(p)] with r the lane order of dct_reusable.
// out_last marks the N-th vector of a block. Full precision: W-bit input,
// W+GROW-bit buffer, W+2*GROW-bit output.
// Timing: out_vec of a block appears one cycle after each step of the pass
// that follows the block's own input pass.
module dct2d_fullpar
  import dct_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 9
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [1:0]                    in_mode,
  input  logic signed [W-1:0]           in_col [N],
  output logic                          out_valid,
  output logic                          out_last,
  output logic [1:0]                    out_mode,
  output logic signed [W+2*GROW-1:0]    out_vec [N],
  output logic                          drain_active
);

  localparam int unsigned BW = W + GROW;
  localparam int unsigned OW = W + 2 * GROW;
  localparam int unsigned CNTW = $clog2(N);

  logic                 active_q;   // a pass is in progress
  logic                 drain_q;    // ... and it is a drain pass
  logic                 dir_row_q;  // lines are rows in this pass
  logic                 held_q;     // buffer holds a complete block
  logic [CNTW-1:0]      cnt_q;
  logic [1:0]           mode_w_q;   // mode of the block being written
  logic [1:0]           mode_h_q;   // mode of the block being read
  logic [1:0]           mode_w;
  logic                 step, take, start_drain;
  logic signed [OW-1:0] d1_out [N];
  logic signed [BW-1:0] wr_data [N];
  logic signed [BW-1:0] rd_data [N];
  logic signed [OW-1:0] d2_out [N];

  assign in_ready    = !(active_q && drain_q);
  assign take        = in_valid && in_ready;
  assign start_drain = !active_q && !in_valid && held_q;
  assign step        = take || start_drain || (active_q && drain_q);
  assign mode_w      = active_q ? mode_w_q : in_mode;
  assign drain_active = start_drain || (active_q && drain_q);

  dct_reusable #(.N(N), .W(W), .OW(OW)) u_dct1 (
    .m(mode_w), .x(in_col), .y(d1_out)
  );

  always_comb
    for (int i = 0; i < N; i++) wr_data[i] = take ? BW'(d1_out[i]) : '0;

  tbuf_fullpar #(.N(N), .DW(BW)) u_tbuf (
    .clk(clk), .step(step), .dir_row(dir_row_q), .idx(cnt_q),
    .wr_data(wr_data), .rd_data(rd_data)
  );

  dct_reusable #(.N(N), .W(BW), .OW(OW)) u_dct2 (
    .m(mode_h_q), .x(rd_data), .y(d2_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      drain_q   <= 1'b0;
      dir_row_q <= 1'b0;
      held_q    <= 1'b0;
      cnt_q     <= '0;
      mode_w_q  <= '0;
      mode_h_q  <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_mode  <= '0;
    end else begin
      out_valid <= step && held_q;
      out_last  <= step && held_q && (cnt_q == CNTW'(N - 1));
      out_mode  <= mode_h_q;
      if (step) begin
        cnt_q <= cnt_q + 1'b1;
        if (!active_q) begin
          active_q <= 1'b1;
          drain_q  <= !take;
          mode_w_q <= in_mode;
        end
        if (cnt_q == CNTW'(N - 1)) begin
          active_q  <= 1'b0;
          dir_row_q <= !dir_row_q;
          held_q    <= active_q ? !drain_q : take;
          mode_h_q  <= mode_w;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (step) out_vec <= d2_out;

  // a drain pass never overlaps an accepted input
  assert property (@(posedge clk) disable iff (!rst_n) (active_q && drain_q) |-> !take)
    else $error("input accepted during a drain pass");

endmodule
