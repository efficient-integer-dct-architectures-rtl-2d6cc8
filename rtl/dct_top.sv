// dct_top: HEVC integer DCT engines, side by side.
//
// Three independent units with their own ports, all built from the same
// reusable/generalized 1-D DCT datapath:
//  * fo_*: folded 2-D N x N DCT (one 1-D DCT, 2N cycles per N x N tile);
//  * fp_*: full-parallel 2-D N x N DCT (two 1-D DCTs, one N-vector in and
//          one out per cycle);
//  * g_*:  generalized fixed-length N-point 1-D DCT, natural output order.
// Both 2-D units handle 4x4, 8x8, 16x16 and 32x32 blocks through their mode
// input (a 32x32 tile then holds (32/S)^2 blocks of size S). See the unit
// files for interface and timing. Placing the three side by side is this
// design's own choice; the document presents them as separate structures.
module dct_top
  import dct_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // folded 2-D DCT
  input  logic                       fo_in_valid,
  output logic                       fo_in_ready,
  input  logic [1:0]                 fo_in_mode,
  input  logic signed [W-1:0]        fo_in_col [N],
  output logic                       fo_out_valid,
  output logic                       fo_out_last,
  output logic [1:0]                 fo_out_mode,
  output logic signed [W+2*GROW-1:0] fo_out_row [N],
  // full-parallel 2-D DCT
  input  logic                       fp_in_valid,
  output logic                       fp_in_ready,
  input  logic [1:0]                 fp_in_mode,
  input  logic signed [W-1:0]        fp_in_col [N],
  output logic                       fp_out_valid,
  output logic                       fp_out_last,
  output logic [1:0]                 fp_out_mode,
  output logic signed [W+2*GROW-1:0] fp_out_vec [N],
  output logic                       fp_drain_active,
  // generalized 1-D DCT
  input  logic signed [W-1:0]        g_x [N],
  output logic signed [W+GROW-1:0]   g_y [N]
);

  dct2d_folded #(.N(N), .W(W)) u_folded (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fo_in_valid), .in_ready(fo_in_ready), .in_mode(fo_in_mode), .in_col(fo_in_col),
    .out_valid(fo_out_valid), .out_last(fo_out_last), .out_mode(fo_out_mode), .out_row(fo_out_row)
  );

  dct2d_fullpar #(.N(N), .W(W)) u_fullpar (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fp_in_valid), .in_ready(fp_in_ready), .in_mode(fp_in_mode), .in_col(fp_in_col),
    .out_valid(fp_out_valid), .out_last(fp_out_last), .out_mode(fp_out_mode), .out_vec(fp_out_vec),
    .drain_active(fp_drain_active)
  );

  dct_n #(.N(N), .W(W)) u_gen (.x(g_x), .y(g_y));

endmodule
