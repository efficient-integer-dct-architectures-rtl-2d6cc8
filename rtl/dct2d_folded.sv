// dct2d_folded: folded N x N 2-D HEVC integer DCT.
//
// A single reusable N-point 1-D DCT is used for both passes. In the first N
// accepted cycles it receives the input block column by column, and each
// result vector is written into the next column of the transposition buffer
// (tbuf_folded). In the next N cycles the N input multiplexers switch to the
// buffer, whose rows are read one per cycle and transformed again; these
// results are the output. A block thus takes 2N cycles, N/2 coefficients per
// cycle on average. That is the structure the document gives; the valid/
// ready handshake, the mode travelling with the block and the output
// register are this design's own.
//
// Mode: in_mode is log2(size)-2 (dct_pkg::dct_mode_e). With a size S < N the
// N x N tile is (N/S)^2 independent S x S blocks, all transformed at once
// (the block-diagonal 1-D transform makes this exact). It is sampled with the
// first column of a tile and kept for the whole tile.
//
// Interface: in_col[n] is row n of the current input column, accepted when
// in_valid && in_ready. Output step i (out_valid) delivers out_row[p] =
// Y[r(i)][r(p)] where Y is the 2-D transform of the tile and r(l) =
// lane_seg(N,S,l)*S + lane_coef(N,S,l) is the lane order of dct_reusable.
// out_last marks the N-th output row. Full precision: W-bit input,
// W+GROW-bit buffer, W+2*GROW-bit output.
// Timing: out_row of buffer row i appears one cycle after that row was read;
// in_ready is low during the N row cycles.
module dct2d_folded
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
  output logic signed [W+2*GROW-1:0]    out_row [N]
);

  localparam int unsigned BW = W + GROW;        // buffer width
  localparam int unsigned OW = W + 2 * GROW;    // output width
  localparam int unsigned CNTW = $clog2(N);

  typedef enum logic {PASS_COL, PASS_ROW} pass_e;

  pass_e                pass_q;
  logic [CNTW-1:0]      cnt_q;
  logic [1:0]           mode_q, mode_cur;
  logic signed [BW-1:0] dct_in  [N];
  logic signed [OW-1:0] dct_out [N];
  logic signed [BW-1:0] buf_row [N];
  logic signed [BW-1:0] buf_col [N];
  logic [N-1:0]         wr_en;
  logic                 take;

  assign in_ready = (pass_q == PASS_COL);
  assign take     = in_valid && in_ready;
  assign mode_cur = (pass_q == PASS_COL && cnt_q == '0) ? in_mode : mode_q;

  // N input multiplexers: input column or buffer row
  always_comb
    for (int i = 0; i < N; i++)
      dct_in[i] = (pass_q == PASS_COL) ? BW'(in_col[i]) : buf_row[i];

  dct_reusable #(.N(N), .W(BW), .OW(OW)) u_dct (
    .m(mode_cur), .x(dct_in), .y(dct_out)
  );

  // first-pass results fit in BW bits exactly
  always_comb begin
    for (int i = 0; i < N; i++) buf_col[i] = BW'(dct_out[i]);
    wr_en = take ? (N'(1) << cnt_q) : '0;
  end

  tbuf_folded #(.N(N), .DW(BW)) u_tbuf (
    .clk(clk), .wr_en(wr_en), .wr_col(buf_col), .rd_row_sel(cnt_q), .rd_row(buf_row)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pass_q    <= PASS_COL;
      cnt_q     <= '0;
      mode_q    <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_mode  <= '0;
    end else begin
      out_valid <= (pass_q == PASS_ROW);
      out_last  <= (pass_q == PASS_ROW) && (cnt_q == CNTW'(N - 1));
      out_mode  <= mode_q;
      if (take && cnt_q == '0) mode_q <= in_mode;
      if (take || pass_q == PASS_ROW) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CNTW'(N - 1))
          pass_q <= (pass_q == PASS_COL) ? PASS_ROW : PASS_COL;
      end
    end
  end

  always_ff @(posedge clk)
    if (pass_q == PASS_ROW) out_row <= dct_out;

endmodule
