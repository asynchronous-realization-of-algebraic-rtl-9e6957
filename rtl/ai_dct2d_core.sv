// ai_dct2d_core - 8x8 2D DCT in algebraic-integer arithmetic, parallel input.
//
// Function: computes the Arai-scaled 2D DCT of a stream of 8x8 blocks,
//   Y[u][v] = s_u*s_v * sum_n sum_j A[n][j]*cos((2n+1)u*pi/16)*cos((2j+1)v*pi/16),
//   s_0 = 1, s_k = 2*cos(k*pi/16),
// where column j of block A arrives as one 8-sample vector x[n] = A[n][j].
// Everything up to the final reconstruction step is exact integer arithmetic.
//
// Datapath (as in the block diagram of the architecture):
//   column ai_dct1d (22 AI outputs per column)
//   -> ai_transpose_buffer (22 delay lines, 176 taps)
//   -> ai_cross_connect (row u, component a/b/c/d -> blocks A/B/C/D)
//   -> four row ai_dct1d blocks A..D (4 x 22 = 88 outputs)
//   -> ai_frs (8 coefficients of row u per clock).
// The Arai scale factors s_u*s_v are left in the outputs, to be folded into a
// later quantiser.
//
// Interface and timing: one column per clock with in_valid high gives the full
// rate; gaps are allowed. Columns are framed into blocks by counting from
// reset. After the eighth column of a block, rows u = 0..7 of its result come
// out on eight consecutive clocks with out_valid high and out_row = u, coef[v]
// = Y[u][v] with OUT_FRAC fraction bits. Latency, counted in register stages
// from the eighth column at the input to row 0 at the output: column DCT 4,
// transpose buffer 1, cross-connections 2, row DCT 4, FRS 2 = 13 clocks.
module ai_dct2d_core
  import ai_dct_pkg::*;
#(
  parameter int unsigned IN_W       = 8,   // input sample width (L)
  parameter int unsigned CONST_FRAC = 20,
  parameter int unsigned OUT_FRAC   = 2,
  localparam int unsigned CW    = IN_W + 4,          // column-DCT output width
  localparam int unsigned YW    = IN_W + 8,          // row-DCT output width
  localparam int unsigned OUT_W = YW + 1 + OUT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [N],
  output logic                    out_valid,
  output logic [2:0]              out_row,
  output logic signed [OUT_W-1:0] coef [N]
);

  // column-wise 1D AI DCT
  logic                  col_valid;
  logic signed [CW-1:0]  col_y [NAI];

  ai_dct1d #(.IN_W(IN_W)) u_col_dct (
    .clk, .rst_n, .in_valid, .x,
    .out_valid(col_valid), .y(col_y)
  );

  // AI transposition buffer
  logic signed [CW-1:0]  tap [N][NAI];
  logic                  block_ready;

  ai_transpose_buffer #(.DW(CW)) u_tbuf (
    .clk, .rst_n, .in_valid(col_valid), .col(col_y),
    .tap, .block_ready
  );

  // cross-connections
  logic                  row_valid;
  logic [2:0]            row_idx;
  logic signed [CW-1:0]  row_x [NCOMP][N];

  ai_cross_connect #(.DW(CW)) u_xconn (
    .clk, .rst_n, .block_ready, .tap,
    .row_valid, .row_idx, .row_x
  );

  // row-wise 1D AI DCT blocks A, B, C, D
  logic [NCOMP-1:0]      blk_valid;
  logic signed [YW-1:0]  blk_y [NCOMP][NAI];

  for (genvar i = 0; i < NCOMP; i++) begin : g_row_dct
    ai_dct1d #(.IN_W(CW)) u_row_dct (
      .clk, .rst_n, .in_valid(row_valid), .x(row_x[i]),
      .out_valid(blk_valid[i]), .y(blk_y[i])
    );
  end

  // row index travels alongside the row DCT pipeline
  logic [2:0] idx_pipe [DCT1D_LAT];
  always_ff @(posedge clk) begin
    idx_pipe[0] <= row_idx;
    for (int s = 1; s < DCT1D_LAT; s++) idx_pipe[s] <= idx_pipe[s-1];
  end

  // the four row blocks run in lock step
  a_rows_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                   blk_valid == {NCOMP{blk_valid[0]}})
    else $error("ai_dct2d_core: row DCT blocks out of step");

  // final reconstruction step
  ai_frs #(
    .YW(YW), .CONST_FRAC(CONST_FRAC), .OUT_FRAC(OUT_FRAC), .OUT_W(OUT_W)
  ) u_frs (
    .clk, .rst_n, .in_valid(blk_valid[0]), .in_row(idx_pipe[DCT1D_LAT-1]),
    .blk(blk_y), .out_valid, .out_row, .coef
  );

endmodule
