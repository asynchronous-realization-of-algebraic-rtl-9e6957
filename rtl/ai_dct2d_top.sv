// ai_dct2d_top - complete 2D AI DCT with its serial input section.
//
// Function: a serial stream of samples at rate F_s enters the decimation
// block (ai_input_decimator), which turns every eight samples into one
// 8-sample column at F_s/8; the columns feed the 2D AI DCT core
// (ai_dct2d_core), which returns the Arai-scaled 2D DCT of each 8x8 block one
// row of eight coefficients at a time. Sixty-four samples form one block:
// samples 8j..8j+7 are column j, sent row 7 first (the newest sample of a
// group lands on row 0).
//
// Interface and timing: one sample per clock while in_valid is high; the
// whole design runs on one clock, the column rate F_s/8 being realised by the
// decimator's valid pulse rather than by a second clock. Each block yields
// eight output rows on eight consecutive clocks (out_valid, out_row = u,
// coef[v] = Y[u][v] with OUT_FRAC fraction bits). Latency from the last sample
// of a block to row 0 of its result: 14 clocks (decimator 1, core 13).
module ai_dct2d_top
  import ai_dct_pkg::*;
#(
  parameter int unsigned IN_W       = 8,
  parameter int unsigned CONST_FRAC = 20,
  parameter int unsigned OUT_FRAC   = 2,
  localparam int unsigned OUT_W = IN_W + 9 + OUT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  s_in,
  output logic                    out_valid,
  output logic [2:0]              out_row,
  output logic signed [OUT_W-1:0] coef [N]
);

  logic                   col_valid;
  logic signed [IN_W-1:0] col_x [N];

  ai_input_decimator #(.IN_W(IN_W)) u_dec (
    .clk, .rst_n, .in_valid, .s_in,
    .out_valid(col_valid), .x(col_x)
  );

  ai_dct2d_core #(
    .IN_W(IN_W), .CONST_FRAC(CONST_FRAC), .OUT_FRAC(OUT_FRAC)
  ) u_core (
    .clk, .rst_n, .in_valid(col_valid), .x(col_x),
    .out_valid, .out_row, .coef
  );

endmodule
