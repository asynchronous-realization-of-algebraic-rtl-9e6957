// ai_frs - final reconstruction step (FRS) of the 2D AI DCT.
//
// Function: the four row DCT blocks A..D return, for one transposed row u,
// 4 x 22 = 88 integers. Block i carries the first-dimension AI component i,
// and inside a block port group v carries the second-dimension components of
// coefficient v. The real 2D coefficient is the double decode
//   Y[u][v] = sum_i sum_j W[i]*W[j] * blk[i][port(v,j)]
// with the decode weights W of ai_dct_pkg. This is the only place where
// irrational constants are approximated, so the only place where error enters;
// it does not propagate anywhere else.
//
// Implementation: the 16 weight products are rounded to CONST_FRAC fraction
// bits (from the 30-bit table of the package). Stage 1 registers the constant
// products, stage 2 adds them and rounds the sum to OUT_FRAC fraction bits
// (round half up). Latency 2 clocks, one row of eight coefficients per clock.
// The outputs are the Arai-scaled coefficients: Y[u][v] = s_u*s_v*F[u][v],
// s_0 = 1, s_k = 2*cos(k*pi/16). The decode formula is the document's; the
// constant and output precisions, the pipeline and the rounding are this
// design's choices. With the defaults and 8-bit input the error of each
// coefficient stays below 0.5 (the weight rounding contributes at most 16
// terms of 2^15 * 2^-21, the output rounding 2^-3).
module ai_frs
  import ai_dct_pkg::*;
#(
  parameter int unsigned YW         = 16,  // width of a row-DCT output
  parameter int unsigned CONST_FRAC = 20,  // fraction bits of the weights
  parameter int unsigned OUT_FRAC   = 2,   // fraction bits of the result
  parameter int unsigned OUT_W      = YW + 1 + OUT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [2:0]              in_row,
  input  logic signed [YW-1:0]    blk [NCOMP][NAI],
  output logic                    out_valid,
  output logic [2:0]              out_row,
  output logic signed [OUT_W-1:0] coef [N]
);

  localparam int unsigned KW = CONST_FRAC + 2;        // weight width (<= 1.0)
  localparam int unsigned PW = YW + KW + 4;           // product / sum width

  // weight product rounded to CONST_FRAC fraction bits
  function automatic logic signed [KW-1:0] kweight(input logic [1:0] i, input logic [1:0] j);
    logic signed [63:0] w;
    w = 64'(WPROD[i][j]);
    w = (w + (64'sd1 <<< (WFRAC - CONST_FRAC - 1))) >>> (WFRAC - CONST_FRAC);
    return KW'(w);
  endfunction

  logic signed [PW-1:0] prod [N][NCOMP][NCOMP];
  logic                 v1;
  logic [2:0]           r1;

  // stage 1: constant products (zero where the AI component does not exist)
  always_ff @(posedge clk) begin
    for (int v = 0; v < N; v++) begin
      for (int i = 0; i < NCOMP; i++) begin
        for (int j = 0; j < NCOMP; j++) begin
          if (ai_port(v, j) < 0)
            prod[v][i][j] <= '0;
          else
            prod[v][i][j] <= PW'(blk[i][ai_port(v, j)]) * PW'(kweight(2'(i), 2'(j)));
        end
      end
    end
    r1 <= in_row;
  end

  // stage 2: sum and round
  logic signed [PW-1:0] acc [N];
  always_comb begin
    for (int v = 0; v < N; v++) begin
      acc[v] = PW'(1) <<< (CONST_FRAC - OUT_FRAC - 1);
      for (int i = 0; i < NCOMP; i++)
        for (int j = 0; j < NCOMP; j++)
          acc[v] = acc[v] + prod[v][i][j];
    end
  end

  always_ff @(posedge clk) begin
    for (int v = 0; v < N; v++) coef[v] <= OUT_W'(acc[v] >>> (CONST_FRAC - OUT_FRAC));
    out_row <= r1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
