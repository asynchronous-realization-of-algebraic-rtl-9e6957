// ai_dct1d - 8-point Arai DCT computed exactly in algebraic-integer form.
//
// Function: takes eight signed integers x[0..7] and produces the 22 integer
// components of the eight Arai-scaled DCT outputs y_k, each held as an algebraic-integer
// tuple (see ai_dct_pkg for the basis, the decode weights and the port order).
// Decoding port group k with the weights gives
//   y_0 = F_0,  y_k = 2*cos(k*pi/16) * F_k (k > 0),
//   F_k = sum_n x[n]*cos((2n+1)*k*pi/16),
// exactly, because no constant is ever rounded: the only operations are
// additions, negations and two left shifts by one.
//
// Structure (follows the signal-flow graph of the Arai AI DCT):
//   stage b: b0=x0+x7 b1=x1+x6 b4=x2+x5 b5=x3+x4 b2=x3-x4 b6=x2-x5 b3=x1-x6 b7=x0-x7
//   stage c: c0=b0+b5 c3=b1+b4 c1=b1-b4 c4=b0-b5 c2=b2+b6 c6=b6+b3 c5=b3+b7 c7=b7
//   stage d: d0=c0+c3 d1=c0-c3 d3=c1+c4 d5=c4 d4=c5-c2 (d2=c2 d6=c5 d7=c6 d8=c7)
//   stage e: eu=(d2<<1)+d4  el=(d6<<1)-d4, then the 22 outputs with their signs.
// Each stage is registered, so the latency is DCT1D_LAT = 4 clocks and a new
// input vector is accepted every clock. in_valid travels with the data.
// Pipeline registers between adder levels, the widths and the valid flag are
// this design's choices; the adder network and signs follow the document.
//
// Widths: inputs IN_W bits signed, outputs IN_W+4 bits signed; no output can
// overflow (|y| < 2^(IN_W+3)). Intermediate two's-complement wrap in stage e
// cancels because the final value fits.
module ai_dct1d
  import ai_dct_pkg::*;
#(
  parameter int unsigned IN_W = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [IN_W-1:0]        x [N],
  output logic                          out_valid,
  output logic signed [IN_W+3:0]        y [NAI]
);

  localparam int unsigned W = IN_W + 4;
  typedef logic signed [W-1:0] word_t;

  word_t b [8];
  word_t c [8];
  word_t d [9];
  logic [DCT1D_LAT-1:0] vld;

  word_t xs [N];
  always_comb begin
    for (int i = 0; i < N; i++) xs[i] = word_t'(x[i]);
  end

  // stage b: input butterflies
  always_ff @(posedge clk) begin
    b[0] <= xs[0] + xs[7];
    b[1] <= xs[1] + xs[6];
    b[4] <= xs[2] + xs[5];
    b[5] <= xs[3] + xs[4];
    b[2] <= xs[3] - xs[4];
    b[6] <= xs[2] - xs[5];
    b[3] <= xs[1] - xs[6];
    b[7] <= xs[0] - xs[7];
  end

  // stage c
  always_ff @(posedge clk) begin
    c[0] <= b[0] + b[5];
    c[3] <= b[1] + b[4];
    c[1] <= b[1] - b[4];
    c[4] <= b[0] - b[5];
    c[2] <= b[2] + b[6];
    c[6] <= b[6] + b[3];
    c[5] <= b[3] + b[7];
    c[7] <= b[7];
  end

  // stage d: even outputs complete, odd part prepares the AI products
  always_ff @(posedge clk) begin
    d[0] <= c[0] + c[3];
    d[1] <= c[0] - c[3];
    d[3] <= c[1] + c[4];
    d[5] <= c[4];
    d[4] <= c[5] - c[2];
    d[2] <= c[2];
    d[6] <= c[5];
    d[7] <= c[6];
    d[8] <= c[7];
  end

  // stage e: odd-part adders after the shifts, output signs
  word_t eu, el;
  always_comb begin
    eu = (d[2] <<< 1) + d[4];
    el = (d[6] <<< 1) - d[4];
  end

  always_ff @(posedge clk) begin
    y[0]  <= d[0];    // X0a
    y[1]  <= d[8];    // X1a
    y[2]  <= el;      // X1b
    y[3]  <= d[4];    // X1c
    y[4]  <= d[7];    // X1d
    y[5]  <= d[5];    // X2a
    y[6]  <= d[3];    // X2d
    y[7]  <= d[8];    // X3a
    y[8]  <= d[4];    // X3b
    y[9]  <= -eu;     // X3c
    y[10] <= -d[7];   // X3d
    y[11] <= d[1];    // X4a
    y[12] <= d[8];    // X5a
    y[13] <= -d[4];   // X5b
    y[14] <= eu;      // X5c
    y[15] <= -d[7];   // X5d
    y[16] <= d[5];    // X6a
    y[17] <= -d[3];   // X6d
    y[18] <= d[8];    // X7a
    y[19] <= -el;     // X7b
    y[20] <= -d[4];   // X7c
    y[21] <= d[7];    // X7d
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DCT1D_LAT-2:0], in_valid};
  end
  assign out_valid = vld[DCT1D_LAT-1];

endmodule
