// ai_transpose_buffer - real-time AI transposition buffer.
//
// Function: each of the 22 AI-encoded outputs of the column DCT feeds its own
// 8-deep delay line. The 22 x 8 = 176 taps tap[m][p] = X_p of column k-m are
// all visible at once, so a whole 8x8 block of column-DCT results, i.e. the
// transposed data the row DCTs need, can be read in parallel.
//
// Timing: the delay lines advance on in_valid (one column per clock at full
// rate). A column counter, reset to 0, numbers the columns of a block 0..7;
// the column written with count 7 completes a block, and block_ready is high
// for the one clock in which the taps hold exactly that block, with column j
// of the block at tap[7-j]. The delay-line form and the 176 outputs follow the
// document; block framing by a counter from reset is this design's choice.
module ai_transpose_buffer
  import ai_dct_pkg::*;
#(
  parameter int unsigned DW = 12     // width of one AI component
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] col [NAI],
  output logic signed [DW-1:0] tap [N][NAI],
  output logic                 block_ready
);

  logic [$clog2(N)-1:0] col_cnt;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      tap[0] <= col;
      for (int m = 1; m < N; m++) tap[m] <= tap[m-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt     <= '0;
      block_ready <= 1'b0;
    end else begin
      block_ready <= in_valid && (col_cnt == 3'(N - 1));
      if (in_valid) col_cnt <= col_cnt + 1'b1;
    end
  end

endmodule
