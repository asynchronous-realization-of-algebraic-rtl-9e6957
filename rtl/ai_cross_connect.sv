// ai_cross_connect - cross-connections from the transpose buffer to the four
// row-wise AI DCT blocks.
//
// Function: transposed row u of an 8x8 block is the eight column-DCT results
// X_u of columns 0..7, and each of them is an algebraic-integer tuple with up to four
// components. Component a of the row goes to block A, b to block B, c to C and
// d to D (rows 0 and 4 use only A; rows 2 and 6 use A and D; odd rows use all
// four; an unused block receives zeros). Feeding the row DCTs one component
// each keeps them purely integer: the basis weight of the first dimension is
// applied later, in the final reconstruction step.
//
// Timing: when block_ready is high the 176 taps are copied into a holding bank
// (column j of the block comes from tap[7-j]). On the next eight clocks rows
// u = 0..7 are presented, one per clock, on registered outputs with
// row_valid high and row_idx = u. A new block may arrive at the earliest in
// the clock that presents row 7, which is what a full-rate stream (one column
// per clock) gives; an earlier one is a framing error and is flagged by an
// assertion. The component-to-block routing follows the document; the
// holding bank and the one-row-per-clock schedule are this design's choices.
module ai_cross_connect
  import ai_dct_pkg::*;
#(
  parameter int unsigned DW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 block_ready,
  input  logic signed [DW-1:0] tap [N][NAI],
  output logic                 row_valid,
  output logic [2:0]           row_idx,
  output logic signed [DW-1:0] row_x [NCOMP][N]
);

  logic signed [DW-1:0] bank [N][NAI];   // bank[j][p]: port p of block column j
  logic [2:0]           cnt;
  logic                 active;

  always_ff @(posedge clk) begin
    if (block_ready) begin
      for (int j = 0; j < N; j++) bank[j] <= tap[N-1-j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      active <= 1'b0;
    end else if (block_ready) begin
      cnt    <= '0;
      active <= 1'b1;
    end else if (active) begin
      cnt    <= cnt + 1'b1;
      active <= (cnt != 3'd7);
    end
  end

  // routing of the current row's components to blocks A..D
  logic signed [DW-1:0] sel [NCOMP][N];
  always_comb begin
    for (int i = 0; i < NCOMP; i++) begin
      for (int j = 0; j < N; j++) begin
        int p;
        p = ai_port(int'(cnt), i);
        sel[i][j] = (p < 0) ? '0 : bank[j][p];
      end
    end
  end

  always_ff @(posedge clk) begin
    row_x   <= sel;
    row_idx <= cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_valid <= 1'b0;
    else        row_valid <= active;
  end

  // A block may only be replaced once its last row is being presented.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 block_ready |-> (!active || cnt == 3'd7))
    else $error("ai_cross_connect: new block before previous block was read out");

endmodule
