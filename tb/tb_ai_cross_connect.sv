// tb_ai_cross_connect - self-checking testbench of the cross-connections.
//
// The 176 taps change to new random values every clock; block_ready pulses
// either every eighth clock (full rate, back to back) or with random longer
// spacing. For each pulse the taps of that clock are remembered, and the
// eight following clocks must present rows u = 0..7 with
//   row_x[i][j] = tap[7-j][port(u, i)], or 0 when row u has no component i,
// row_idx = u and row_valid high; row_valid must be low otherwise.
module tb_ai_cross_connect;
  import ai_dct_pkg::*;

  localparam int unsigned DW = 12;
  localparam int          NBLK = 60;

  logic clk = 0, rst_n = 0;
  logic block_ready = 0, row_valid;
  logic [2:0] row_idx;
  logic signed [DW-1:0] tap [N][NAI];
  logic signed [DW-1:0] row_x [NCOMP][N];

  int checks = 0, failures = 0, back_to_back = 0;

  typedef struct { int t [N][NAI]; } snap_t;
  snap_t blocks [$];
  snap_t cur;
  int    row_u = 8;    // row expected next; 8 = none pending

  ai_cross_connect #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: sample after each edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (row_valid != (row_u < 8)) begin
        failures++;
        $display("row_valid=%0b, expected row %0d", row_valid, row_u);
      end
      if (row_valid && row_u < 8) begin
        checks++;
        if (int'(row_idx) != row_u) begin
          failures++;
          $display("row_idx=%0d expected %0d", row_idx, row_u);
        end
        for (int i = 0; i < NCOMP; i++)
          for (int j = 0; j < N; j++) begin
            int p, e;
            p = ai_port(row_u, i);
            e = (p < 0) ? 0 : cur.t[N-1-j][p];
            checks++;
            if (int'(row_x[i][j]) != e) begin
              failures++;
              $display("row %0d blk %0d col %0d: %0d expected %0d", row_u, i, j, row_x[i][j], e);
            end
          end
      end
      if (row_u < 8) row_u++;
      // a capture in the previous clock starts a new block of rows
      if (blocks.size() != 0) begin
        cur = blocks.pop_front();
        row_u = 0;
      end
    end
  end

  initial begin
    snap_t s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NBLK; b++) begin
      int gap;
      gap = (b % 3 == 0) ? int'($urandom_range(0, 12)) : 0;
      if (gap == 0 && b > 0) back_to_back++;
      for (int c = 0; c < 7 + gap; c++) begin
        @(negedge clk);
        block_ready = 0;
        for (int m = 0; m < N; m++)
          for (int p = 0; p < NAI; p++) tap[m][p] = DW'($urandom);
      end
      @(negedge clk);
      for (int m = 0; m < N; m++)
        for (int p = 0; p < NAI; p++) begin
          s.t[m][p] = int'($urandom_range(0, 4095)) - 2048;
          tap[m][p] = DW'(s.t[m][p]);
        end
      block_ready = 1;
      @(posedge clk);
      blocks.push_back(s);
    end
    @(negedge clk);
    block_ready = 0;
    repeat (12) @(posedge clk);
    if (back_to_back == 0) begin
      failures++;
      $display("no back-to-back blocks exercised");
    end
    $display("back-to-back blocks: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
