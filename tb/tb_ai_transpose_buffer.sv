// tb_ai_transpose_buffer - self-checking testbench of the AI transposition buffer.
//
// Writes random 22-wide columns with random gaps. After every write all 176
// taps are compared with a model history (tap[m] = column written m writes
// ago), and block_ready must be high exactly in the clock after every eighth
// column, i.e. when the taps hold one whole block.
module tb_ai_transpose_buffer;
  import ai_dct_pkg::*;

  localparam int unsigned DW   = 12;
  localparam int          NCOL = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, block_ready;
  logic signed [DW-1:0] col [NAI];
  logic signed [DW-1:0] tap [N][NAI];

  int checks = 0, failures = 0, blocks = 0;
  int hist [$];          // flattened history, newest column first
  int written = 0;
  bit check_now = 0;

  ai_transpose_buffer #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampled one clock after a write
  always @(negedge clk) begin
    if (rst_n && check_now && written >= N) begin
      for (int m = 0; m < N; m++)
        for (int p = 0; p < NAI; p++) begin
          checks++;
          if (int'(tap[m][p]) != hist[m * NAI + p]) begin
            failures++;
            $display("tap[%0d][%0d]=%0d expected %0d", m, p, tap[m][p], hist[m * NAI + p]);
          end
        end
    end
    if (rst_n) begin
      checks++;
      if (block_ready != (check_now && written % N == 0)) begin
        failures++;
        $display("block_ready=%0b after %0d columns", block_ready, written);
      end
      if (block_ready) blocks++;
    end
  end

  initial begin
    int v [NAI];
    for (int p = 0; p < NAI; p++) col[p] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < NCOL; c++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        @(posedge clk);
        check_now = 0;
        @(negedge clk);
      end
      for (int p = 0; p < NAI; p++) begin
        v[p] = int'($urandom_range(0, 4095)) - 2048;
        col[p] = DW'(v[p]);
      end
      in_valid = 1;
      @(posedge clk);
      for (int p = NAI - 1; p >= 0; p--) hist.push_front(v[p]);
      written++;
      check_now = 1;
      @(negedge clk);
      in_valid = 0;
    end
    @(posedge clk);
    check_now = 0;
    repeat (3) @(posedge clk);
    if (blocks != NCOL / N) begin
      failures++;
      $display("%0d blocks seen, expected %0d", blocks, NCOL / N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
