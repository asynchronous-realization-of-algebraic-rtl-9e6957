// tb_ai_dct2d_core - end-to-end testbench of the 2D AI DCT core (parallel input).
//
// Streams 8x8 blocks into ai_dct2d_core one column per clock: first a run of
// blocks back to back at full rate, then blocks with random gaps between and
// inside them. Blocks are random, extreme (all +127, all -128, checkerboards
// of +127/-128) and zero-padded 4x4 and 4x8 blocks. Every output row is
// compared with the Arai-scaled 2D DCT computed from the cosine definition;
// the allowed error is 0.5. The clocks from the eighth column of a block to
// its row 0 must be 13, and rows must arrive in the order 0..7 on consecutive
// clocks. The run fails if back-to-back blocks, gapped input or any row class
// (a only, a+d, a+b+c+d) was never exercised.
module tb_ai_dct2d_core;
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;

  localparam int unsigned IN_W = 8, OUT_FRAC = 2;
  localparam int unsigned OUT_W = IN_W + 9 + OUT_FRAC;
  localparam int NBLK_FULL = 40, NBLK_GAP = 20;
  localparam int LATENCY = 13;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0] out_row;
  logic signed [IN_W-1:0] x [N];
  logic signed [OUT_W-1:0] coef [N];

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gapped = 0, n_padded = 0, n_rows [3];
  longint cycle = 0;
  real max_err = 0.0;

  typedef struct { int a [8][8]; longint t; } blk_t;
  blk_t q [$];
  blk_t cur;
  int   next_row = 8;
  longint last_row_t = 0;

  ai_dct2d_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (next_row == 8) begin
        if (q.size() == 0) begin
          failures++;
          $display("output without a block");
        end else begin
          cur = q.pop_front();
          next_row = 0;
          checks++;
          if (cycle - cur.t != LATENCY) begin
            failures++;
            $display("latency %0d, expected %0d", cycle - cur.t, LATENCY);
          end
        end
      end else begin
        checks++;
        if (cycle - last_row_t != 1) begin
          failures++;
          $display("rows not on consecutive clocks");
        end
      end
      if (next_row < 8) begin
        checks++;
        if (int'(out_row) != next_row) begin
          failures++;
          $display("out_row=%0d expected %0d", out_row, next_row);
        end
        n_rows[(next_row % 2 == 1) ? 2 : (next_row % 4 == 2) ? 1 : 0]++;
        for (int v = 0; v < N; v++) begin
          real e, got, err;
          e = dct2d_ref(cur.a, next_row, v);
          got = real'(coef[v]) / real'(1 << OUT_FRAC);
          err = (got > e) ? got - e : e - got;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 0.5) begin
            failures++;
            $display("Y[%0d][%0d] = %f expected %f", next_row, v, got, e);
          end
        end
        next_row++;
        last_row_t = cycle;
      end
    end
  end

  function automatic blk_t make_block(input int kind);
    blk_t b;
    for (int n = 0; n < 8; n++)
      for (int j = 0; j < 8; j++)
        case (kind)
          0: b.a[n][j] = 127;
          1: b.a[n][j] = -128;
          2: b.a[n][j] = ((n + j) % 2) ? -128 : 127;
          3: b.a[n][j] = (n % 2) ? 127 : -128;
          4: b.a[n][j] = (n < 4 && j < 4) ? int'($urandom_range(0, 255)) - 128 : 0;
          5: b.a[n][j] = (n < 4) ? int'($urandom_range(0, 255)) - 128 : 0;
          default: b.a[n][j] = int'($urandom_range(0, 255)) - 128;
        endcase
    return b;
  endfunction

  task automatic send_block(input blk_t b, input bit gaps);
    for (int j = 0; j < 8; j++) begin
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
      @(negedge clk);
      for (int n = 0; n < 8; n++) x[n] = IN_W'(b.a[n][j]);
      in_valid = 1;
      if (j == 7) begin
        b.t = cycle;
        q.push_back(b);
      end
    end
  endtask

  initial begin
    blk_t b;
    for (int n = 0; n < N; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NBLK_FULL; i++) begin
      b = make_block(i < 6 ? i : 6);
      if (i == 4 || i == 5) n_padded++;
      if (i > 0) n_back_to_back++;
      send_block(b, 0);
    end
    for (int i = 0; i < NBLK_GAP; i++) begin
      b = make_block(6);
      n_gapped++;
      send_block(b, 1);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LATENCY + 12) @(posedge clk);
    if (q.size() != 0 || next_row != 8) begin
      failures++;
      $display("%0d blocks not (fully) returned", q.size());
    end
    $display("back-to-back %0d, gapped %0d, zero-padded %0d, rows a:%0d a+d:%0d abcd:%0d, largest error %f",
             n_back_to_back, n_gapped, n_padded, n_rows[0], n_rows[1], n_rows[2], max_err);
    if (n_back_to_back == 0 || n_gapped == 0 || n_padded == 0 ||
        n_rows[0] == 0 || n_rows[1] == 0 || n_rows[2] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
