// tb_ai_dct2d_top - end-to-end testbench of the complete 2D AI DCT, at the
// default parameters (8-bit samples).
//
// Feeds 8x8 blocks as a serial sample stream: column j of a block is sent as
// eight samples, row 7 first, so that the decimator's newest tap lands on row
// 0. Part of the run sends one sample per clock with no pause; the rest has
// random pauses. Blocks are random, extreme (all +127, all -128,
// checkerboards), and zero-padded 4x4, 4x8 and 8x4 blocks (the way the
// smaller transform sizes are computed with the 8x8 transform). Every output
// row is compared with the Arai-scaled 2D DCT from the cosine definition
// (allowed error 0.5); the clocks from a block's last sample to its row 0
// must be 14. The run fails if a mechanism (decimation, pauses in the input,
// zero padding, each row class a / a+d / a+b+c+d) never happened.
module tb_ai_dct2d_top;
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;

  localparam int unsigned IN_W = 8, OUT_FRAC = 2;
  localparam int unsigned OUT_W = IN_W + 9 + OUT_FRAC;
  localparam int NBLK_FULL = 24, NBLK_GAP = 16;
  localparam int LATENCY = 14;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0] out_row;
  logic signed [IN_W-1:0] s_in = '0;
  logic signed [OUT_W-1:0] coef [N];

  int checks = 0, failures = 0;
  int n_samples = 0, n_cols = 0, n_pauses = 0, n_padded = 0, n_rows [3];
  longint cycle = 0;
  real max_err = 0.0;

  typedef struct { int a [8][8]; longint t; } blk_t;
  blk_t q [$];
  blk_t cur;
  int   next_row = 8;

  ai_dct2d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && in_valid) n_samples++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
          3: b.a[n][j] = (j % 2) ? 127 : -128;
          4: b.a[n][j] = (n < 4 && j < 4) ? int'($urandom_range(0, 255)) - 128 : 0;
          5: b.a[n][j] = (n < 4) ? int'($urandom_range(0, 255)) - 128 : 0;
          6: b.a[n][j] = (j < 4) ? int'($urandom_range(0, 255)) - 128 : 0;
          default: b.a[n][j] = int'($urandom_range(0, 255)) - 128;
        endcase
    return b;
  endfunction

  task automatic send_block(input blk_t b, input bit pauses);
    for (int j = 0; j < 8; j++)
      for (int n = 7; n >= 0; n--) begin
        if (pauses) begin
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 0;
            n_pauses++;
          end
        end
        @(negedge clk);
        s_in = IN_W'(b.a[n][j]);
        in_valid = 1;
        if (j == 7 && n == 0) begin
          b.t = cycle;
          q.push_back(b);
        end
      end
  endtask

  initial begin
    blk_t b;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NBLK_FULL; i++) begin
      b = make_block(i < 7 ? i : 7);
      if (i >= 4 && i <= 6) n_padded++;
      send_block(b, 0);
    end
    for (int i = 0; i < NBLK_GAP; i++) begin
      b = make_block(i % 4 == 0 ? 4 : 7);
      if (i % 4 == 0) n_padded++;
      send_block(b, 1);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LATENCY + 12) @(posedge clk);
    if (q.size() != 0 || next_row != 8) begin
      failures++;
      $display("%0d blocks not (fully) returned", q.size());
    end
    n_cols = n_samples / 8;
    checks++;
    if (n_samples != 64 * (NBLK_FULL + NBLK_GAP)) begin
      failures++;
      $display("%0d samples sent, expected %0d", n_samples, 64 * (NBLK_FULL + NBLK_GAP));
    end
    $display("columns %0d, input pauses %0d, zero-padded blocks %0d, rows a:%0d a+d:%0d abcd:%0d, largest error %f",
             n_cols, n_pauses, n_padded, n_rows[0], n_rows[1], n_rows[2], max_err);
    if (n_cols == 0 || n_pauses == 0 || n_padded == 0 ||
        n_rows[0] == 0 || n_rows[1] == 0 || n_rows[2] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
