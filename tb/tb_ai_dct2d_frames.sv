// tb_ai_dct2d_frames - frame-sized workloads for the 2D AI DCT core.
//
// Transforms two synthetic 8-bit luma frames, 416x240 and 832x480 (the
// picture sizes of the test sequences the transform was evaluated on), split
// into 8x8 blocks in raster order and sent at full rate, one column per clock
// with no pause. Pixels are level-shifted to signed (p - 128). The picture is
// a diagonal ramp with a sinusoidal texture and random noise, so blocks range
// from flat to busy. Every coefficient of every block is compared with the
// Arai-scaled 2D DCT computed from a cosine table (allowed error 0.5), and the
// number of clocks per frame must be 8 per block plus the pipeline latency.
module tb_ai_dct2d_frames;
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;

  localparam int unsigned IN_W = 8, OUT_FRAC = 2;
  localparam int unsigned OUT_W = IN_W + 9 + OUT_FRAC;
  localparam int LATENCY = 13;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0] out_row;
  logic signed [IN_W-1:0] x [N];
  logic signed [OUT_W-1:0] coef [N];

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0;
  real cosv [8][8];           // cosv[k][n] = s_k * cos((2n+1)k*pi/16)

  typedef struct { int a [8][8]; } blk_t;
  blk_t q [$];
  blk_t cur;
  int   next_row = 8;
  int   blocks_out = 0;

  ai_dct2d_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
        end
      end
      if (next_row < 8) begin
        for (int v = 0; v < N; v++) begin
          real e, got, err;
          e = 0.0;
          for (int n = 0; n < 8; n++)
            for (int j = 0; j < 8; j++)
              e += cur.a[n][j] * cosv[next_row][n] * cosv[v][j];
          got = real'(coef[v]) / real'(1 << OUT_FRAC);
          err = (got > e) ? got - e : e - got;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 0.5) begin
            failures++;
            if (failures < 20) $display("Y[%0d][%0d] = %f expected %f", next_row, v, got, e);
          end
        end
        next_row++;
        if (next_row == 8) blocks_out++;
      end
    end
  end

  function automatic int pixel(input int px, input int py, input int fw);
    real r;
    int p;
    r = 0.35 * real'(px + py) * 256.0 / real'(fw) + 40.0 * $sin(real'(px) * 0.21) * $cos(real'(py) * 0.13);
    p = int'(r) + int'($urandom_range(0, 16)) - 8 + 64;
    if (p < 0) p = 0;
    if (p > 255) p = 255;
    return p - 128;
  endfunction

  task automatic run_frame(input int fw, input int fh);
    longint t0;
    int nblk, out0;
    blk_t b;
    nblk = (fw / 8) * (fh / 8);
    out0 = blocks_out;
    for (int by = 0; by < fh / 8; by++)
      for (int bx = 0; bx < fw / 8; bx++) begin
        for (int n = 0; n < 8; n++)
          for (int j = 0; j < 8; j++) b.a[n][j] = pixel(bx * 8 + j, by * 8 + n, fw);
        for (int j = 0; j < 8; j++) begin
          @(negedge clk);
          for (int n = 0; n < 8; n++) x[n] = IN_W'(b.a[n][j]);
          in_valid = 1;
          if (bx == 0 && by == 0 && j == 0) t0 = cycle;   // clocks seen before the first column
          if (j == 7) q.push_back(b);
        end
      end
    @(negedge clk);
    in_valid = 0;
    wait (blocks_out == out0 + nblk);
    @(negedge clk);
    checks++;
    // 8 clocks per block, the pipeline latency and 7 more rows of the last
    // block: the last row is sampled on clock 8*nblk + LATENCY + 7
    if (cycle - t0 != longint'(8 * nblk + LATENCY + 7)) begin
      failures++;
      $display("frame %0dx%0d took %0d clocks, expected %0d", fw, fh, cycle - t0, 8 * nblk + LATENCY + 7);
    end
    $display("frame %0dx%0d: %0d blocks in %0d clocks", fw, fh, nblk, cycle - t0);
  endtask

  initial begin
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        cosv[k][n] = arai_scale(k) * $cos((2 * n + 1) * k * PI / 16.0);
    for (int n = 0; n < N; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(416, 240);
    run_frame(832, 480);
    repeat (5) @(posedge clk);
    $display("largest error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
