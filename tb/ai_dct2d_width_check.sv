// ai_dct2d_width_check - test harness for one input width of ai_dct2d_core.
//
// Instantiates ai_dct2d_core with IN_W = L and streams NBLK blocks of random
// L-bit signed samples (the first two blocks all-max and all-min), one column
// per clock at full rate, then compares every coefficient with the Arai-scaled
// 2D DCT from the cosine definition (allowed error 0.5). Reports its counts on
// its outputs once 'done' is high.
module ai_dct2d_width_check
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;
#(
  parameter int unsigned L    = 5,
  parameter int          NBLK = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned OUT_FRAC = 2;
  localparam int unsigned OUT_W = L + 9 + OUT_FRAC;

  logic in_valid = 0, out_valid;
  logic [2:0] out_row;
  logic signed [L-1:0] x [N];
  logic signed [OUT_W-1:0] coef [N];

  typedef struct { int a [8][8]; } blk_t;
  blk_t q [$];
  blk_t cur;
  int next_row = 8, blocks_out = 0;

  ai_dct2d_core #(.IN_W(L), .OUT_FRAC(OUT_FRAC)) dut (.*);

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (next_row == 8 && q.size() != 0) begin
        cur = q.pop_front();
        next_row = 0;
      end
      if (next_row < 8) begin
        checks++;
        if (int'(out_row) != next_row) failures++;
        for (int v = 0; v < N; v++) begin
          real e, got, err;
          e = dct2d_ref(cur.a, next_row, v);
          got = real'(coef[v]) / real'(1 << OUT_FRAC);
          err = (got > e) ? got - e : e - got;
          checks++;
          if (err > 0.5) begin
            failures++;
            $display("L=%0d Y[%0d][%0d] = %f expected %f", L, next_row, v, got, e);
          end
        end
        next_row++;
        if (next_row == 8) blocks_out++;
      end else begin
        failures++;
        $display("L=%0d: output without a block", L);
      end
    end
  end

  initial begin
    blk_t b;
    int lo, hi;
    lo = -(1 << (L - 1));
    hi = (1 << (L - 1)) - 1;
    for (int n = 0; n < N; n++) x[n] = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int i = 0; i < NBLK; i++) begin
      for (int n = 0; n < 8; n++)
        for (int j = 0; j < 8; j++)
          b.a[n][j] = (i == 0) ? hi : (i == 1) ? lo : int'($urandom_range(0, hi - lo)) + lo;
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        for (int n = 0; n < 8; n++) x[n] = L'(b.a[n][j]);
        in_valid = 1;
        if (j == 7) q.push_back(b);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(posedge clk);
    if (blocks_out != NBLK) begin
      failures++;
      $display("L=%0d: %0d of %0d blocks returned", L, blocks_out, NBLK);
    end
    done = 1;
  end

endmodule
