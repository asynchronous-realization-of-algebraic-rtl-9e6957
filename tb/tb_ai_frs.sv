// tb_ai_frs - self-checking testbench of the final reconstruction step.
//
// Drives random 4 x 22 doubly AI-encoded rows (random valid gaps). Each output
// coefficient v is compared with the real-valued double decode
//   sum_i sum_j W[i]*W[j] * blk[i][port(v, j)]
// computed here with $cos-based weights. The allowed error is the rounding of
// the weights (16 terms of |blk| * 2^-(CONST_FRAC+1)) plus the output rounding
// 2^-(OUT_FRAC+1). Latency must be 2 clocks and out_row must follow in_row.
module tb_ai_frs;
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;

  localparam int unsigned YW = 16, CONST_FRAC = 20, OUT_FRAC = 2;
  localparam int unsigned OUT_W = YW + 1 + OUT_FRAC;
  localparam int NROW = 500;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0] in_row = '0, out_row;
  logic signed [YW-1:0] blk [NCOMP][NAI];
  logic signed [OUT_W-1:0] coef [N];

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0;

  typedef struct { int b [NCOMP][NAI]; int row; longint t; } item_t;
  item_t q [$];

  ai_frs #(.YW(YW), .CONST_FRAC(CONST_FRAC), .OUT_FRAC(OUT_FRAC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        it = q.pop_front();
        checks++;
        if (cycle - it.t != 2 || int'(out_row) != it.row) begin
          failures++;
          $display("latency %0d row %0d, expected 2 and %0d", cycle - it.t, out_row, it.row);
        end
        for (int v = 0; v < N; v++) begin
          real e, got, tol, err;
          e = 0.0;
          tol = 1.0 / real'(1 << (OUT_FRAC + 1)) + 1e-9;
          for (int i = 0; i < NCOMP; i++)
            for (int j = 0; j < NCOMP; j++)
              if (ai_port(v, j) >= 0) begin
                e += weight(i) * weight(j) * real'(it.b[i][ai_port(v, j)]);
                tol += (it.b[i][ai_port(v, j)] < 0 ? -it.b[i][ai_port(v, j)] : it.b[i][ai_port(v, j)])
                       / real'(1 << (CONST_FRAC + 1));
              end
          got = real'(coef[v]) / real'(1 << OUT_FRAC);
          err = (got > e) ? got - e : e - got;
          if (err > max_err) max_err = err;
          checks++;
          if (err > tol) begin
            failures++;
            $display("v=%0d got %f expected %f", v, got, e);
          end
        end
      end
    end
  end

  initial begin
    item_t it;
    for (int i = 0; i < NCOMP; i++) for (int p = 0; p < NAI; p++) blk[i][p] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < NROW; r++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        r--;
        continue;
      end
      for (int i = 0; i < NCOMP; i++)
        for (int p = 0; p < NAI; p++) begin
          // magnitudes keep the decoded value inside the output range,
          // as a real 2D DCT row does (|Y| < 2^15 for 8-bit input)
          it.b[i][p] = (r < 2) ? ((r == 0) ? 2047 : -2048)
                     : (r % 5 == 0) ? int'($urandom_range(0, 65535)) - 32768
                     : int'($urandom_range(0, 4095)) - 2048;
          if (r % 5 == 0 && i != 0) it.b[i][p] = 0;
          if (r % 5 == 0 && p % 4 != 0) it.b[i][p] = it.b[i][p] / 16;
          blk[i][p] = YW'(it.b[i][p]);
        end
      it.row = r % 8;
      in_row = 3'(it.row);
      it.t = cycle;
      in_valid = 1;
      q.push_back(it);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d rows missing", q.size());
    end
    $display("largest error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
