// tb_ai_dct1d - self-checking testbench of the 8-point AI Arai DCT.
//
// Streams random and extreme input vectors (with random gaps in in_valid)
// through ai_dct1d. For every output vector each of the eight coefficients is
// decoded from its AI tuple with real weights and compared against the cosine
// definition of the Arai-scaled DCT (ai_dct_ref_pkg); the result must match to
// within 1e-6 because the AI computation is exact. The latency must be
// DCT1D_LAT clocks for every vector.
module tb_ai_dct1d;
  import ai_dct_pkg::*;
  import ai_dct_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int          NVEC = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [IN_W-1:0] x [N];
  logic signed [IN_W+3:0] y [NAI];

  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct { int v [8]; longint t; } item_t;
  item_t q [$];

  ai_dct1d #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        it = q.pop_front();
        checks++;
        if (cycle - it.t != DCT1D_LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - it.t, DCT1D_LAT);
        end
        for (int k = 0; k < 8; k++) begin
          real got, exp_v;
          got = 0.0;
          for (int cmp = 0; cmp < 4; cmp++)
            if (ai_port(k, cmp) >= 0) got += weight(cmp) * real'(y[ai_port(k, cmp)]);
          exp_v = dct1d_ref(it.v, k);
          checks++;
          if ((got - exp_v) > 1e-6 || (exp_v - got) > 1e-6) begin
            failures++;
            $display("k=%0d got %f expected %f", k, got, exp_v);
          end
        end
      end
    end
  end

  initial begin
    item_t it;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0 && n > 20) begin
        in_valid = 0;
        n--;
        continue;
      end
      for (int i = 0; i < N; i++) begin
        case (n)
          0: it.v[i] = 127;
          1: it.v[i] = -128;
          2: it.v[i] = (i % 2) ? -128 : 127;
          3: it.v[i] = (i < 4) ? 127 : -128;
          4: it.v[i] = (i == 0) ? 1 : 0;
          default: it.v[i] = int'($urandom_range(0, 255)) - 128;
        endcase
        x[i] = IN_W'(it.v[i]);
      end
      in_valid = 1;
      it.t = cycle;
      q.push_back(it);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d vectors never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
