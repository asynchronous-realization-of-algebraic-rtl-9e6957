// tb_ai_input_decimator - self-checking testbench of the decimation block.
//
// Sends a random sample stream with random gaps. For every group of eight
// accepted samples s[0..7] (in arrival order) the decimator must present one
// column with x[n] = s[7-n] (tap n = sample delayed by n) exactly one clock
// after s[7] was accepted, and must present nothing in between.
module tb_ai_input_decimator;
  import ai_dct_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int          NGRP = 60;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [IN_W-1:0] s_in = '0;
  logic signed [IN_W-1:0] x [N];

  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct { int s [8]; longint t; } grp_t;
  grp_t q [$];

  ai_input_decimator #(.IN_W(IN_W)) dut (.*);

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
      grp_t g;
      if (q.size() == 0) begin
        failures++;
        $display("column without a complete group");
      end else begin
        g = q.pop_front();
        checks++;
        if (cycle - g.t != 1) begin
          failures++;
          $display("column %0d clocks after last sample", cycle - g.t);
        end
        for (int n = 0; n < N; n++) begin
          checks++;
          if (int'(x[n]) != g.s[7-n]) begin
            failures++;
            $display("x[%0d]=%0d expected %0d", n, x[n], g.s[7-n]);
          end
        end
      end
    end
  end

  initial begin
    grp_t g;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int gi = 0; gi < NGRP; gi++) begin
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          s_in = IN_W'($urandom);   // ignored while in_valid is low
          @(negedge clk);
        end
        g.s[i] = int'($urandom_range(0, 255)) - 128;
        s_in = IN_W'(g.s[i]);
        in_valid = 1;
        if (i == 7) begin
          g.t = cycle;
          q.push_back(g);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d columns missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
