// tb_ai_dct2d_widths - the 2D AI DCT core at every input width from 3 to 7
// bits (8 bits, the default, is covered by the other testbenches).
//
// Runs one ai_dct2d_width_check harness per width side by side and adds up
// their checks and failures.
module tb_ai_dct2d_widths;

  localparam int NW = 5;

  logic clk = 0, rst_n = 0;
  int   c [NW], f [NW];
  logic d [NW];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar w = 0; w < NW; w++) begin : g_w
    ai_dct2d_width_check #(.L(3 + w), .NBLK(20)) u_chk (
      .clk, .rst_n, .checks(c[w]), .failures(f[w]), .done(d[w])
    );
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    forever begin
      @(posedge clk);
      if (d.and()) break;
    end
    for (int w = 0; w < NW; w++) begin
      $display("L=%0d: checks %0d failures %0d", 3 + w, c[w], f[w]);
      checks += c[w];
      failures += f[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
