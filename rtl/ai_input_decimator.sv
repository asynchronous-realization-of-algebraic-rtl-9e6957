// ai_input_decimator - input section: serial sample stream to parallel columns.
//
// Function: a chain of seven z^-1 delays on the incoming sample stream gives
// eight taps; each tap is decimated by 8, so every eighth accepted sample the
// eight taps are presented together as one column x[0..7] for the column DCT.
// Tap n is the sample delayed by n, so x[0] is the newest sample of the group
// and x[7] the oldest: a column whose rows r = 0..7 are to reach x[r] must be
// sent row 7 first and row 0 last.
//
// Interface and timing: one sample per clock when in_valid is high (the input
// rate F_s). The delay line advances only on in_valid. A phase counter, reset
// to 0, counts accepted samples; on the eighth one the column is registered
// and out_valid pulses for one clock, one clock after that sample was
// accepted, i.e. the column rate is F_s/8. The delay line and decimation
// follow the document; the phase counter, the valid flag and the reset are
// this design's choices.
module ai_input_decimator
  import ai_dct_pkg::*;
#(
  parameter int unsigned IN_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] s_in,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] x [N]
);

  logic signed [IN_W-1:0] dly [1:N-1];   // z^-1 chain, dly[n] = sample delayed by n
  logic [$clog2(N)-1:0]   phase;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dly[1] <= s_in;
      for (int n = 2; n < N; n++) dly[n] <= dly[n-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (phase == 3'(N - 1));
      if (in_valid) phase <= phase + 1'b1;
    end
  end

  // down-sampling by 8: capture all taps on the last sample of a group
  always_ff @(posedge clk) begin
    if (in_valid && phase == 3'(N - 1)) begin
      x[0] <= s_in;
      for (int n = 1; n < N; n++) x[n] <= dly[n];
    end
  end

endmodule
