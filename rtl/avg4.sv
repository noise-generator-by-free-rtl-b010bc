// avg4: average of the four LFSR samples (central-limit step).
//
// When sample_in pulses, the four 12-bit samples are summed into a 14-bit
// sum and shifted right by 2, i.e. divided by 4 with truncation, and the
// result is held in avg until the next sample. Averaging independent uniform
// samples pushes the distribution towards a Gaussian. Sum-then-shift follows
// the generator's description; holding the output between samples (so that
// the noise word changes only at the sampling frequency) is this design's
// choice.
//
// Timing: avg and valid are registered one clock after sample_in.
module avg4
  import noise_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t l   [N_LFSR],
  input  logic    sample_in,
  output sample_t avg,
  output logic    valid
);

  localparam int unsigned SUM_W = SAMPLE_W + $clog2(N_LFSR);

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < N_LFSR; k++) sum += SUM_W'(l[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      avg   <= sample_t'(1 << (SAMPLE_W - 1));
      valid <= 1'b0;
    end else begin
      valid <= sample_in;
      if (sample_in) avg <= sum[SUM_W-1 -: SAMPLE_W];
    end
  end

endmodule
