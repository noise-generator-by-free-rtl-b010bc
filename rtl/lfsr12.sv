// lfsr12: 12-bit LFSR counter with programmable sample rate.
//
// A maximal-length 12-bit LFSR (taps 12,6,4,1, XOR feedback) steps through
// all 4095 non-zero states, one step per sample. The sample rate comes from
// an internal rate_gen driven by freq (Hz). load copies seed into the
// register at once (a seed of 0 becomes 1 so that the register cannot lock);
// enable gates the stepping. restart zeroes the sample-rate phase (used on a
// user seed load, so that a seed always reproduces the same sequence). The ports follow the block's parameter list:
// clock, Frec, seed[11:0], load and enable.
//
// Timing: load and the step are synchronous. When load and a sample tick
// fall on the same clock, the seed is loaded and stepped once in that clock.
// valid pulses for one clock each time q has just advanced by one sample.
// The tap positions and the load/step ordering are this design's choices.
module lfsr12
  import noise_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT
) (
  input  logic    clk,
  input  logic    rst,
  input  freq_t   freq,
  input  sample_t seed,
  input  logic    load,
  input  logic    restart,
  input  logic    enable,
  output sample_t q,
  output logic    valid
);

  logic    tick;
  sample_t base;

  rate_gen #(.CLK_HZ(CLK_HZ)) u_rate (
    .clk  (clk),
    .rst  (rst),
    .clear(restart),
    .freq (freq),
    .tick (tick)
  );

  assign base = load ? nz_seed(seed) : q;

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= nz_seed(DEFAULT_SEED);
      valid <= 1'b0;
    end else begin
      valid <= enable && tick;
      if (enable && tick) q <= lfsr_step(base);
      else if (load)      q <= base;
    end
  end

endmodule
