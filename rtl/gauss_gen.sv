// gauss_gen: random sequence generator with (approximately) Gaussian
// distribution.
//
// Four 12-bit LFSR counters produce uniformly distributed samples at the
// programmed sampling frequency. A seed loader, reloaded by the user seed,
// hands every counter a different fresh seed every 64 clocks, so the four
// sequences stay unlike each other. avg4 averages the four samples
// ((L1+L2+L3+L4)/4 by sum and 2-bit shift), which by the central limit
// theorem gives a bell-shaped distribution around mid-scale. This structure
// is the one the generator is described with. A user load also restarts the
// counters' sample-rate phase (this design's choice), so that a given seed and
// frequency always give the same sample sequence.
//
// Interface: freq (Hz), seed and load, enable; noise is the 12-bit averaged
// sample, held between samples, and noise_valid pulses once per sample.
// Timing: noise_valid follows the sample tick by two clocks (LFSR step, then
// average register).
module gauss_gen
  import noise_pkg::*;
#(
  parameter int unsigned CLK_HZ      = CLK_HZ_DEFAULT,
  parameter int unsigned SEED_PERIOD = 64
) (
  input  logic    clk,
  input  logic    rst,
  input  freq_t   freq,
  input  sample_t seed,
  input  logic    load,
  input  logic    enable,
  output sample_t noise,
  output logic    noise_valid
);

  sample_t seeds [N_LFSR];
  sample_t l     [N_LFSR];
  logic    seed_load;
  logic [N_LFSR-1:0] lvalid;

  seed_loader #(.PERIOD(SEED_PERIOD)) u_seed (
    .clk       (clk),
    .rst       (rst),
    .seed      (seed),
    .load      (load),
    .seeds     (seeds),
    .seed_load (seed_load)
  );

  for (genvar k = 0; k < N_LFSR; k++) begin : g_lfsr
    lfsr12 #(.CLK_HZ(CLK_HZ)) u_lfsr (
      .clk    (clk),
      .rst    (rst),
      .freq   (freq),
      .seed   (seeds[k]),
      .load   (seed_load),
      .restart(load),
      .enable (enable),
      .q      (l[k]),
      .valid  (lvalid[k])
    );
  end

  // All four counters share reset and frequency, so their valids coincide.
  avg4 u_avg (
    .clk       (clk),
    .rst       (rst),
    .l         (l),
    .sample_in (lvalid[0]),
    .avg       (noise),
    .valid     (noise_valid)
  );

`ifndef SYNTHESIS
  a_lockstep: assert property (@(posedge clk) disable iff (rst) lvalid == '0 || lvalid == '1)
    else $error("LFSR counters out of step");
`endif

endmodule
