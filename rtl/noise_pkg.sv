// noise_pkg: constants, types and the LFSR step function shared by the
// Gaussian noise generator.
//
// The system clock is the 12 MHz oscillator of an iCE40 board. Samples are
// 12 bits wide, the amplitude code is 4 bits (it drives an external 4-bit
// R-2R DAC) and the sampling frequency is given in Hz as a 24-bit number.
// The reset values of seed, frequency and amplitude (2048, 10 kHz, 0) are the
// values the host program starts with.
//
// LFSR: Fibonacci form with the maximal-length taps 12, 6, 4, 1, XOR
// feedback. Its 4095 states exclude 0, which would lock the register; the
// helper nz_seed() therefore replaces a seed of 0 by 1 (a design choice).
package noise_pkg;

  localparam int unsigned CLK_HZ_DEFAULT = 12_000_000;
  localparam int unsigned SAMPLE_W = 12;   // LFSR and noise sample width
  localparam int unsigned AMP_W    = 4;    // amplitude code width
  localparam int unsigned FREQ_W   = 24;   // sampling frequency in Hz
  localparam int unsigned N_LFSR   = 4;    // LFSR counters averaged

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [AMP_W-1:0]    amp_t;
  typedef logic [FREQ_W-1:0]   freq_t;

  localparam sample_t DEFAULT_SEED = sample_t'(2048);
  localparam freq_t   DEFAULT_FREQ = freq_t'(10_000);
  localparam amp_t    DEFAULT_AMP  = amp_t'(0);

  // Noise generator settings as loaded by the host.
  typedef struct packed {
    sample_t seed;
    freq_t   freq;
    amp_t    amp;
  } params_t;

  // One step of the 12-bit LFSR, taps 12,6,4,1 (bits 11,5,3,0).
  function automatic sample_t lfsr_step(sample_t s);
    return {s[SAMPLE_W-2:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  // Seeds of 0 would lock the LFSR.
  function automatic sample_t nz_seed(sample_t s);
    return (s == '0) ? sample_t'(1) : s;
  endfunction

endpackage
