// seed_loader: gives each of the four LFSR counters its own, changing seed.
//
// An internal 12-bit LFSR (same taps as lfsr12) runs at the full system
// clock. When the user loads a seed, it is copied into this LFSR (0 becomes
// 1) and the 64-clock period restarts. Every 64 clocks, seed_load pulses and
// seeds[0..3] carry four new seeds. Feeding all counters the same seed would
// make the average equal to a single LFSR's output, so the four seeds must
// differ: they are the internal LFSR's states captured at clocks 16, 32, 48
// and 64 of the period, 16 LFSR steps apart and hence always distinct.
//
// The 12 MHz internal LFSR, the user seed and the 64-clock period follow the
// generator's description; how the four seeds are taken from the internal
// LFSR is this design's choice.
//
// Timing: seeds and seed_load are registered; seed_load is high for one clock
// every PERIOD clocks, first PERIOD clocks after reset or a user load.
module seed_loader
  import noise_pkg::*;
#(
  parameter int unsigned PERIOD = 64
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t seed,
  input  logic    load,
  output sample_t seeds [N_LFSR],
  output logic    seed_load
);

  localparam int unsigned CNT_W = $clog2(PERIOD);
  localparam int unsigned SUB   = PERIOD / N_LFSR;

  sample_t    state;
  logic [CNT_W-1:0] cnt;
  sample_t    capt [N_LFSR];

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= nz_seed(DEFAULT_SEED);
      cnt       <= '0;
      seed_load <= 1'b0;
      for (int k = 0; k < N_LFSR; k++) begin
        capt[k]  <= '0;
        seeds[k] <= nz_seed(DEFAULT_SEED);
      end
    end else if (load) begin
      state     <= nz_seed(seed);
      cnt       <= '0;
      seed_load <= 1'b0;
    end else begin
      state     <= lfsr_step(state);
      cnt       <= (cnt == CNT_W'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      seed_load <= 1'b0;
      for (int k = 0; k < N_LFSR - 1; k++)
        if (cnt == CNT_W'(SUB * (k + 1) - 1)) capt[k] <= state;
      if (cnt == CNT_W'(PERIOD - 1)) begin
        for (int k = 0; k < N_LFSR - 1; k++) seeds[k] <= capt[k];
        seeds[N_LFSR-1] <= state;
        seed_load       <= 1'b1;
      end
    end
  end

endmodule
