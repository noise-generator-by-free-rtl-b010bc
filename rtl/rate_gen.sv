// rate_gen: sample-rate tick generator.
//
// Turns a sampling frequency given in Hz into single-clock enable pulses at
// that average rate, without a divider: a phase accumulator adds FREQ every
// clock and, whenever it reaches CLK_HZ, subtracts CLK_HZ and emits a tick.
// The tick spacing is therefore floor or ceil of CLK_HZ/FREQ clocks, and over
// CLK_HZ clocks exactly FREQ ticks are produced. FREQ = 0 stops the ticks;
// FREQ >= CLK_HZ gives a tick on every clock.
//
// The sampling frequency in Hz as the setting follows the host program, which
// sends a "sampling period (Hz)"; the accumulator scheme is this design's own.
//
// Interface: freq is sampled every clock; tick is registered (one clock after
// the accumulator crosses). Synchronous active-high reset and clear both
// zero the phase, so the first tick after a clear comes ceil(CLK_HZ/freq)
// clocks later.
module rate_gen
  import noise_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  freq_t freq,
  output logic  tick
);

  localparam int unsigned ACC_W = $clog2(CLK_HZ) + 2;
  typedef logic [ACC_W-1:0] acc_t;

  acc_t acc;
  acc_t inc;
  acc_t sum;

  always_comb begin
    inc = (32'(freq) >= CLK_HZ) ? acc_t'(CLK_HZ) : acc_t'(freq);
    sum = acc + inc;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (sum >= acc_t'(CLK_HZ)) begin
      acc  <= sum - acc_t'(CLK_HZ);
      tick <= 1'b1;
    end else begin
      acc  <= sum;
      tick <= 1'b0;
    end
  end

endmodule
