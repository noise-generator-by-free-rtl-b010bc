// analog_chain: behavioural model of the board's analog parts, for
// simulation only (not synthesizable; real-valued ports).
//
//  * 4-bit R-2R ladder DAC in voltage-summing mode, driven by the amplitude
//    pins:  v_ref = VIO * dd / 16.
//  * 12-bit multiplying DAC (DAC7541 class) in the usual two-op-amp bipolar
//    (four-quadrant) connection, reference v_ref, driven by the noise pins:
//    v_noise = v_ref * (2*d/4096 - 1), i.e. +-v_ref peak, 0 V at mid-scale.
//  * Mixing network: unity-gain sum, v_out = v_sig + v_noise.
// The ideal, zero-delay equations are this model's assumptions; VIO = 3.3 V
// is the iCE40 I/O supply assumed to drive the ladder.
module analog_chain #(
  parameter real VIO = 3.3
) (
  input  logic [11:0] d,
  input  logic [3:0]  dd,
  input  real         v_sig,
  output real         v_ref,
  output real         v_noise,
  output real         v_out
);

  always_comb begin
    v_ref   = VIO * real'(dd) / 16.0;
    v_noise = v_ref * (2.0 * real'(d) / 4096.0 - 1.0);
    v_out   = v_sig + v_noise;
  end

endmodule
