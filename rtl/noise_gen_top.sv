// noise_gen_top: FPGA part of a Gaussian white-noise generator.
//
// The host PC sends seed, sampling frequency and amplitude over a USB-UART
// bridge. uart_rx turns the serial line into bytes, param_loader assembles
// them into the three settings, and gauss_gen produces a new 12-bit
// Gaussian-distributed sample at the programmed sampling frequency. The
// sample leaves on D0..D11 for an external 12-bit DAC; the 4-bit amplitude
// code leaves on DD0..DD3 for an external R-2R DAC that sets the reference of
// the analog bipolar output stage. Analog parts (DACs, bipolar stage, mixing
// network) and the USB bridge are outside the FPGA.
//
// Ports: uart_rx_i is the TX line of the bridge; enable turns the LFSR
// counters on or off; d_o is the noise word (held between samples, with
// d_valid_o pulsing once per sample); dd_o is the amplitude code. rst is a
// synchronous active-high reset (this design's choice), after which the
// generator runs with seed 2048, 10 kHz and amplitude 0 until the host
// sends a frame.
module noise_gen_top
  import noise_pkg::*;
#(
  parameter int unsigned CLK_HZ      = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned SEED_PERIOD = 64,
  parameter int unsigned RX_TIMEOUT  = 12_000
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    uart_rx_i,
  input  logic    enable,
  output sample_t d_o,
  output logic    d_valid_o,
  output amp_t    dd_o,
  output logic    rx_err_o
);

  logic [7:0] rx_data;
  logic       rx_valid;
  logic       rx_ferr;
  logic       frame_drop;
  params_t    params;
  logic       load;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk       (clk),
    .rst       (rst),
    .rx        (uart_rx_i),
    .data      (rx_data),
    .valid     (rx_valid),
    .frame_err (rx_ferr)
  );

  param_loader #(.TIMEOUT(RX_TIMEOUT)) u_params (
    .clk        (clk),
    .rst        (rst),
    .byte_data  (rx_data),
    .byte_valid (rx_valid),
    .params     (params),
    .load       (load),
    .frame_drop (frame_drop)
  );

  gauss_gen #(.CLK_HZ(CLK_HZ), .SEED_PERIOD(SEED_PERIOD)) u_gauss (
    .clk         (clk),
    .rst         (rst),
    .freq        (params.freq),
    .seed        (params.seed),
    .load        (load),
    .enable      (enable),
    .noise       (d_o),
    .noise_valid (d_valid_o)
  );

  assign dd_o = params.amp;

  // Sticky receive error: a bad stop bit or an incomplete parameter frame.
  always_ff @(posedge clk) begin
    if (rst)                          rx_err_o <= 1'b0;
    else if (rx_ferr || frame_drop)   rx_err_o <= 1'b1;
  end

endmodule
