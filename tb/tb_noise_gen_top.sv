// tb_noise_gen_top: end-to-end test of the noise generator FPGA design at its
// default parameters (12 MHz clock, 115200 baud), driven only through the
// serial line as the host program would drive it.
//
// For each sampling frequency tested with the hardware (10, 50 and 100 kHz)
// a parameter frame is sent and the sample rate on d_valid_o is measured;
// the amplitude code must appear on dd_o. The same seed sent twice must give
// the same sample sequence; different seeds different ones. Samples at
// 100 kHz are collected into a histogram whose mean, standard deviation and
// share within one and two standard deviations must match an averaged sum of
// four uniform variables. Enable low must stop the samples. A bad stop bit and
// a frame cut short must each raise rx_err_o.
//
// Mechanism counters (each must be non-zero): frames loaded, seed-loader
// reloads, samples, frequency changes, frame errors, frame timeouts,
// samples suppressed by enable.
module tb_noise_gen_top;
  import noise_pkg::*;
  localparam int unsigned CLK_HZ = 12_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int unsigned BIT    = (CLK_HZ + BAUD / 2) / BAUD;

  logic clk = 0, rst = 1, uart_rx_i = 1, enable = 1;
  sample_t d_o;
  logic d_valid_o, rx_err_o;
  amp_t dd_o;
  int checks = 0, failures = 0;

  noise_gen_top dut (.clk, .rst, .uart_rx_i, .enable, .d_o, .d_valid_o, .dd_o, .rx_err_o);

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  int n_frames = 0, n_reloads = 0, n_samples = 0, n_freq_changes = 0;
  int n_frame_err = 0, n_timeouts = 0, n_disabled = 0;
  int n_rx_err_seen = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (d_valid_o) n_samples++;
      if (dut.u_params.load) n_frames++;
      if (dut.u_gauss.seed_load) n_reloads++;
      if (dut.u_rx.frame_err) n_frame_err++;
      if (dut.u_params.frame_drop) n_timeouts++;
    end
  end

  task automatic send_byte(input logic [7:0] b, input bit stop = 1);
    uart_rx_i = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx_i = b[i]; repeat (BIT) @(posedge clk); end
    uart_rx_i = stop; repeat (BIT) @(posedge clk);
    uart_rx_i = 1;
  endtask

  task automatic send_frame(input logic [11:0] s, input logic [23:0] f, input logic [3:0] a);
    send_byte(8'h7E);
    send_byte({4'h0, s[11:8]}); send_byte(s[7:0]);
    send_byte(f[23:16]); send_byte(f[15:8]); send_byte(f[7:0]);
    send_byte({4'h0, a});
    repeat (BIT) @(posedge clk);
  endtask

  // count samples in a window
  task automatic rate(input int unsigned f, input int unsigned clocks, output int n);
    int n0;
    n0 = n_samples;
    repeat (clocks) @(posedge clk);
    n = n_samples - n0;
  endtask

  // collect k samples
  task automatic grab(input int k, ref sample_t q [$]);
    q = {};
    while (q.size() < k) begin
      @(posedge clk); #1;
      if (d_valid_o) q.push_back(d_o);
    end
  endtask

  int unsigned freqs [3] = '{10_000, 50_000, 100_000};
  logic [3:0]  amps  [3] = '{4'd3, 4'd6, 4'd8};
  int n, expn, hist [16];
  sample_t qa [$], qb [$], qc [$], hs [$];
  real mean, sd, s1, s2;
  int in1, in2;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    check(dd_o == 0, "amplitude code 0 after reset");
    rate(10_000, 120_000, n);
    check(n inside {[99:101]}, $sformatf("default 10 kHz: %0d samples in 10 ms", n));

    // sampling frequencies used in the hardware tests
    foreach (freqs[i]) begin
      send_frame(12'd2048 + 12'(i), 24'(freqs[i]), amps[i]);
      n_freq_changes++;
      check(dd_o == amps[i], $sformatf("amplitude code %0d on DD", amps[i]));
      expn = int'(longint'(freqs[i]) * 240_000 / CLK_HZ);
      rate(freqs[i], 240_000, n);
      check(n >= expn - 1 && n <= expn + 1,
            $sformatf("%0d Hz: %0d samples in 20 ms, expected %0d", freqs[i], n, expn));
    end

    // same seed gives the same sequence, other seed another one
    send_frame(12'd777, 24'd100_000, 4'd5);
    grab(64, qa);
    send_frame(12'd777, 24'd100_000, 4'd5);
    grab(64, qb);
    send_frame(12'd778, 24'd100_000, 4'd5);
    grab(64, qc);
    n = 0; foreach (qa[i]) if (qa[i] != qb[i]) n++;
    check(n <= 2, $sformatf("same seed repeats the sequence (%0d of 64 differ)", n));
    n = 0; foreach (qa[i]) if (qa[i] != qc[i]) n++;
    check(n > 48, $sformatf("another seed changes the sequence (%0d of 64 differ)", n));

    // distribution at 100 kHz
    grab(15000, hs);
    s1 = 0; s2 = 0;
    foreach (hs[i]) begin s1 += hs[i]; s2 += real'(hs[i]) * hs[i]; hist[hs[i] >> 8]++; end
    mean = s1 / hs.size();
    sd = $sqrt(s2 / hs.size() - mean * mean);
    in1 = 0; in2 = 0;
    foreach (hs[i]) begin
      if (hs[i] > mean - sd && hs[i] < mean + sd) in1++;
      if (hs[i] > mean - 2 * sd && hs[i] < mean + 2 * sd) in2++;
    end
    $display("histogram of %0d samples (16 bins of 256):", hs.size());
    foreach (hist[b]) $display("  %4d..%4d %5d", b * 256, b * 256 + 255, hist[b]);
    $display("mean %.1f sd %.1f within 1 sd %.3f within 2 sd %.3f", mean, sd,
             real'(in1) / hs.size(), real'(in2) / hs.size());
    check(mean > 1950 && mean < 2150, "mean near mid-scale");
    check(sd > 500 && sd < 690, "standard deviation near 591");
    check(real'(in1) / hs.size() > 0.64, "more than 64 % within one sd");
    check(real'(in2) / hs.size() > 0.93, "more than 93 % within two sd");
    check(hist[7] + hist[8] > 3 * (hist[1] + hist[14]), "bell shape: centre bins dominate");

    // enable low
    enable = 0;
    repeat (4) @(posedge clk);
    rate(100_000, 24_000, n);
    n_disabled = 200 - n;
    check(n == 0, "enable low: no samples");
    enable = 1;

    // serial errors: bad stop bit, then (after reset) a frame cut short
    check(!rx_err_o, "no receive error so far");
    send_byte(8'h7E, 0);
    repeat (2 * BIT) @(posedge clk);
    check(rx_err_o, "bad stop bit raises the error flag");
    rst = 1; repeat (2) @(posedge clk); rst = 0;
    repeat (2) @(posedge clk);
    check(!rx_err_o && dd_o == 0, "reset clears the flag and the settings");
    send_byte(8'h7E); send_byte(8'h01);
    repeat (13_000) @(posedge clk);
    check(rx_err_o, "incomplete frame raises the error flag");
    send_frame(12'd100, 24'd50_000, 4'd15);
    check(dd_o == 4'd15, "receiver resynchronised after the incomplete frame");

    $display("mechanisms: frames %0d reloads %0d samples %0d freq_changes %0d frame_err %0d timeouts %0d disabled %0d",
             n_frames, n_reloads, n_samples, n_freq_changes, n_frame_err, n_timeouts, n_disabled);
    check(n_frames > 0, "frame loaded");
    check(n_reloads > 0, "seed reload");
    check(n_samples > 0, "samples");
    check(n_freq_changes > 0, "frequency change");
    check(n_frame_err > 0, "frame error");
    check(n_timeouts > 0, "frame timeout");
    check(n_disabled > 0, "enable off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
