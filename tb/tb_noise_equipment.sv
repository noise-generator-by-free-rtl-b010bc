// tb_noise_equipment: the noise generator with its analog chain, run through
// the bench tests of the equipment, at the default RTL parameters.
//
//  1. 1 kHz square wave of 2.04 Vpp, noise at 100 kHz, amplitude codes 0, 2
//     and 4. Code 0 must leave the signal untouched; codes 2 and 4 must give
//     a reference of 0.4125 V and 0.825 V, noise that never exceeds it, an
//     RMS near 0.289 * Vref (591/2048 of full scale) and a mixed output equal
//     to signal plus noise.
//  2. 1 kHz sine of 1.88 Vpp with noise at 10 kHz and at 100 kHz: the noise
//     must change 10 and 100 times per signal period respectively.
//  3. Noise spectrum at 100 kHz and 50 kHz with code 5 (1.031 V): a DFT of
//     the held noise waveform must show an exact null at the sampling
//     frequency, and the mean power between 0.1 and 0.9 fs must exceed that
//     between 1.1 and 1.9 fs at least four times (band-limited noise).
module tb_noise_equipment;
  import noise_pkg::*;
  localparam int unsigned CLK_HZ = 12_000_000;
  localparam int unsigned BIT    = (CLK_HZ + 115_200 / 2) / 115_200;
  localparam real         PI     = 3.141592653589793;

  logic clk = 0, rst = 1, uart_rx_i = 1, enable = 1;
  sample_t d_o;
  logic d_valid_o, rx_err_o;
  amp_t dd_o;
  real v_sig = 0.0, v_ref, v_noise, v_out;
  int checks = 0, failures = 0;

  noise_gen_top dut (.clk, .rst, .uart_rx_i, .enable, .d_o, .d_valid_o, .dd_o, .rx_err_o);
  analog_chain  ana (.d(d_o), .dd(dd_o), .v_sig, .v_ref, .v_noise, .v_out);

  always #5 clk = ~clk;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    uart_rx_i = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx_i = b[i]; repeat (BIT) @(posedge clk); end
    uart_rx_i = 1; repeat (BIT) @(posedge clk);
  endtask

  task automatic setup(input logic [11:0] s, input int unsigned f, input logic [3:0] a);
    send_byte(8'h7E);
    send_byte({4'h0, s[11:8]}); send_byte(s[7:0]);
    send_byte(f[23:16]); send_byte(f[15:8]); send_byte(f[7:0]);
    send_byte({4'h0, a});
    repeat (300) @(posedge clk);
  endtask

  // signal source: 0 none, 1 square 2.04 Vpp, 2 sine 1.88 Vpp, both 1 kHz
  int  wave = 0;
  longint t = 0;
  always @(posedge clk) begin
    t++;
    case (wave)
      1: v_sig <= ((t % 12000) < 6000) ? 1.02 : -1.02;
      2: v_sig <= 0.94 * $sin(2.0 * PI * real'(t % 12000) / 12000.0);
      default: v_sig <= 0.0;
    endcase
  end

  // one signal period (12,000 clocks) of measurements
  real vmax, rms, sumerr;
  int  changes;
  task automatic measure(input int periods);
    real acc2 = 0, err = 0, prev = 1.0e9;
    int n = 0;
    vmax = 0; changes = 0;
    repeat (periods * 12000) begin
      @(posedge clk); #1;
      acc2 += v_noise * v_noise;
      if (fabs(v_noise) > vmax) vmax = fabs(v_noise);
      err += fabs(v_out - v_sig - v_noise);
      if (v_noise != prev) changes++;
      prev = v_noise;
      n++;
    end
    rms = $sqrt(acc2 / n);
    sumerr = err;
  endtask

  // DFT of the noise waveform sampled every clock
  real wf [];
  task automatic spectrum(input int unsigned fs, output real p_low, output real p_high, output real p_null);
    int n;
    real re, im, p, f;
    n = 400 * (CLK_HZ / fs);            // 400 sample periods
    wf = new[n];
    // start on a sample boundary so that the record holds whole samples
    do begin @(posedge clk); #1; end while (!d_valid_o);
    wf[0] = v_noise;
    for (int i = 1; i < n; i++) begin @(posedge clk); #1; wf[i] = v_noise; end
    p_low = 0; p_high = 0;
    for (int b = 1; b <= 19; b++) begin
      if (b == 10) continue;
      f = real'(fs) * b / 10.0;
      re = 0; im = 0;
      foreach (wf[i]) begin
        re += wf[i] * $cos(2.0 * PI * f * i / CLK_HZ);
        im += wf[i] * $sin(2.0 * PI * f * i / CLK_HZ);
      end
      p = (re * re + im * im) / n;
      if (b < 10) p_low += p / 9; else p_high += p / 9;
    end
    re = 0; im = 0;
    foreach (wf[i]) begin
      re += wf[i] * $cos(2.0 * PI * real'(fs) * i / CLK_HZ);
      im += wf[i] * $sin(2.0 * PI * real'(fs) * i / CLK_HZ);
    end
    p_null = (re * re + im * im) / n;
  endtask

  logic [3:0] codes [3] = '{4'd0, 4'd2, 4'd4};
  real pl, ph, pn;
  int unsigned fr [2] = '{100_000, 50_000};

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;

    // 1. square wave
    wave = 1;
    foreach (codes[i]) begin
      setup(12'd300 + 12'(i), 100_000, codes[i]);
      measure(2);
      $display("square, code %0d: Vref %.4f V, peak noise %.4f V, rms %.4f V", codes[i], v_ref, vmax, rms);
      check(fabs(v_ref - 3.3 * codes[i] / 16.0) < 1e-9, "reference voltage from the amplitude code");
      check(vmax <= v_ref + 1e-9, "noise stays within +-Vref");
      check(sumerr < 1e-6, "mixed output is signal plus noise");
      if (codes[i] == 0) check(vmax == 0.0, "code 0: no noise");
      else begin
        check(rms > 0.26 * v_ref && rms < 0.32 * v_ref, "noise rms near 0.289 Vref");
        check(vmax > 0.6 * v_ref, "noise reaches its tails");
      end
    end
    check(fabs(3.3 * 2 / 16.0 - 0.4125) < 1e-9 && fabs(3.3 * 4 / 16.0 - 0.825) < 1e-9,
          "codes 2 and 4 are 0.412 V and 0.825 V");

    // 2. sine wave, noise at 10 kHz and 100 kHz
    wave = 2;
    setup(12'd555, 10_000, 4'd4);
    measure(3);
    $display("sine, 10 kHz noise: %0d changes in 3 ms", changes);
    check(changes >= 28 && changes <= 31, "10 kHz noise: about 10 changes per signal period");
    setup(12'd556, 100_000, 4'd4);
    measure(3);
    $display("sine, 100 kHz noise: %0d changes in 3 ms", changes);
    check(changes >= 290 && changes <= 301, "100 kHz noise: about 100 changes per signal period");

    // 3. spectrum at 100 kHz and 50 kHz, 1.03 V
    wave = 0;
    foreach (fr[i]) begin
      setup(12'd2048, fr[i], 4'd5);
      check(fabs(v_ref - 1.03125) < 1e-9, "code 5 is 1.03 V");
      spectrum(fr[i], pl, ph, pn);
      $display("spectrum at fs = %0d Hz: mean power 0.1-0.9 fs %.3e, 1.1-1.9 fs %.3e, at fs %.3e",
               fr[i], pl, ph, pn);
      check(pl > 4.0 * ph, "power concentrated below the sampling frequency");
      check(pn < 1e-6 * pl, "spectral null at the sampling frequency");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
