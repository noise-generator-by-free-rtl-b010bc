// tb_gauss_gen: end-to-end check of the Gaussian random sequence generator.
//
// Reference model, written from the block's rules rather than its registers
// (edges are counted from the first clock after reset, a user load is taken
// at edge L):
//  * sample ticks: the load restarts the sample clock, so edge n carries a
//    tick when k = n - L satisfies floor(k*F/C) > floor((k-1)*F/C);
//    the counters step at edge n+1 and the average appears after edge n+2;
//  * seed sets: set p (p >= 1) holds the internal LFSR states 64(p-1)+15,
//    +31, +47 and +63 steps after the user seed and reaches the counters at
//    edge L + 64p + 1;
//  * a counter's value is its last seed stepped once per tick since then;
//  * the output is floor(sum/4).
// Also checked: the sample rate, that enable low stops the samples, and the
// distribution: mean near 2047.5, standard deviation near 4096/sqrt(12)/2
// (about 591, half that of one uniform LFSR), more than 64 % of samples
// within one standard deviation (a uniform variable has 57.7 %) and about
// 95 % within two.
module tb_gauss_gen;
  import noise_pkg::*;
  localparam int unsigned C = 12_000_000;

  logic clk = 0, rst = 1, load = 0, enable = 0, noise_valid;
  freq_t freq = freq_t'(100_000);
  sample_t seed = '0, noise;
  int checks = 0, failures = 0;

  gauss_gen #(.CLK_HZ(C)) dut (.clk, .rst, .freq, .seed, .load, .enable, .noise, .noise_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [11:0] ref_next(logic [11:0] s);
    return {s[10:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  function automatic bit is_tick(longint n, longint f);
    return n >= 1 && (n * f / C) > ((n - 1) * f / C);
  endfunction

  // internal seed-loader trajectory from the user seed
  logic [11:0] traj [0:4094];   // one full period
  longint L;             // edge of the user load
  longint e = 0;         // edges since reset release
  int mism = 0, compared = 0, nsamp = 0;
  bit collect = 0;
  real sum = 0, sum2 = 0;
  int vals [$];

  function automatic logic [11:0] expected(longint n);
    longint p, rl, m, idx;
    logic [11:0] lk;
    int unsigned s;
    p  = (n - L) / 64;
    rl = L + 64 * p + 1;          // edge at which set p is loaded
    m = 0;                        // steps since the reload, this one included
    for (longint t = rl - 1; t <= n; t++) if (is_tick(t - L, longint'(freq))) m++;
    s = 0;
    for (int k = 0; k < 4; k++) begin
      idx = 64 * (p - 1) + 16 * (k + 1) - 1;
      lk = traj[idx % 4095];
      for (longint j = 0; j < m; j++) lk = ref_next(lk);
      s += lk;
    end
    return 12'(s / 4);
  endfunction

  logic [11:0] ex;
  always @(posedge clk) begin
    if (!rst) begin
      e++;
      #1;
      if (noise_valid && collect) begin
        nsamp++;
        ex = expected(e - 2);
        if ((e - 2 - L) / 64 >= 1) begin   // first seed set has arrived
          compared++;
          if (ex != noise) begin
            mism++;
            if (mism < 5) $display("edge %0d: noise %0d expected %0d", e, noise, ex);
          end
        end
        sum += noise; sum2 += real'(noise) * noise;
        vals.push_back(noise);
      end
    end
  end

  task automatic user_load(input logic [11:0] s);
    traj[0] = (s == 0) ? 12'd1 : s;
    for (int i = 1; i <= 4094; i++) traj[i] = ref_next(traj[i-1]);
    @(posedge clk); #2;
    seed = s; load = 1;
    L = e + 1;
    @(posedge clk); #2; load = 0;
  endtask

  real mean, sd;
  int in1, in2;
  longint e0;
  initial begin
    repeat (3) @(posedge clk); #2;
    rst = 0;
    enable = 1;
    // run 1: precise comparison against the model, 100 kHz
    user_load(12'd2048);
    collect = 1;
    e0 = e;
    repeat (60000) @(posedge clk);
    #3;
    check(nsamp inside {[499:501]}, $sformatf("100 kHz: 500 samples in 60000 clocks, got %0d", nsamp));
    check(compared > 400 && mism == 0, $sformatf("%0d of %0d samples differ from the model", mism, compared));
    // enable low: no samples
    enable = 0; nsamp = 0;
    repeat (5000) @(posedge clk);
    check(nsamp == 0, "enable low stops the samples");
    enable = 1;
    // run 2: distribution at 187.5 kHz (one sample per seed period)
    // (reset so that the tick phase again starts from edge 0)
    collect = 0; freq = freq_t'(187_500);
    rst = 1; repeat (2) @(posedge clk); #2; e = 0; rst = 0;
    user_load(12'd1234);
    nsamp = 0; mism = 0; compared = 0; sum = 0; sum2 = 0; vals = {};
    collect = 1;
    repeat (1_300_000) @(posedge clk);
    #3;
    check(mism == 0, $sformatf("run 2: %0d of %0d samples differ from the model", mism, compared));
    mean = sum / nsamp;
    sd = $sqrt(sum2 / nsamp - mean * mean);
    in1 = 0; in2 = 0;
    foreach (vals[i]) begin
      if (vals[i] > mean - sd && vals[i] < mean + sd) in1++;
      if (vals[i] > mean - 2 * sd && vals[i] < mean + 2 * sd) in2++;
    end
    $display("samples %0d mean %.1f sd %.1f within 1 sd %.3f within 2 sd %.3f",
             nsamp, mean, sd, real'(in1) / nsamp, real'(in2) / nsamp);
    check(nsamp > 20000, "enough samples");
    check(mean > 1950 && mean < 2150, "mean near mid-scale");
    check(sd > 500 && sd < 690, "standard deviation near 591");
    check(real'(in1) / nsamp > 0.64, "more than 64 % within one sd");
    check(real'(in2) / nsamp > 0.93 && real'(in2) / nsamp < 0.985, "about 95 % within two sd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
