// tb_lfsr12: checks the 12-bit LFSR counter against a reference model.
// The model is the polynomial x^12+x^6+x^4+x+1 written as a Galois-free
// Fibonacci recurrence b[n+12] = b[n+11]^b[n+5]^b[n+3]^b[n]. Checked: the
// period is 4095 and covers every non-zero state, load, load of 0, enable,
// the sample rate (CLK_HZ scaled to 1200 clocks per second) and restart.
module tb_lfsr12;
  import noise_pkg::*;
  localparam int unsigned CLK_HZ = 1200;

  logic clk = 0, rst = 1, load = 0, restart = 0, enable = 0, valid;
  freq_t freq = '0;
  sample_t seed = '0, q;
  int checks = 0, failures = 0;

  lfsr12 #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst, .freq, .seed, .load, .restart, .enable, .q, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] ref_next(logic [11:0] s);
    logic fb;
    fb = s[11] ^ s[5] ^ s[3] ^ s[0];
    return (s << 1) | 12'(fb);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (q=%h)", msg, q); end
  endtask

  bit seen [4096];
  logic [11:0] exp_q;
  int n, nv;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(q == 12'd2048, "reset value is the default seed");
    // load a seed with the counter disabled
    seed = 12'hA5C; load = 1; @(posedge clk); #1; load = 0;
    check(q == 12'hA5C, "load");
    freq = freq_t'(CLK_HZ);              // one step per clock
    repeat (20) @(posedge clk); #1;
    check(q == 12'hA5C, "enable low holds the state");
    // full period at one step per clock
    exp_q = q;
    enable = 1;
    n = 0;
    for (int i = 0; i < 4095; i++) begin
      @(posedge clk); #1;
      exp_q = ref_next(exp_q);
      if (q !== exp_q) n++;
      if (q == 0) n++;
      seen[q] = 1;
    end
    check(n == 0, "sequence matches reference and never reaches 0");
    check(q == 12'hA5C, "period is 4095");
    n = 0;
    for (int i = 1; i < 4096; i++) if (!seen[i]) n++;
    check(n == 0, "all 4095 non-zero states visited");
    // seed 0 must not lock the counter
    seed = 0; load = 1; @(posedge clk); #1; load = 0;
    repeat (3) @(posedge clk); #1;
    check(q != 0, "seed 0 does not lock the counter");
    // sample rate: 300 Hz at 1200 Hz clock -> one step every 4 clocks
    enable = 0; freq = freq_t'(300);
    seed = 12'h001; load = 1; @(posedge clk); #1; load = 0;
    enable = 1;
    exp_q = 12'h001; nv = 0;
    for (int i = 0; i < 1200; i++) begin
      @(posedge clk); #1;
      if (valid) begin
        nv++;
        exp_q = ref_next(exp_q);
        if (q !== exp_q) n++;
      end
    end
    check(nv inside {[299:300]}, $sformatf("300 samples per 1200 clocks, got %0d", nv));
    check(n == 0, "stepped sequence follows reference at reduced rate");
    // restart zeroes the rate phase: at 300 Hz (4 clocks per sample) the
    // first valid comes 5 clocks after the restart clock (4 to reach the
    // tick, 1 to step)
    freq = freq_t'(300);
    restart = 1; @(posedge clk); #1; restart = 0;
    n = 0;
    while (!valid && n < 50) begin @(posedge clk); #1; n++; end
    check(n == 5, $sformatf("first sample 5 clocks after restart, got %0d", n));
    // simultaneous load and tick: seed is loaded and stepped once
    freq = freq_t'(CLK_HZ);
    repeat (3) @(posedge clk); #1;
    seed = 12'h123; load = 1; @(posedge clk); #1; load = 0;
    check(q == ref_next(12'h123), "load with tick loads and steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
