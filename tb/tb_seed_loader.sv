// tb_seed_loader: checks the seed loader against a reference model of its
// internal full-rate LFSR. After a user load with seed S, the internal state
// at clock k after the load is step^k(S); the four seeds sent at the end of
// each 64-clock period must be the internal states 15, 31, 47 and 63 steps
// into that period (the loaded seed being step 0), must all differ, and
// seed_load must pulse exactly every 64 clocks.
module tb_seed_loader;
  import noise_pkg::*;

  logic clk = 0, rst = 1, load = 0, seed_load;
  sample_t seed = '0;
  sample_t seeds [N_LFSR];
  int checks = 0, failures = 0;

  seed_loader dut (.clk, .rst, .seed, .load, .seeds, .seed_load);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] ref_next(logic [11:0] s);
    return {s[10:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [11:0] traj [0:1100];
  int last, pulses, k, bad;

  task automatic run_seed(input logic [11:0] s);
    logic [11:0] s0;
    s0 = (s == 0) ? 12'd1 : s;
    traj[0] = s0;
    for (int i = 1; i <= 1100; i++) traj[i] = ref_next(traj[i-1]);
    seed = s; load = 1; @(posedge clk); #1; load = 0;
    // clock 0 is the clock in which the load is taken
    last = 0; pulses = 0; bad = 0;
    for (int c = 1; c <= 1024 + 2; c++) begin
      @(posedge clk); #1;
      if (seed_load) begin
        pulses++;
        if (c - last != 64) bad++;
        // period p starts at internal step (p-1)*64
        k = (pulses - 1) * 64;
        for (int j = 0; j < N_LFSR; j++)
          if (seeds[j] !== traj[k + 16 * (j + 1) - 1]) bad++;
        for (int a = 0; a < N_LFSR; a++)
          for (int b = a + 1; b < N_LFSR; b++)
            if (seeds[a] == seeds[b] || seeds[a] == 0) bad++;
        last = c;
      end
    end
    check(pulses == 16, $sformatf("seed %h: 16 seed_load pulses in 1024 clocks, got %0d", s, pulses));
    check(bad == 0, $sformatf("seed %h: %0d mismatches of spacing or seed values", s, bad));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    run_seed(12'd2048);
    run_seed(12'hFFF);
    run_seed(12'h000);
    for (int i = 0; i < 5; i++) run_seed(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
