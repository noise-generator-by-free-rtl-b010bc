// tb_rate_gen: checks the sample-rate tick generator.
// With CLK_HZ scaled to 1000 the tick count over CLK_HZ clocks must equal
// freq exactly, and tick spacing must be floor or ceil of CLK_HZ/freq.
// freq = 0 gives no ticks, freq >= CLK_HZ a tick on every clock.
module tb_rate_gen;
  import noise_pkg::*;
  localparam int unsigned CLK_HZ = 1000;

  logic clk = 0, rst = 1, clear = 0, tick;
  freq_t freq;
  int checks = 0, failures = 0;

  rate_gen #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst, .clear, .freq, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned f);
    int n = 0, last = -1, gap, lo, hi;
    bit bad_gap = 0;
    freq = freq_t'(f);
    if (f % 2 == 0) begin rst = 1; @(posedge clk); rst = 0; end
    else begin clear = 1; @(posedge clk); clear = 0; end
    for (int c = 0; c < int'(CLK_HZ); c++) begin
      @(posedge clk); #1;
      if (tick) begin
        if (last >= 0 && f > 0 && f < CLK_HZ) begin
          gap = c - last;
          lo = CLK_HZ / f;
          hi = (CLK_HZ + f - 1) / f;
          if (gap < lo || gap > hi) bad_gap = 1;
        end
        last = c;
        n++;
      end
    end
    checks++;
    if (n != int'((f > CLK_HZ) ? CLK_HZ : f)) begin
      failures++;
      $display("freq %0d: %0d ticks in %0d clocks", f, n, CLK_HZ);
    end
    checks++;
    if (bad_gap) begin failures++; $display("freq %0d: uneven tick spacing", f); end
  endtask

  initial begin
    freq = '0;
    repeat (3) @(posedge clk);
    run(0); run(1); run(7); run(100); run(333); run(500); run(999); run(1000); run(5000);
    for (int i = 0; i < 10; i++) run($urandom_range(1, 999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
