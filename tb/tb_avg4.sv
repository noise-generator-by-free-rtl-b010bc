// tb_avg4: random four-sample sets; avg must equal floor((a+b+c+d)/4) one
// clock after sample_in and hold while sample_in stays low.
module tb_avg4;
  import noise_pkg::*;

  logic clk = 0, rst = 1, sample_in = 0, valid;
  sample_t l [N_LFSR];
  sample_t avg;
  int checks = 0, failures = 0;

  avg4 dut (.clk, .rst, .l, .sample_in, .avg, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int unsigned s, expv;

  initial begin
    foreach (l[k]) l[k] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(avg == 12'd2048 && !valid, "reset: mid-scale, no valid");
    for (int i = 0; i < 2000; i++) begin
      s = 0;
      foreach (l[k]) begin
        l[k] = (i < 4) ? ((i == 0) ? 12'hFFF : (i == 1) ? 12'h001 : (i == 2) ? 12'h003 : 12'(k)) : 12'($urandom);
        s += l[k];
      end
      expv = s / 4;
      sample_in = 1; @(posedge clk); #1; sample_in = 0;
      check(valid && avg == 12'(expv), $sformatf("avg %0d expected %0d", avg, expv));
      foreach (l[k]) l[k] = 12'($urandom);
      @(posedge clk); #1;
      check(!valid && avg == 12'(expv), "holds between samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
