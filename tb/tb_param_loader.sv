// tb_param_loader: feeds bytes straight into the parameter loader.
// Checks reset values, a full frame (seed, freq, amp and one load pulse one
// clock after the last byte), skipping of bytes before a header, the
// inter-byte timeout that drops a partial frame, and header bytes inside a
// frame being taken as data.
module tb_param_loader;
  import noise_pkg::*;
  localparam int unsigned TIMEOUT = 200;

  logic clk = 0, rst = 1, byte_valid = 0, load, frame_drop;
  logic [7:0] byte_data = '0;
  params_t params;
  int checks = 0, failures = 0;
  int nload = 0, ndrop = 0;

  param_loader #(.TIMEOUT(TIMEOUT)) dut (.clk, .rst, .byte_data, .byte_valid, .params, .load, .frame_drop);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (load) nload++;
    if (frame_drop) ndrop++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [7:0] b, input int gap = 3);
    byte_data = b; byte_valid = 1; @(posedge clk); #1; byte_valid = 0;
    repeat (gap) @(posedge clk); #1;
  endtask

  task automatic frame(input logic [11:0] s, input logic [23:0] f, input logic [3:0] a);
    put(8'h7E); put({4'h0, s[11:8]}); put(s[7:0]);
    put(f[23:16]); put(f[15:8]); put(f[7:0]);
    byte_data = {4'h0, a}; byte_valid = 1; @(posedge clk); #1; byte_valid = 0;
  endtask

  logic [11:0] s; logic [23:0] f; logic [3:0] a;
  int l0;
  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(params.seed == 12'd2048 && params.freq == 24'd10000 && params.amp == 0 && !load,
          "reset values 2048 / 10 kHz / 0");
    for (int i = 0; i < 30; i++) begin
      s = 12'($urandom); f = 24'($urandom); a = 4'($urandom);
      if (i % 2 == 0) begin put(8'($urandom_range(0, 8'h7D))); put(8'h00); end  // junk before header
      l0 = nload;
      frame(s, f, a);
      check(load && nload == l0 && params.seed == s && params.freq == f && params.amp == a,
            $sformatf("frame %0d loaded", i));
      @(posedge clk); #1;
      check(!load && nload == l0 + 1, "one load pulse per frame");
    end
    // partial frame then silence: dropped, settings unchanged
    put(8'h7E); put(8'h01); put(8'h02);
    repeat (TIMEOUT + 5) @(posedge clk); #1;
    check(ndrop == 1 && params.seed == s && params.freq == f, "partial frame dropped on timeout");
    // header value as a data byte
    l0 = nload;
    frame(12'h07E, 24'h7E7E7E, 4'hE);
    check(load && params.seed == 12'h07E && params.freq == 24'h7E7E7E && params.amp == 4'hE,
          "header value accepted as data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
