// tb_uart_rx: serial frames at the default 12 MHz / 115200 baud.
// Sends random bytes (back to back and with gaps), checks each received
// byte, that valid comes within 10 bit times of the start edge, that a frame
// with a low stop bit is flagged and dropped, and that a short glitch on the
// idle line is not taken as a start bit.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 12_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int unsigned BIT    = (CLK_HZ + BAUD / 2) / BAUD;   // clocks per bit

  logic clk = 0, rst = 1, rx = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .rx, .data, .valid, .frame_err);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Receive monitor
  logic [7:0] rxq [$];
  int nerr = 0;
  longint t_start, t_valid;
  always @(posedge clk) if (!rst) begin
    if (valid) begin rxq.push_back(data); t_valid = $time; end
    if (frame_err) nerr++;
  end

  task automatic send(input logic [7:0] b, input bit stop = 1);
    t_start = $time;
    rx = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT) @(posedge clk); end
    rx = stop; repeat (BIT) @(posedge clk);
    rx = 1;
  endtask

  logic [7:0] b, got;
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : (i == 2) ? 8'h7E : 8'($urandom);
      send(b);
      if (i % 3 == 0) repeat ($urandom_range(1, 3 * BIT)) @(posedge clk);
      check(rxq.size() == 1, $sformatf("byte %0d received once", i));
      if (rxq.size() > 0) begin
        got = rxq.pop_front();
        check(got == b, $sformatf("byte %0d: got %h expected %h", i, got, b));
      end
      check(t_valid - t_start <= 10 * BIT * 10, "valid within 10 bit times");
    end
    // bad stop bit
    send(8'h55, 0);
    repeat (2 * BIT) @(posedge clk);
    check(nerr == 1 && rxq.size() == 0, "low stop bit flagged, byte dropped");
    // glitch shorter than half a bit
    rx = 0; repeat (BIT / 4) @(posedge clk); rx = 1;
    repeat (12 * BIT) @(posedge clk);
    check(rxq.size() == 0 && nerr == 1, "glitch ignored");
    send(8'hA3);
    repeat (2) @(posedge clk);
    check(rxq.size() == 1 && rxq[0] == 8'hA3, "receiver recovers after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
