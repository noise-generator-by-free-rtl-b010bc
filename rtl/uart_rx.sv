// uart_rx: serial receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// The RX line is synchronised with two flip-flops. A falling edge on the
// idle-high line starts a frame; the start bit is re-checked half a bit
// later, and from there each data bit and the stop bit are sampled one bit
// time apart, near the bit centres. A frame whose stop bit is low is dropped
// and flagged on frame_err. The receiver plays the role of the serial
// receive block taken from the tool library; the baud rate (115200) and
// framing are this design's choices.
//
// Interface: data is valid in the clock where valid pulses (about the middle
// of the stop bit). BAUD must be well below CLK_HZ (CLK_HZ/BAUD >= 8).
module uart_rx #(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned DIV   = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CNT_W = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t           state;
  logic [1:0]       sync;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bitn;
  logic [7:0]       shreg;
  logic             rxs;

  assign rxs = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rxs) begin
          state <= START;
          cnt   <= CNT_W'(DIV / 2 - 1);
        end
        START: if (cnt != '0) cnt <= cnt - 1'b1;
        else if (rxs) state <= IDLE;            // glitch, not a start bit
        else begin
          state <= DATA;
          cnt   <= CNT_W'(DIV - 1);
          bitn  <= '0;
        end
        DATA: if (cnt != '0) cnt <= cnt - 1'b1;
        else begin
          shreg <= {rxs, shreg[7:1]};
          cnt   <= CNT_W'(DIV - 1);
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end
        STOP: if (cnt != '0) cnt <= cnt - 1'b1;
        else begin
          state <= IDLE;
          if (rxs) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
