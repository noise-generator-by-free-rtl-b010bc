// param_loader: organises the received bytes into the generator settings.
//
// The host sends all three settings at once, as one 7-byte frame:
//   byte 0  0x7E                       frame header
//   byte 1  seed[11:8] in bits 3:0     (bits 7:4 ignored)
//   byte 2  seed[7:0]
//   byte 3  freq[23:16]                sampling frequency in Hz, MSB first
//   byte 4  freq[15:8]
//   byte 5  freq[7:0]
//   byte 6  amp[3:0] in bits 3:0       amplitude code for the 4-bit DAC
// A byte other than 0x7E while waiting for a header is skipped. If a frame
// stops for TIMEOUT clocks the partial frame is discarded and the loader
// waits for a header again, so it resynchronises after a lost byte. When the
// last byte arrives, all three settings are updated in the same clock and
// load pulses once so that the generator restarts from the new seed.
//
// That seed, frequency and amplitude are the settings and that this block
// loads them into the generator follows the design description; the frame
// layout, header, timeout and reset values (seed 2048, 10 kHz, amplitude 0,
// the host program's start values) are this design's choices.
//
// Timing: params and load are registered, one clock after the last byte's
// byte_valid.
module param_loader
  import noise_pkg::*;
#(
  parameter int unsigned TIMEOUT = 12_000,   // 1 ms at 12 MHz
  parameter logic [7:0]  HEADER  = 8'h7E
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] byte_data,
  input  logic       byte_valid,
  output params_t    params,
  output logic       load,
  output logic       frame_drop
);

  localparam int unsigned N_DATA = 6;
  localparam int unsigned TO_W   = $clog2(TIMEOUT + 1);

  typedef enum logic {WAIT_HDR, RECV} state_t;

  state_t          state;
  logic [2:0]      idx;
  logic [7:0]      buf_q [N_DATA];
  logic [TO_W-1:0] idle;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WAIT_HDR;
      idx         <= '0;
      idle        <= '0;
      load        <= 1'b0;
      frame_drop  <= 1'b0;
      params.seed <= DEFAULT_SEED;
      params.freq <= DEFAULT_FREQ;
      params.amp  <= DEFAULT_AMP;
      for (int k = 0; k < N_DATA; k++) buf_q[k] <= '0;
    end else begin
      load       <= 1'b0;
      frame_drop <= 1'b0;
      unique case (state)
        WAIT_HDR: if (byte_valid && byte_data == HEADER) begin
          state <= RECV;
          idx   <= '0;
          idle  <= '0;
        end
        RECV: if (byte_valid) begin
          idle <= '0;
          if (idx == 3'(N_DATA - 1)) begin
            state       <= WAIT_HDR;
            params.seed <= {buf_q[0][3:0], buf_q[1]};
            params.freq <= {buf_q[2], buf_q[3], buf_q[4]};
            params.amp  <= byte_data[3:0];
            load        <= 1'b1;
          end else begin
            buf_q[idx] <= byte_data;
            idx        <= idx + 1'b1;
          end
        end else if (idle == TO_W'(TIMEOUT - 1)) begin
          state      <= WAIT_HDR;
          frame_drop <= 1'b1;
        end else begin
          idle <= idle + 1'b1;
        end
        default: state <= WAIT_HDR;
      endcase
    end
  end

endmodule
