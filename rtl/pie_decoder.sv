// Reader command decoder: pulse-interval-encoded (PIE) reader frames to bytes.
//
// The demodulator delivers the reader's envelope as rx_env (1 = carrier on).
// Every symbol ends with a short carrier-off pulse, so symbols are the
// intervals between successive falling edges of rx_env. An interval of at
// least PIVOT ticks is a 1 (nominally 2 Tari), a shorter one a 0 (1 Tari).
// The first falling edge opens a frame; a frame of N bits therefore has N+1
// falling edges. When no falling edge comes for TIMEOUT ticks the frame ends:
// frame_end pulses with frame_bits, the number of bits received. Bits are
// packed MSB first; each completed byte pulses byte_valid.
//
// Timing: rx_env is sampled once per ce (800 kHz, 1.25 us). With Tari = 25 us
// (20 ticks) data-0 lasts 20 and data-1 40 ticks, so PIVOT = 30 (1.5 Tari).
// The average rate for random data is then 1/(1.5 Tari) = 26.7 kbit/s.
//
// From the published design: a reader command decoder, Tari = 25 us and an average
// reader-to-tag rate of 27 kbit/s. PIE with data-1 = 2 Tari is taken from the
// EPC UHF air interface, which fits those numbers; the framing (no
// delimiter or calibration symbols, end by silence) is this design's
// simplification.
module pie_decoder #(
  parameter int unsigned PIVOT   = 30,
  parameter int unsigned TIMEOUT = 60
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       enable,      // ignore the line while the tag replies
  input  logic       rx_env,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_end,
  output logic [8:0] frame_bits
);

  logic       env_q, in_frame;
  logic [7:0] cnt;
  logic [6:0] sh;
  logic [8:0] nbits;
  logic       fall, b;

  assign fall = env_q && !rx_env;
  assign b    = (cnt >= 8'(PIVOT));   // symbol value of the closing interval

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      env_q      <= 1'b1;
      in_frame   <= 1'b0;
      cnt        <= '0;
      sh         <= '0;
      nbits      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      frame_end  <= 1'b0;
      frame_bits <= '0;
    end else if (ce) begin
      env_q      <= rx_env;
      byte_valid <= 1'b0;
      frame_end  <= 1'b0;
      if (!enable) begin
        in_frame <= 1'b0;
      end else if (!in_frame) begin
        if (fall) begin
          in_frame <= 1'b1;
          cnt      <= 8'd1;
          nbits    <= '0;
        end
      end else if (fall) begin
        sh    <= {sh[5:0], b};
        nbits <= nbits + 1'b1;
        cnt   <= 8'd1;
        if (nbits[2:0] == 3'd7) begin
          byte_valid <= 1'b1;
          byte_data  <= {sh, b};
        end
      end else if (cnt >= 8'(TIMEOUT)) begin
        in_frame   <= 1'b0;
        frame_end  <= 1'b1;
        frame_bits <= nbits;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
