// Tag response formation: bytes to an FM0 (bi-phase space) backscatter signal.
//
// Bytes arrive on a valid/ready port sampled on the 800 kHz strobe ce_byte
// and wait in a one-byte buffer. When the first byte of a reply is buffered
// the encoder waits T1_TICKS periods of the 40 kHz strobe (turnaround), then
// sends the bytes MSB first. In FM0 the level inverts at every bit boundary
// and, for a 0, once more in the middle of the bit. After the byte flagged
// tx_last a closing "dummy 1" bit is sent and the line returns to 0. If the
// next byte is not buffered when a byte ends, the reply is closed the same
// way and `underflow` is set until the next reply.
//
// Timing: one half bit per ce_half strobe (12.8 MHz / 67 / 2 = 95.5 kbit/s).
//
// From the published design: a module that generates the response, driven by a 40 kHz
// clock, and an average tag-to-reader rate of 95 kbit/s. FM0 is taken from the
// EPC UHF air interface. The two published figures cannot both be the bit
// clock; here the 95 kbit/s rate sets the bits and the 40 kHz clock times
// the turnaround.
module fm0_encoder #(
  parameter int unsigned T1_TICKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_byte,
  input  logic       ce_half,
  input  logic       ce_40k,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_last,
  output logic       tx_ready,
  output logic       tx_mod,
  output logic       active,
  output logic       underflow
);

  typedef enum logic [2:0] {E_IDLE, E_T1, E_LOAD, E_SEND, E_DUMMY, E_END} enc_e;

  enc_e       fsm;
  logic [7:0] buf_d, sh;
  logic       buf_l, buf_full, cur_last, half;
  logic [2:0] bitn;
  logic [7:0] t1;

  assign tx_ready = !buf_full;
  assign active   = (fsm != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm       <= E_IDLE;
      buf_d     <= '0;
      buf_l     <= 1'b0;
      buf_full  <= 1'b0;
      sh        <= '0;
      cur_last  <= 1'b0;
      half      <= 1'b0;
      bitn      <= '0;
      t1        <= '0;
      tx_mod    <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (ce_byte && tx_valid && !buf_full) begin
        buf_d    <= tx_data;
        buf_l    <= tx_last;
        buf_full <= 1'b1;
      end
      unique case (fsm)
        E_IDLE: begin
          tx_mod <= 1'b0;
          if (buf_full) begin
            fsm       <= E_T1;
            t1        <= '0;
            underflow <= 1'b0;
          end
        end
        E_T1: if (ce_40k) begin
          t1 <= t1 + 1'b1;
          if (t1 == 8'(T1_TICKS - 1)) fsm <= E_LOAD;
        end
        E_LOAD: if (ce_half) begin
          // first bit boundary of the reply
          sh       <= buf_d;
          cur_last <= buf_l;
          buf_full <= 1'b0;
          bitn     <= '0;
          half     <= 1'b1;
          tx_mod   <= ~tx_mod;
          fsm      <= E_SEND;
        end
        E_SEND: if (ce_half) begin
          if (half) begin
            // middle of the bit: a 0 inverts
            if (!sh[7]) tx_mod <= ~tx_mod;
            half <= 1'b0;
          end else begin
            // bit boundary
            tx_mod <= ~tx_mod;
            half   <= 1'b1;
            if (bitn == 3'd7) begin
              if (cur_last || !buf_full) begin
                underflow <= !cur_last;
                fsm       <= E_DUMMY;
              end else begin
                sh       <= buf_d;
                cur_last <= buf_l;
                buf_full <= 1'b0;
              end
            end else begin
              sh <= {sh[6:0], 1'b0};
            end
            bitn <= bitn + 1'b1;
          end
        end
        E_DUMMY: if (ce_half) fsm <= E_END;   // second half of the dummy 1
        E_END: if (ce_half) begin
          tx_mod <= 1'b0;
          fsm    <= E_IDLE;
        end
        default: fsm <= E_IDLE;
      endcase
    end
  end

endmodule
