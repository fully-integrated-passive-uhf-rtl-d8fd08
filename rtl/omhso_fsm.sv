// Finite state machine block: runs the tag side of the OMHSO mutual
// authentication protocol as a sequence of memory-controller commands.
//
// One session:
//   (1) load tag state and PRNG seed, EEPROM page 0 -> SRAM
//   (2) load the key S_i, EEPROM page 1 -> SRAM
//       wait for a 64-bit reader frame: the challenge X
//   (3) PRNG: hash(seed) -> alpha (8 bytes) || new seed (8 bytes);
//       beta = H0(S_i, X, alpha) (20 bytes); reply Y = alpha || beta
//       wait for a 160-bit reader frame: the server response Z
//   (4) Z' = H1(S_i, X, alpha)
//   (5) compare Z with Z'
//   (6) only if equal: S_{i+1} = H2(S_i) (first 16 bytes of the digest)
//   (7) only if equal: EEPROM block write of the new key
//   (8) EEPROM block write of the new seed
// then the next session starts at (1). Frames of any other length are
// ignored while waiting. `step` shows the running step (1..8, 0 while waiting
// for or talking to the reader); `auth_ok` holds the result of step (5) and
// `key_updated` whether (7) ran, both until the next challenge arrives; `session_done` pulses after step (8).
//
// Each state issues one command and waits for the controller's `done`; all
// registers advance on the 800 kHz enable `ce`.
//
// From the published design: the protocol (tag algorithm), the eight steps and their
// order, the key and seed kept in EEPROM, and the PRNG as a hash of the seed
// whose output is cut into the random number and the next seed. The seed
// size (64 bits), skipping (6) and (7) on a mismatch, and always refreshing
// the seed are this design's reading.
module omhso_fsm
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  output logic       cmd_valid,
  output mc_cmd_t    cmd,
  input  logic       cmd_ready,
  input  logic       done,
  input  logic [8:0] rx_bits,
  input  logic       cmp_equal,
  output logic [3:0] step,
  output logic       auth_ok,
  output logic       key_updated,
  output logic       session_done
);

  typedef enum logic [3:0] {
    F_LOAD1, F_LOAD2, F_WAITX, F_PRNG, F_H0, F_TXA, F_TXB, F_WAITZ,
    F_H1, F_CMP, F_H2, F_WKEY, F_WSEED
  } fstate_e;

  fstate_e fs;
  logic    issued;

  function automatic mc_cmd_t mk(mc_op_e op, logic [9:0] src, logic [9:0] dst,
                                 logic [7:0] len, logic [7:0] len2,
                                 pad_mode_e pad, logic last);
    mc_cmd_t r;
    r.op   = op;
    r.src  = src;
    r.dst  = dst;
    r.len  = len;
    r.len2 = len2;
    r.pad  = pad;
    r.last = last;
    return r;
  endfunction

  always_comb begin
    unique case (fs)
      F_LOAD1: cmd = mk(OP_EE2SR, EE_STATE, 10'(SR_STATE), 8'd16, 8'd0, PAD_H0, 1'b0);
      F_LOAD2: cmd = mk(OP_EE2SR, EE_KEY, 10'(SR_KEY), 8'd16, 8'd0, PAD_H0, 1'b0);
      F_WAITX: cmd = mk(OP_RX, 10'd0, 10'(SR_X), 8'd8, 8'd0, PAD_H0, 1'b0);
      F_PRNG:  cmd = mk(OP_HASH, 10'(SR_SEED), 10'(SR_ALPHA), 8'd8, 8'd16, PAD_PRNG, 1'b0);
      F_H0:    cmd = mk(OP_HASH, 10'(SR_KEY), 10'(SR_BETA), 8'd32, 8'd20, PAD_H0, 1'b0);
      F_TXA:   cmd = mk(OP_TX, 10'(SR_ALPHA), 10'd0, 8'd8, 8'd0, PAD_H0, 1'b0);
      F_TXB:   cmd = mk(OP_TX, 10'(SR_BETA), 10'd0, 8'd20, 8'd0, PAD_H0, 1'b1);
      F_WAITZ: cmd = mk(OP_RX, 10'd0, 10'(SR_Z), 8'd20, 8'd0, PAD_H0, 1'b0);
      F_H1:    cmd = mk(OP_HASH, 10'(SR_KEY), 10'(SR_ZP), 8'd32, 8'd20, PAD_H1, 1'b0);
      F_CMP:   cmd = mk(OP_CMP, 10'(SR_Z), 10'(SR_ZP), 8'd20, 8'd0, PAD_H0, 1'b0);
      F_H2:    cmd = mk(OP_HASH, 10'(SR_KEY), 10'(SR_KEY), 8'd16, 8'd16, PAD_H2, 1'b0);
      F_WKEY:  cmd = mk(OP_SR2EE, 10'(SR_KEY), EE_KEY, 8'd16, 8'd0, PAD_H0, 1'b0);
      default: cmd = mk(OP_SR2EE, 10'(SR_NSEED), EE_SEED, 8'd8, 8'd0, PAD_H0, 1'b0);
    endcase
  end

  assign cmd_valid = !issued;

  always_comb begin
    unique case (fs)
      F_LOAD1:       step = 4'd1;
      F_LOAD2:       step = 4'd2;
      F_PRNG, F_H0:  step = 4'd3;
      F_H1:          step = 4'd4;
      F_CMP:         step = 4'd5;
      F_H2:          step = 4'd6;
      F_WKEY:        step = 4'd7;
      F_WSEED:       step = 4'd8;
      default:       step = 4'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs           <= F_LOAD1;
      issued       <= 1'b0;
      auth_ok      <= 1'b0;
      key_updated  <= 1'b0;
      session_done <= 1'b0;
    end else if (ce) begin
      session_done <= 1'b0;
      if (!issued) begin
        if (cmd_ready) issued <= 1'b1;
      end else if (done) begin
        issued <= 1'b0;
        unique case (fs)
          F_LOAD1: fs <= F_LOAD2;
          F_LOAD2: fs <= F_WAITX;
          F_WAITX: if (rx_bits == 9'(X_BITS)) begin
            fs          <= F_PRNG;
            auth_ok     <= 1'b0;
            key_updated <= 1'b0;
          end
          F_PRNG:  fs <= F_H0;
          F_H0:    fs <= F_TXA;
          F_TXA:   fs <= F_TXB;
          F_TXB:   fs <= F_WAITZ;
          F_WAITZ: if (rx_bits == 9'(Z_BITS)) fs <= F_H1;
          F_H1:    fs <= F_CMP;
          F_CMP: begin
            auth_ok <= cmp_equal;
            fs      <= cmp_equal ? F_H2 : F_WSEED;
          end
          F_H2:    fs <= F_WKEY;
          F_WKEY: begin
            key_updated <= 1'b1;
            fs          <= F_WSEED;
          end
          default: begin
            fs           <= F_LOAD1;
            session_done <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
