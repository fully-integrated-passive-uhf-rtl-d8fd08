// Memory controller: moves bytes between SRAM, EEPROM, the hash block, the
// comparator and the interface on behalf of the protocol controller.
//
// The controller takes one command (rfid_pkg::mc_cmd_t) when cmd_ready is
// high, runs it, and pulses `done` for one enabled cycle. Commands:
//   OP_EE2SR  copy len bytes EEPROM[src..] -> SRAM[dst..], one byte per cycle
//             (EEPROM read and SRAM write overlap).
//   OP_SR2EE  copy len bytes SRAM[src..] -> the EEPROM page buffer at dst,
//             then start the block write and wait until the EEPROM is idle.
//   OP_HASH   start the hash block with use `pad`, stream SRAM[src..src+len)
//             into it (two cycles per byte: SRAM read, hand-over), then
//             write len2 digest bytes to SRAM[dst..].
//   OP_TX     stream SRAM[src..src+len) to the response encoder; the last
//             byte carries tx_last when cmd.last is set.
//   OP_RX     wait for one reader frame; its first len bytes go to SRAM[dst..];
//             the frame's bit count is returned on rx_bits.
//   OP_CMP    compare SRAM[src..] with SRAM[dst..] over len bytes in the
//             comparator (two SRAM reads per pair); the result is cmp_equal.
// All registers advance on the 800 kHz enable `ce`; the SRAM answers a read
// one enabled cycle later.
//
// From the published design: a memory-controller block that talks to SRAM and EEPROM,
// drives read/write, address and data, and runs at 800 kHz. The command set
// is this design's own decomposition of the controller's eight steps.
module memory_controller
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  // command port
  input  logic       cmd_valid,
  input  mc_cmd_t    cmd,
  output logic       cmd_ready,
  output logic       done,
  output logic [8:0] rx_bits,
  // SRAM
  output logic       sr_en,
  output logic       sr_we,
  output logic [6:0] sr_addr,
  output logic [7:0] sr_wdata,
  input  logic [7:0] sr_rdata,
  // EEPROM
  output logic       ee_req,
  output logic       ee_we,
  output logic [9:0] ee_addr,
  output logic [7:0] ee_wdata,
  input  logic [7:0] ee_rdata,
  output logic       ee_prog,
  input  logic       ee_busy,
  // hash block
  output logic       h_start,
  output pad_mode_e  h_pad,
  output logic       h_in_valid,
  output logic [7:0] h_in_data,
  output logic       h_in_last,
  input  logic       h_in_ready,
  input  logic       h_out_valid,
  input  logic [7:0] h_out_data,
  output logic       h_out_ready,
  // response encoder
  output logic       tx_valid,
  output logic [7:0] tx_data,
  output logic       tx_last,
  input  logic       tx_ready,
  // command decoder
  input  logic       rx_byte_valid,
  input  logic [7:0] rx_byte_data,
  input  logic       rx_frame_end,
  input  logic [8:0] rx_frame_bits,
  // comparator
  output logic       c_clear,
  output logic       c_valid,
  output logic [7:0] c_a,
  output logic [7:0] c_b
);

  typedef enum logic [3:0] {
    M_IDLE, M_COPY, M_PROG, M_PWAIT, M_HSTART, M_SRD, M_SWR, M_HOUT,
    M_RX, M_CRA, M_CRB
  } mstate_e;

  mstate_e    st;
  mc_cmd_t    c;
  logic [7:0] i, k;
  logic       pend;
  logic [7:0] ra;

  assign cmd_ready = (st == M_IDLE);

  // ---------------- datapath outputs ----------------
  always_comb begin
    sr_en       = 1'b0;
    sr_we       = 1'b0;
    sr_addr     = '0;
    sr_wdata    = '0;
    ee_req      = 1'b0;
    ee_we       = 1'b0;
    ee_addr     = '0;
    ee_wdata    = '0;
    ee_prog     = 1'b0;
    h_start     = 1'b0;
    h_pad       = c.pad;
    h_in_valid  = 1'b0;
    h_in_data   = sr_rdata;
    h_in_last   = 1'b0;
    h_out_ready = 1'b0;
    tx_valid    = 1'b0;
    tx_data     = sr_rdata;
    tx_last     = 1'b0;
    c_clear     = (st == M_IDLE) && cmd_valid && (cmd.op == OP_CMP);
    c_valid     = 1'b0;
    c_a         = ra;
    c_b         = sr_rdata;
    unique case (st)
      M_COPY: begin
        if (c.op == OP_EE2SR) begin
          ee_req   = (i < c.len);
          ee_addr  = c.src + 10'(i);
          sr_en    = pend;
          sr_we    = pend;
          sr_addr  = c.dst[6:0] + 7'(k);
          sr_wdata = ee_rdata;
        end else begin
          sr_en    = (i < c.len);
          sr_addr  = c.src[6:0] + 7'(i);
          ee_req   = pend;
          ee_we    = pend;
          ee_addr  = c.dst + 10'(k);
          ee_wdata = sr_rdata;
        end
      end
      M_PROG:   ee_prog = 1'b1;
      M_HSTART: h_start = 1'b1;
      M_SRD: begin
        sr_en   = 1'b1;
        sr_addr = c.src[6:0] + 7'(i);
      end
      M_SWR: begin
        if (c.op == OP_HASH) begin
          h_in_valid = 1'b1;
          h_in_last  = (i == c.len - 1);
        end else begin
          tx_valid = 1'b1;
          tx_last  = c.last && (i == c.len - 1);
        end
      end
      M_HOUT: begin
        h_out_ready = 1'b1;
        sr_en       = h_out_valid;
        sr_we       = h_out_valid;
        sr_addr     = c.dst[6:0] + 7'(k);
        sr_wdata    = h_out_data;
      end
      M_RX: begin
        sr_en    = rx_byte_valid && (k < c.len);
        sr_we    = sr_en;
        sr_addr  = c.dst[6:0] + 7'(k);
        sr_wdata = rx_byte_data;
      end
      M_CRA: begin
        sr_en   = (i < c.len);
        sr_addr = c.src[6:0] + 7'(i);
        c_valid = pend;
      end
      M_CRB: begin
        sr_en   = 1'b1;
        sr_addr = c.dst[6:0] + 7'(i);
      end
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= M_IDLE;
      c       <= '0;
      i       <= '0;
      k       <= '0;
      pend    <= 1'b0;
      ra      <= '0;
      done    <= 1'b0;
      rx_bits <= '0;
    end else if (ce) begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (cmd_valid) begin
          c    <= cmd;
          i    <= '0;
          k    <= '0;
          pend <= 1'b0;
          unique case (cmd.op)
            OP_EE2SR, OP_SR2EE: st <= M_COPY;
            OP_HASH:            st <= M_HSTART;
            OP_TX:              st <= M_SRD;
            OP_RX:              st <= M_RX;
            OP_CMP:             st <= M_CRA;
            default:            st <= M_IDLE;
          endcase
        end
        M_COPY: begin
          if (i < c.len) i <= i + 1'b1;
          pend <= (i < c.len);
          if (pend) begin
            k <= k + 1'b1;
            if (k == c.len - 1) begin
              if (c.op == OP_SR2EE) st <= M_PROG;
              else begin
                st   <= M_IDLE;
                done <= 1'b1;
              end
            end
          end
        end
        M_PROG:  st <= M_PWAIT;
        M_PWAIT: if (!ee_busy) begin
          st   <= M_IDLE;
          done <= 1'b1;
        end
        M_HSTART: st <= M_SRD;
        M_SRD:    st <= M_SWR;
        M_SWR: begin
          if ((c.op == OP_HASH) ? h_in_ready : tx_ready) begin
            i <= i + 1'b1;
            if (i == c.len - 1) begin
              if (c.op == OP_HASH) st <= M_HOUT;
              else begin
                st   <= M_IDLE;
                done <= 1'b1;
              end
            end else begin
              st <= M_SRD;
            end
          end
        end
        M_HOUT: if (h_out_valid) begin
          k <= k + 1'b1;
          if (k == c.len2 - 1) begin
            st   <= M_IDLE;
            done <= 1'b1;
          end
        end
        M_RX: begin
          if (rx_byte_valid && k < c.len) k <= k + 1'b1;
          if (rx_frame_end) begin
            rx_bits <= rx_frame_bits;
            st      <= M_IDLE;
            done    <= 1'b1;
          end
        end
        M_CRA: begin
          if (i < c.len) st <= M_CRB;
          else begin
            st   <= M_IDLE;
            done <= 1'b1;
          end
          pend <= 1'b0;
        end
        M_CRB: begin
          ra   <= sr_rdata;
          pend <= 1'b1;
          i    <= i + 1'b1;
          st   <= M_CRA;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  // ---------------- handshake rules ----------------
  // The EEPROM ignores requests while it programs, so the controller must not
  // make any; and every command moves at least one byte.
  always_ff @(posedge clk) begin
    if (ce) begin
      assert (!(ee_busy && ee_req))
        else $error("memory_controller: EEPROM access during a block write");
      assert (!(cmd_valid && cmd_ready && cmd.len == 8'd0))
        else $error("memory_controller: command of length 0");
    end
  end

endmodule
