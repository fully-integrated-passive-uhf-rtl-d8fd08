// Digital part of a passive UHF RFID tag that runs the OMHSO hash-based
// mutual authentication protocol.
//
// Blocks: the cryptographic block (interface with clock divider, reader
// command decoder and response encoder; finite state machine; memory
// controller; hash function block with SPONGENT-160 and Keccak, chosen by the
// hash_sel pin; comparator), the 128-byte SRAM and the 1 Kbyte EEPROM
// (behavioural model). The analog front end is
// outside: it supplies the 12.8 MHz clock, the power-on reset and the
// demodulated reader envelope rx_env, and takes the reply signal tx_mod.
//
// A session: the tag loads its state, seed and key from EEPROM, waits for the
// reader's 64-bit challenge X, draws alpha from the hash-based PRNG, replies
// Y = alpha || H0(S, X, alpha) (224 bits), waits for the 160-bit server
// response Z, checks it against H1(S, X, alpha), and on success replaces the
// key by H2(S); the PRNG seed is rewritten every session. auth_ok,
// key_updated, session_done, step, tx_active and hash_busy report
// progress.
//
// Timing: one clock (12.8 MHz); the controller, memories and hash block
// advance on the 800 kHz enable, the EEPROM program timer on the 6.4 MHz one.
//
// From the published design: the block set and their clocks, the protocol, the data
// sizes and the eight-step flow. Enables instead of divided clocks, the line
// codes, the SRAM/EEPROM layouts and the command set of the memory
// controller are this design's choices.
module rfid_tag
  import rfid_pkg::*;
#(
  parameter int unsigned PROG_TICKS = 27712,  // EEPROM block write, 6.4 MHz cycles
  parameter int unsigned DIV_HALF   = 67,     // reply half bit, 12.8 MHz cycles
  parameter int unsigned T1_TICKS   = 4       // reply turnaround, 40 kHz ticks
) (
  input  logic       clk_12m8,
  input  logic       por_n,
  input  logic       rx_env,
  input  hash_sel_e  hash_sel,
  output logic       tx_mod,
  output logic       auth_ok,
  output logic       key_updated,
  output logic       session_done,
  output logic [3:0] step,
  output logic       tx_active,     // reply in progress
  output logic       hash_busy,     // hash permutation running
  output logic       tx_underflow
);

  logic       ce_6m4, ce_800k;
  logic       sr_en, sr_we;
  logic [6:0] sr_addr;
  logic [7:0] sr_wdata, sr_rdata;
  logic       ee_req, ee_we, ee_prog, ee_busy;
  logic [9:0] ee_addr;
  logic [7:0] ee_wdata, ee_rdata;

  crypto_block #(.DIV_HALF(DIV_HALF), .T1_TICKS(T1_TICKS)) u_crypto (
    .clk(clk_12m8), .rst_n(por_n), .rx_env, .hash_sel, .tx_mod,
    .auth_ok, .key_updated, .session_done, .step, .tx_active, .hash_busy, .tx_underflow,
    .ce_800k, .ce_6m4,
    .sr_en, .sr_we, .sr_addr, .sr_wdata, .sr_rdata,
    .ee_req, .ee_we, .ee_addr, .ee_wdata, .ee_rdata, .ee_prog, .ee_busy
  );

  sram_128x8 u_sram (
    .clk(clk_12m8), .ce(ce_800k), .en(sr_en), .we(sr_we), .addr(sr_addr),
    .wdata(sr_wdata), .rdata(sr_rdata)
  );

  eeprom_1k #(.PROG_TICKS(PROG_TICKS)) u_eeprom (
    .clk(clk_12m8), .rst_n(por_n), .ce(ce_800k), .ce_prog(ce_6m4),
    .req(ee_req), .we(ee_we), .addr(ee_addr), .wdata(ee_wdata),
    .rdata(ee_rdata), .prog(ee_prog), .busy(ee_busy)
  );

endmodule
