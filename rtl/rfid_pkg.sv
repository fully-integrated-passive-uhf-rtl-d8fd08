// Shared types and constants of the hash-based mutual-authentication tag.
//
// The tag runs one hash function (SPONGENT-160 or Keccak, selected by a pin)
// for four purposes: the three protocol hashes H0, H1, H2 and a pseudorandom
// number generator. The four uses differ only in the suffix byte the hash
// block appends before the algorithm's own padding (pad_mode_e).
//
// The memory controller executes one transfer command (mc_cmd_t) at a time on
// behalf of the protocol controller. The SRAM map below is this design's own
// layout of the 128-byte scratch memory; field sizes follow the protocol
// (key 128 bit, X and alpha 64 bit, beta/Z/Z' 160 bit).
package rfid_pkg;

  // Which hash algorithm the hash block runs.
  typedef enum logic {
    HASH_SPONGENT = 1'b0,
    HASH_KECCAK   = 1'b1
  } hash_sel_e;

  // Use of the hash function; selects the suffix byte (see PAD_BYTE).
  typedef enum logic [1:0] {
    PAD_H0   = 2'd0,
    PAD_H1   = 2'd1,
    PAD_H2   = 2'd2,
    PAD_PRNG = 2'd3
  } pad_mode_e;

  function automatic logic [7:0] pad_byte(pad_mode_e m);
    return {6'd0, m} + 8'd1;   // H0 -> 01, H1 -> 02, H2 -> 03, PRNG -> 04
  endfunction

  // Memory-controller operations.
  typedef enum logic [2:0] {
    OP_EE2SR = 3'd0,   // EEPROM -> SRAM copy
    OP_SR2EE = 3'd1,   // SRAM -> EEPROM block write
    OP_HASH  = 3'd2,   // SRAM -> hash -> SRAM
    OP_TX    = 3'd3,   // SRAM -> response encoder
    OP_RX    = 3'd4,   // command decoder -> SRAM, one reader frame
    OP_CMP   = 3'd5    // compare two SRAM ranges
  } mc_op_e;

  typedef struct packed {
    mc_op_e     op;
    logic [9:0] src;    // source address (SRAM or EEPROM)
    logic [9:0] dst;    // destination address (SRAM or EEPROM); CMP: 2nd range
    logic [7:0] len;    // bytes read from the source
    logic [7:0] len2;   // HASH: bytes squeezed out
    pad_mode_e  pad;    // HASH: use of the hash
    logic       last;   // TX: this range ends the reply
  } mc_cmd_t;

  // SRAM map (byte addresses).
  localparam logic [6:0] SR_STATE = 7'h00;  // tag state byte
  localparam logic [6:0] SR_SEED  = 7'h08;  // PRNG seed, 8 bytes
  localparam logic [6:0] SR_KEY   = 7'h10;  // secret key S_i, 16 bytes
  localparam logic [6:0] SR_X     = 7'h20;  // reader challenge X, 8 bytes
  localparam logic [6:0] SR_ALPHA = 7'h28;  // tag random alpha, 8 bytes
  localparam logic [6:0] SR_NSEED = 7'h30;  // updated seed, 8 bytes
  localparam logic [6:0] SR_BETA  = 7'h38;  // beta, 20 bytes
  localparam logic [6:0] SR_Z     = 7'h50;  // server response Z, 20 bytes
  localparam logic [6:0] SR_ZP    = 7'h68;  // tag's Z', 20 bytes

  // EEPROM map (byte addresses): page 0 holds state and seed, page 1 the key.
  localparam logic [9:0] EE_STATE = 10'h000;
  localparam logic [9:0] EE_SEED  = 10'h008;
  localparam logic [9:0] EE_KEY   = 10'h010;

  localparam int unsigned X_BITS = 64;
  localparam int unsigned Z_BITS = 160;

endpackage
