// Cryptographic block of the tag: everything of the digital part except the
// two memories. It holds the interface (clock divider, reader command
// decoder, response encoder), the finite state machine, the memory
// controller, the hash function block and the comparator, and brings out the
// SRAM and EEPROM ports of the memory controller together with the 800 kHz
// and 6.4 MHz clock enables that the memories run on.
//
// Interface: clk/rst_n (12.8 MHz, power-on reset), the air signals rx_env and
// tx_mod, the hash select, the status outputs (see rfid_tag), and the memory
// ports: SRAM byte port (en, we, addr, wdata, rdata; read data one enabled
// cycle after the request) and EEPROM port (req, we, addr, wdata, rdata,
// prog, busy). All logic runs on the one clock with enables.
//
// From the published design: the grouping of interface, comparator, finite
// state machine, hash function and memory controller into one cryptographic
// block beside the SRAM and the EEPROM. The port split is this design's.
module crypto_block
  import rfid_pkg::*;
#(
  parameter int unsigned DIV_HALF = 67,  // reply half bit, 12.8 MHz cycles
  parameter int unsigned T1_TICKS = 4    // reply turnaround, 40 kHz ticks
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_env,
  input  hash_sel_e  hash_sel,
  output logic       tx_mod,
  output logic       auth_ok,
  output logic       key_updated,
  output logic       session_done,
  output logic [3:0] step,
  output logic       tx_active,     // reply in progress
  output logic       hash_busy,     // hash permutation running
  output logic       tx_underflow,
  // clock enables for the memories
  output logic       ce_800k,
  output logic       ce_6m4,
  // SRAM port
  output logic       sr_en,
  output logic       sr_we,
  output logic [6:0] sr_addr,
  output logic [7:0] sr_wdata,
  input  logic [7:0] sr_rdata,
  // EEPROM port
  output logic       ee_req,
  output logic       ee_we,
  output logic [9:0] ee_addr,
  output logic [7:0] ee_wdata,
  input  logic [7:0] ee_rdata,
  output logic       ee_prog,
  input  logic       ee_busy
);

  // interface <-> memory controller
  logic       rx_bv, rx_fe, tx_v, tx_l, tx_r;
  logic [7:0] rx_bd, tx_d;
  logic [8:0] rx_fb;

  tag_interface #(.DIV_HALF(DIV_HALF), .T1_TICKS(T1_TICKS)) u_if (
    .clk, .rst_n, .ce_6m4, .ce_800k, .ce_40k(), .rx_env, .tx_mod,
    .rx_byte_valid(rx_bv), .rx_byte_data(rx_bd),
    .rx_frame_end(rx_fe), .rx_frame_bits(rx_fb),
    .tx_valid(tx_v), .tx_data(tx_d), .tx_last(tx_l), .tx_ready(tx_r),
    .tx_active, .tx_underflow
  );

  // state machine <-> memory controller
  logic       cmd_v, cmd_r, mc_done, cmp_eq;
  mc_cmd_t    cmd;
  logic [8:0] rx_bits;

  omhso_fsm u_fsm (
    .clk, .rst_n, .ce(ce_800k),
    .cmd_valid(cmd_v), .cmd, .cmd_ready(cmd_r), .done(mc_done),
    .rx_bits, .cmp_equal(cmp_eq),
    .step, .auth_ok, .key_updated, .session_done
  );

  // memory controller <-> hash block and comparator
  logic       h_start, h_iv, h_il, h_ir, h_ov, h_or;
  pad_mode_e  h_pad;
  logic [7:0] h_id, h_od;
  logic       c_clear, c_valid;
  logic [7:0] c_a, c_b;

  memory_controller u_mc (
    .clk, .rst_n, .ce(ce_800k),
    .cmd_valid(cmd_v), .cmd, .cmd_ready(cmd_r), .done(mc_done), .rx_bits,
    .sr_en, .sr_we, .sr_addr, .sr_wdata, .sr_rdata,
    .ee_req, .ee_we, .ee_addr, .ee_wdata, .ee_rdata, .ee_prog, .ee_busy,
    .h_start, .h_pad, .h_in_valid(h_iv), .h_in_data(h_id), .h_in_last(h_il),
    .h_in_ready(h_ir), .h_out_valid(h_ov), .h_out_data(h_od), .h_out_ready(h_or),
    .tx_valid(tx_v), .tx_data(tx_d), .tx_last(tx_l), .tx_ready(tx_r),
    .rx_byte_valid(rx_bv), .rx_byte_data(rx_bd),
    .rx_frame_end(rx_fe), .rx_frame_bits(rx_fb),
    .c_clear, .c_valid, .c_a, .c_b
  );

  hash_function u_hash (
    .clk, .rst_n, .ce(ce_800k), .hash_sel, .start(h_start), .pad_mode(h_pad),
    .in_valid(h_iv), .in_data(h_id), .in_last(h_il), .in_ready(h_ir),
    .out_valid(h_ov), .out_data(h_od), .out_ready(h_or), .busy(hash_busy)
  );

  comparator u_cmp (
    .clk, .rst_n, .ce(ce_800k), .clear(c_clear), .in_valid(c_valid),
    .a(c_a), .b(c_b), .equal(cmp_eq), .count()
  );

endmodule
