// Hash function block: SPONGENT-160 and Keccak behind one byte-wide port.
//
// `hash_sel` picks the algorithm; only the selected core receives clock
// enables, so the other one holds its state. `start` clears the selected core
// and latches `pad_mode`. The caller then streams the message bytes (in_*),
// flagging the final one with in_last. The block forwards the message and then
// appends one suffix byte that identifies the use (H0, H1, H2 or PRNG), after
// which the core applies its own padding. Digest bytes are then read on out_*
// for as long as the caller holds out_ready; the caller stops after the bytes
// it needs (20 for beta and Z', 16 for a key or for alpha||seed).
//
// Timing: one byte per enabled cycle in each direction, plus 90 (SPONGENT) or
// 24 (Keccak) cycles per permutation, plus one cycle for the suffix byte.
//
// From the published design: both algorithms in one block, switched by a select; one
// hash function used for three hash calculations and the PRNG "with
// different padding manners"; the byte-wide SRAM-like interface. The suffix
// byte values (use + 1) are this design's choice of padding manner.
module hash_function
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  hash_sel_e  hash_sel,
  input  logic       start,
  input  pad_mode_e  pad_mode,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       busy
);

  pad_mode_e  mode_q;
  logic       sfx_pending;          // message done, suffix byte still to send

  // stream presented to the selected core
  logic       c_valid, c_last, c_ready;
  logic [7:0] c_data;

  assign c_valid  = sfx_pending ? 1'b1 : in_valid;
  assign c_data   = sfx_pending ? pad_byte(mode_q) : in_data;
  assign c_last   = sfx_pending;
  assign in_ready = c_ready && !sfx_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q      <= PAD_H0;
      sfx_pending <= 1'b0;
    end else if (ce) begin
      if (start) begin
        mode_q      <= pad_mode;
        sfx_pending <= 1'b0;
      end else if (sfx_pending) begin
        if (c_ready) sfx_pending <= 1'b0;
      end else if (in_valid && in_ready && in_last) begin
        sfx_pending <= 1'b1;
      end
    end
  end

  logic       ce_s, ce_k;
  logic       s_ir, s_ov, s_bz, k_ir, k_ov, k_bz;
  logic [7:0] s_od, k_od;

  assign ce_s = ce && (hash_sel == HASH_SPONGENT);
  assign ce_k = ce && (hash_sel == HASH_KECCAK);

  spongent160 u_spongent (
    .clk, .rst_n, .ce(ce_s), .init(start),
    .in_valid(c_valid), .in_data(c_data), .in_last(c_last), .in_ready(s_ir),
    .out_valid(s_ov), .out_data(s_od), .out_ready(out_ready), .busy(s_bz)
  );

  keccak_core u_keccak (
    .clk, .rst_n, .ce(ce_k), .init(start),
    .in_valid(c_valid), .in_data(c_data), .in_last(c_last), .in_ready(k_ir),
    .out_valid(k_ov), .out_data(k_od), .out_ready(out_ready), .busy(k_bz)
  );

  always_comb begin
    if (hash_sel == HASH_KECCAK) begin
      c_ready   = k_ir;
      out_valid = k_ov;
      out_data  = k_od;
      busy      = k_bz;
    end else begin
      c_ready   = s_ir;
      out_valid = s_ov;
      out_data  = s_od;
      busy      = s_bz;
    end
  end

endmodule
