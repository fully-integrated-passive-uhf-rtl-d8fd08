// SPONGENT-160/160/16 sponge with a byte-wide streaming interface.
//
// The 176-bit state is cleared by `init`. Message bytes are XORed into the
// 16-bit rate (the two least significant state bytes, first byte in bits
// 15:8); each full rate block is followed by the 90-round permutation, one
// round per enabled clock. The byte flagged `in_last` is followed by the
// padding byte 0x80 (a single 1 bit, then zeros to the end of the block) and a
// final permutation. Then the core squeezes: rate bytes are handed out on the
// out_* port, and when both have been taken a further permutation is started
// as soon as `out_ready` asks for the next byte. The consumer asserts
// `out_ready` only while it wants more bytes, so no permutation runs after the
// last byte it needs.
//
// Permutation round (SPONGENT specification): the 7-bit round counter (LFSR
// x^7+x^6+1, initial value 0x45) is XORed into the 7 least significant state
// bits and its bit-reversed value into the 7 most significant bits, then the
// 4-bit S-box is applied to all 44 nibbles, then the bit permutation
// P(j) = 44*j mod 175 (bit 175 stays).
//
// Timing: all registers advance only on cycles with ce=1. A byte is accepted
// in one cycle while in_ready=1; a permutation takes ROUNDS cycles, so an
// N-byte message needs ceil((N+1)/2) permutations to absorb, and a 20-byte
// digest 9 more to squeeze.
//
// From the published design: the algorithm choice, the byte-wide SRAM-like interface,
// the state cleared to zero, blocks XORed into part of the state between
// permutations, and a state update at every clock. One round per clock is
// this design's choice; it agrees with the published step times.
module spongent160 #(
  parameter int unsigned B      = 176,  // state width
  parameter int unsigned RBYTES = 2,    // rate in bytes (16 bits)
  parameter int unsigned ROUNDS = 90
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       init,       // clear state, start a new message
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       busy        // permutation running
);

  typedef enum logic [1:0] {S_ABSORB, S_PAD, S_PERM, S_SQUEEZE} state_e;

  localparam int unsigned PW = $clog2(RBYTES + 1);
  localparam logic [6:0]  LFSR_INIT = 7'h45;

  state_e          fsm, after;
  logic [B-1:0]    st;
  logic [PW-1:0]   pos;
  logic [6:0]      lfsr;
  logic [7:0]      rnd;

  function automatic logic [3:0] sbox(logic [3:0] x);
    case (x)
      4'h0: return 4'hE;  4'h1: return 4'hD;  4'h2: return 4'hB;  4'h3: return 4'h0;
      4'h4: return 4'h2;  4'h5: return 4'h1;  4'h6: return 4'h4;  4'h7: return 4'hF;
      4'h8: return 4'h7;  4'h9: return 4'hA;  4'hA: return 4'h8;  4'hB: return 4'h5;
      4'hC: return 4'h9;  4'hD: return 4'hC;  4'hE: return 4'h3;  default: return 4'h6;
    endcase
  endfunction

  // One permutation round.
  function automatic logic [B-1:0] round_fn(logic [B-1:0] s, logic [6:0] lc);
    logic [B-1:0] a, b, p;
    a = s;
    for (int i = 0; i < 7; i++) begin
      a[i]       = a[i] ^ lc[i];
      a[B-1-i]   = a[B-1-i] ^ lc[i];
    end
    for (int n = 0; n < B / 4; n++) b[4*n +: 4] = sbox(a[4*n +: 4]);
    for (int j = 0; j < B - 1; j++) p[(j * (B / 4)) % (B - 1)] = b[j];
    p[B-1] = b[B-1];
    return p;
  endfunction

  // Rate byte k sits at st[8*(RBYTES-1-k) +: 8].
  function automatic int unsigned boff(logic [PW-1:0] k);
    return 8 * (RBYTES - 1 - int'(k));
  endfunction

  assign in_ready  = (fsm == S_ABSORB);
  assign out_valid = (fsm == S_SQUEEZE) && (pos < PW'(RBYTES));
  assign out_data  = out_valid ? st[boff(pos) +: 8] : 8'h00;
  assign busy      = (fsm == S_PERM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm   <= S_ABSORB;
      after <= S_ABSORB;
      st    <= '0;
      pos   <= '0;
      lfsr  <= LFSR_INIT;
      rnd   <= '0;
    end else if (ce) begin
      if (init) begin
        fsm <= S_ABSORB;
        st  <= '0;
        pos <= '0;
      end else begin
        unique case (fsm)
          S_ABSORB: if (in_valid) begin
            st[boff(pos) +: 8] <= st[boff(pos) +: 8] ^ in_data;
            if (pos == PW'(RBYTES - 1)) begin
              pos   <= '0;
              fsm   <= S_PERM;
              after <= in_last ? S_PAD : S_ABSORB;
              lfsr  <= LFSR_INIT;
              rnd   <= '0;
            end else begin
              pos <= pos + 1'b1;
              if (in_last) fsm <= S_PAD;
            end
          end
          S_PAD: begin
            st[boff(pos) +: 8] <= st[boff(pos) +: 8] ^ 8'h80;
            pos   <= '0;
            fsm   <= S_PERM;
            after <= S_SQUEEZE;
            lfsr  <= LFSR_INIT;
            rnd   <= '0;
          end
          S_PERM: begin
            st   <= round_fn(st, lfsr);
            lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[5]};
            rnd  <= rnd + 1'b1;
            if (rnd == 8'(ROUNDS - 1)) fsm <= after;
          end
          S_SQUEEZE: if (out_ready) begin
            if (pos < PW'(RBYTES)) begin
              pos <= pos + 1'b1;
            end else begin
              pos   <= '0;
              fsm   <= S_PERM;
              after <= S_SQUEEZE;
              lfsr  <= LFSR_INIT;
              rnd   <= '0;
            end
          end
          default: fsm <= S_ABSORB;
        endcase
      end
    end
  end

endmodule
