// Keccak sponge (Keccak-f[1600], 24 rounds) with a byte-wide streaming
// interface.
//
// The 1600-bit state is cleared by `init`. Message bytes are XORed into the
// rate one at a time (byte k of the rate is state bits 8k+7..8k, lanes little
// endian as in the Keccak reference). When RATE_BYTES bytes have been
// absorbed the permutation runs, one round per enabled clock. After the byte
// flagged `in_last` the original Keccak padding pad10*1 is applied (0x01 after
// the message, 0x80 into the last rate byte) and the final permutation runs.
// The core then squeezes: rate bytes are handed out in order; when the rate is
// used up, a further permutation starts once `out_ready` asks for more. The
// consumer asserts `out_ready` only while it wants more bytes.
//
// Default rate: 168 bytes (capacity 256 bits, 128-bit security). With
// RATE_BYTES=136 the core computes Keccak-256.
//
// Timing: registers advance only when ce=1; one byte per cycle on either port;
// a permutation takes 24 cycles.
//
// From the published design: Keccak as the 128-bit-security hash, the byte-wide
// SRAM-like interface, the zero-initialised state, blocks XORed into part of
// the state between permutations and a state update at every clock. The
// rate/capacity split and one round per clock are this design's choices.
module keccak_core #(
  parameter int unsigned RATE_BYTES = 168
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       init,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       busy
);

  typedef enum logic [1:0] {S_ABSORB, S_PAD, S_PERM, S_SQUEEZE} state_e;

  localparam int unsigned PW = $clog2(RATE_BYTES + 1);

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // Rotation offsets, indexed [x][y].
  localparam int ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}
  };

  state_e         fsm, after;
  logic [1599:0]  st;
  logic [PW-1:0]  pos;
  logic [4:0]     rnd;

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic logic [1599:0] round_fn(logic [1599:0] s, logic [63:0] rc);
    logic [63:0] a [5][5];
    logic [63:0] b [5][5];
    logic [63:0] c [5];
    logic [63:0] d [5];
    logic [1599:0] r;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = s[64*(x+5*y) +: 64];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = a[x][y] ^ d[x];
    // rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y][(2*x+3*y)%5] = rotl(a[x][y], ROT[x][y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = b[x][y] ^ (~b[(x+1)%5][y] & b[(x+2)%5][y]);
    // iota
    a[0][0] = a[0][0] ^ rc;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[64*(x+5*y) +: 64] = a[x][y];
    return r;
  endfunction

  // state with pad10*1 applied at the current byte position
  logic [1599:0] padded;
  always_comb begin
    padded                        = st;
    padded[8*pos +: 8]            = padded[8*pos +: 8] ^ 8'h01;
    padded[8*(RATE_BYTES-1) +: 8] = padded[8*(RATE_BYTES-1) +: 8] ^ 8'h80;
  end

  assign in_ready  = (fsm == S_ABSORB);
  assign out_valid = (fsm == S_SQUEEZE) && (pos < PW'(RATE_BYTES));
  assign out_data  = out_valid ? st[8*pos +: 8] : 8'h00;
  assign busy      = (fsm == S_PERM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm   <= S_ABSORB;
      after <= S_ABSORB;
      st    <= '0;
      pos   <= '0;
      rnd   <= '0;
    end else if (ce) begin
      if (init) begin
        fsm <= S_ABSORB;
        st  <= '0;
        pos <= '0;
      end else begin
        unique case (fsm)
          S_ABSORB: if (in_valid) begin
            st[8*pos +: 8] <= st[8*pos +: 8] ^ in_data;
            if (pos == PW'(RATE_BYTES - 1)) begin
              pos   <= '0;
              fsm   <= S_PERM;
              after <= in_last ? S_PAD : S_ABSORB;
              rnd   <= '0;
            end else begin
              pos <= pos + 1'b1;
              if (in_last) fsm <= S_PAD;
            end
          end
          S_PAD: begin
            st    <= padded;
            pos   <= '0;
            fsm   <= S_PERM;
            after <= S_SQUEEZE;
            rnd   <= '0;
          end
          S_PERM: begin
            st  <= round_fn(st, RC[rnd]);
            rnd <= rnd + 1'b1;
            if (rnd == 5'd23) fsm <= after;
          end
          S_SQUEEZE: if (out_ready) begin
            if (pos < PW'(RATE_BYTES)) begin
              pos <= pos + 1'b1;
            end else begin
              pos   <= '0;
              fsm   <= S_PERM;
              after <= S_SQUEEZE;
              rnd   <= '0;
            end
          end
          default: fsm <= S_ABSORB;
        endcase
      end
    end
  end

endmodule
