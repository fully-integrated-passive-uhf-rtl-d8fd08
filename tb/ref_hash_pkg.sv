// Reference models of the two sponges and of the tag's four hash uses, for
// testbenches. Written independently of the RTL: Keccak follows the compact
// lane-walk formulation with round constants generated by the LFSR
// x^8+x^6+x^5+x^4+1, SPONGENT works bit by bit on an unpacked bit array.
package ref_hash_pkg;

  typedef byte unsigned bytes_t[$];

  // ---------------- Keccak-f[1600] ----------------
  function automatic void keccak_f(ref logic [63:0] a[25]);
    int rotc[24] = '{1,3,6,10,15,21,28,36,45,55,2,14,27,41,56,8,25,43,62,18,39,61,20,44};
    int piln[24] = '{10,7,11,17,18,3,5,16,8,21,24,4,15,23,19,13,12,2,20,14,22,9,6,1};
    logic [7:0] r = 8'h01;
    logic [63:0] bc[5];
    logic [63:0] t;
    for (int rnd = 0; rnd < 24; rnd++) begin
      for (int i = 0; i < 5; i++) bc[i] = a[i] ^ a[i+5] ^ a[i+10] ^ a[i+15] ^ a[i+20];
      for (int i = 0; i < 5; i++) begin
        t = bc[(i+4)%5] ^ {bc[(i+1)%5][62:0], bc[(i+1)%5][63]};
        for (int j = 0; j < 25; j += 5) a[j+i] ^= t;
      end
      t = a[1];
      for (int i = 0; i < 24; i++) begin
        int j = piln[i];
        logic [63:0] tmp = a[j];
        a[j] = (t << rotc[i]) | (t >> (64 - rotc[i]));
        t = tmp;
      end
      for (int j = 0; j < 25; j += 5) begin
        for (int i = 0; i < 5; i++) bc[i] = a[j+i];
        for (int i = 0; i < 5; i++) a[j+i] ^= (~bc[(i+1)%5]) & bc[(i+2)%5];
      end
      for (int j = 0; j < 7; j++) begin
        logic bit0 = r[0];
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
        if (bit0) a[0][(1 << j) - 1] ^= 1'b1;
      end
    end
  endfunction

  function automatic bytes_t keccak_hash(bytes_t msg, int rate, int outlen);
    logic [63:0] a[25];
    byte unsigned blk[];
    bytes_t res;
    int n;
    for (int i = 0; i < 25; i++) a[i] = '0;
    msg.push_back(8'h01);
    while (msg.size() % rate != 0) msg.push_back(8'h00);
    msg[msg.size()-1] = msg[msg.size()-1] | 8'h80;
    n = 0;
    while (n < msg.size()) begin
      for (int k = 0; k < rate; k++) a[k/8][8*(k%8) +: 8] ^= msg[n+k];
      n += rate;
      keccak_f(a);
    end
    while (1) begin
      for (int k = 0; k < rate; k++) begin
        if (res.size() == outlen) return res;
        res.push_back(a[k/8][8*(k%8) +: 8]);
      end
      keccak_f(a);
    end
  endfunction

  // ---------------- SPONGENT-160/160/16 ----------------
  function automatic void spongent_p(ref bit s[176]);
    bit [3:0] sb[16] = '{4'hE,4'hD,4'hB,4'h0,4'h2,4'h1,4'h4,4'hF,
                         4'h7,4'hA,4'h8,4'h5,4'h9,4'hC,4'h3,4'h6};
    bit [6:0] lc = 7'h45;
    bit t[176];
    for (int rnd = 0; rnd < 90; rnd++) begin
      for (int i = 0; i < 7; i++) begin
        s[i]       ^= lc[i];
        s[175 - i] ^= lc[i];
      end
      lc = {lc[5:0], lc[6] ^ lc[5]};
      for (int n = 0; n < 44; n++) begin
        bit [3:0] v = {s[4*n+3], s[4*n+2], s[4*n+1], s[4*n]};
        v = sb[v];
        {s[4*n+3], s[4*n+2], s[4*n+1], s[4*n]} = v;
      end
      for (int j = 0; j < 176; j++) t[(j == 175) ? 175 : ((j * 44) % 175)] = s[j];
      s = t;
    end
  endfunction

  // Message bytes enter rate bits 15..8 then 7..0; padding 0x80 00..
  function automatic bytes_t spongent_hash(bytes_t msg, int outlen);
    bit s[176];
    bytes_t res;
    foreach (s[i]) s[i] = 0;
    msg.push_back(8'h80);
    if (msg.size() % 2 != 0) msg.push_back(8'h00);
    for (int n = 0; n < msg.size(); n += 2) begin
      for (int b = 0; b < 8; b++) begin
        s[8 + b] ^= msg[n][b];
        s[b]     ^= msg[n+1][b];
      end
      spongent_p(s);
    end
    while (1) begin
      for (int k = 0; k < 2; k++) begin
        byte unsigned v = 0;
        if (res.size() == outlen) return res;
        for (int b = 0; b < 8; b++) v[b] = s[8*(1-k) + b];
        res.push_back(v);
      end
      spongent_p(s);
    end
  endfunction

  // ---------------- tag hash uses ----------------
  // usage: 0 = H0, 1 = H1, 2 = H2, 3 = PRNG; suffix byte usage+1.
  function automatic bytes_t tag_hash(bit keccak, int usage, bytes_t msg, int outlen);
    msg.push_back(8'(usage + 1));
    if (keccak) return keccak_hash(msg, 168, outlen);
    return spongent_hash(msg, outlen);
  endfunction

endpackage
