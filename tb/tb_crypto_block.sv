// Testbench of the cryptographic block with the SRAM and the EEPROM model
// attached, at default parameters. It plays reader and server as the
// end-to-end testbench does (four sessions: SPONGENT-160 accepted, Keccak
// with a corrupted Z, Keccak resynchronised through S_{i-1}, SPONGENT-160
// after an ignored 40-bit frame) and also watches the two memory ports of the
// block: SRAM addresses stay inside the 124-byte working area, EEPROM writes
// only hit the seed and key bytes (0x008-0x01F), no EEPROM request is made
// while a block write runs, and every kind of memory access happens.
module tb_crypto_block;
  import rfid_pkg::*;
  import ref_hash_pkg::*;

  localparam realtime TCLK = 78.125ns;   // 12.8 MHz

  logic       clk = 0, por_n = 0, rx_env = 1;
  hash_sel_e  hash_sel = HASH_SPONGENT;
  logic       tx_mod, auth_ok, key_updated, session_done, tx_active, hash_busy, tx_underflow;
  logic [3:0] step;

  always #(TCLK / 2) clk = ~clk;

  logic       ce_6m4, ce_800k, sr_en, sr_we, ee_req, ee_we, ee_prog, ee_busy;
  logic [6:0] sr_addr;
  logic [7:0] sr_wdata, sr_rdata, ee_wdata, ee_rdata;
  logic [9:0] ee_addr;

  crypto_block dut (
    .clk, .rst_n(por_n), .rx_env, .hash_sel, .tx_mod, .auth_ok, .key_updated,
    .session_done, .step, .tx_active, .hash_busy, .tx_underflow,
    .ce_800k, .ce_6m4,
    .sr_en, .sr_we, .sr_addr, .sr_wdata, .sr_rdata,
    .ee_req, .ee_we, .ee_addr, .ee_wdata, .ee_rdata, .ee_prog, .ee_busy
  );

  sram_128x8 u_sram (
    .clk, .ce(ce_800k), .en(sr_en), .we(sr_we), .addr(sr_addr),
    .wdata(sr_wdata), .rdata(sr_rdata)
  );

  eeprom_1k u_eeprom (
    .clk, .rst_n(por_n), .ce(ce_800k), .ce_prog(ce_6m4),
    .req(ee_req), .we(ee_we), .addr(ee_addr), .wdata(ee_wdata),
    .rdata(ee_rdata), .prog(ee_prog), .busy(ee_busy)
  );

  // memory-port monitor
  int n_sr_rd = 0, n_sr_wr = 0, n_ee_rd = 0, n_ee_wr = 0, n_ee_prog = 0;
  int bad_sr = 0, bad_ee = 0, busy_req = 0;
  always @(posedge clk) if (por_n && ce_800k) begin
    if (sr_en && !sr_we) n_sr_rd <= n_sr_rd + 1;
    if (sr_en && sr_we) begin
      n_sr_wr <= n_sr_wr + 1;
      if (sr_addr >= 7'h7C) bad_sr <= bad_sr + 1;
    end
    if (ee_req && !ee_we) n_ee_rd <= n_ee_rd + 1;
    if (ee_req && ee_we) begin
      n_ee_wr <= n_ee_wr + 1;
      if (ee_addr < EE_SEED || ee_addr > 10'h01F) bad_ee <= bad_ee + 1;
    end
    if (ee_prog) n_ee_prog <= n_ee_prog + 1;
    if (ee_req && ee_busy) busy_req <= busy_req + 1;
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0t] %s", $time, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_spongent = 0, n_keccak = 0, n_accept = 0, n_reject = 0, n_resync = 0;
  int n_ignored = 0, n_keywrite = 0, n_seedwrite = 0, n_hashperm = 0;
  int step_seen[9];
  always @(posedge clk) begin
    step_seen[step] <= step_seen[step] + 1;
    if (hash_busy) n_hashperm <= n_hashperm + 1;
  end

  // step durations in 800 kHz cycles, per session
  longint step_start;
  int     step_len[9];
  logic [3:0] step_q = 0;
  always @(posedge clk) begin
    if (step != step_q) begin
      if (step_q != 0) step_len[step_q] = int'((cyc - step_start) / 16);
      step_start = cyc;
      step_q    <= step;
    end
  end

  // ---------------- reader: PIE transmitter ----------------
  localparam int TARI = 320;   // 25 us in 12.8 MHz cycles
  localparam int PW   = 160;

  task automatic pie_symbol(bit b);
    int len = b ? 2 * TARI : TARI;
    rx_env = 1; repeat (len - PW) @(posedge clk);
    rx_env = 0; repeat (PW) @(posedge clk);
  endtask

  task automatic send_bits(bytes_t data, int nbits);
    rx_env = 1; repeat (TARI) @(posedge clk);
    rx_env = 0; repeat (PW) @(posedge clk);      // opening edge
    for (int i = 0; i < nbits; i++) pie_symbol(data[i/8][7 - i%8]);
    rx_env = 1; repeat (4 * TARI) @(posedge clk);
  endtask

  // ---------------- reader: FM0 receiver ----------------
  localparam int HALF = 67;
  real rate_kbps;

  task automatic recv_fm0(int nbits, output bytes_t data, output bit ok);
    bit prev_second, h1, h2;
    longint t0;
    data = {};
    ok = 1;
    wait (tx_mod == 1);
    t0 = cyc;
    prev_second = 0;
    for (int i = 0; i <= nbits; i++) begin
      while (cyc < t0 + longint'(2 * i * HALF + HALF / 2)) @(posedge clk);
      h1 = tx_mod;
      while (cyc < t0 + longint'((2 * i + 1) * HALF + HALF / 2)) @(posedge clk);
      h2 = tx_mod;
      if (h1 == prev_second) ok = 0;          // missing boundary inversion
      prev_second = h2;
      if (i < nbits) begin
        if (i % 8 == 0) data.push_back(0);
        data[i/8][7 - i%8] = (h1 == h2);
      end else if (h1 != h2) ok = 0;          // closing dummy 1
    end
    rate_kbps = 12800.0 / real'(2 * HALF);
    wait (tx_active == 0);
  endtask

  // ---------------- server ----------------
  bytes_t s_cur, s_prev;        // server keys
  bytes_t tag_key, tag_seed;    // expected tag EEPROM contents

  function automatic bytes_t cat3(bytes_t a, bytes_t b, bytes_t c);
    bytes_t r = a;
    foreach (b[i]) r.push_back(b[i]);
    foreach (c[i]) r.push_back(c[i]);
    return r;
  endfunction

  function automatic bytes_t slice(bytes_t a, int from, int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(a[from + i]);
    return r;
  endfunction

  function automatic bytes_t ee_bytes(int base, int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(u_eeprom.mem[base + i]);
    return r;
  endfunction

  // published step times (ms), steps 1..8
  real t_sp[9] = '{0.0, 0.02, 0.02, 4.52, 2.94, 0.06, 2.04, 4.33, 4.33};
  real t_kc[9] = '{0.0, 0.02, 0.02, 0.23, 0.14, 0.06, 0.11, 4.33, 4.33};

  task automatic session(hash_sel_e hs, bit corrupt_z, bit junk_first);
    bytes_t x, y, alpha, beta, b1, b2, z, prng, expect_key, expect_seed;
    bit ok, kc, m1, m2;
    kc = (hs == HASH_KECCAK);
    hash_sel = hs;
    foreach (step_len[i]) step_len[i] = 0;
    if (junk_first) begin
      bytes_t j = {8'hA5, 8'h5A, 8'hFF, 8'h00, 8'h12};
      send_bits(j, 40);
      n_ignored++;
    end
    x = {};
    for (int i = 0; i < 8; i++) x.push_back(8'($urandom));
    send_bits(x, 64);
    recv_fm0(224, y, ok);
    check(ok, "FM0 framing of Y");
    alpha = slice(y, 0, 8);
    beta  = slice(y, 8, 20);
    // the tag's own expectations
    prng = tag_hash(kc, 3, tag_seed, 16);
    check(alpha == slice(prng, 0, 8), "alpha = first half of PRNG output");
    // server, Algorithm 1
    b1 = tag_hash(kc, 0, cat3(s_cur, x, alpha), 20);
    b2 = tag_hash(kc, 0, cat3(s_prev, x, alpha), 20);
    m1 = (beta == b1);
    m2 = (beta == b2);
    check(m1 || m2, "server recognises beta");
    if (m1)      z = tag_hash(kc, 1, cat3(s_cur, x, alpha), 20);
    else if (m2) z = tag_hash(kc, 1, cat3(s_prev, x, alpha), 20);
    else begin z = {}; for (int i = 0; i < 20; i++) z.push_back(8'($urandom)); end
    if (m2 && !m1) n_resync++;
    if (m1) begin
      s_prev = s_cur;
      s_cur  = slice(tag_hash(kc, 2, s_cur, 16), 0, 16);
    end
    if (corrupt_z) z[7] = z[7] ^ 8'h10;
    // tag expectations
    expect_seed = slice(prng, 8, 8);
    expect_key  = corrupt_z ? tag_key : slice(tag_hash(kc, 2, tag_key, 16), 0, 16);
    send_bits(z, 160);
    @(posedge session_done);
    repeat (4) @(posedge clk);
    check(auth_ok == !corrupt_z, "auth_ok");
    check(key_updated == !corrupt_z, "key_updated");
    if (corrupt_z) n_reject++; else begin n_accept++; n_keywrite++; end
    n_seedwrite++;
    check(ee_bytes(EE_KEY, 16) == expect_key, "EEPROM key after session");
    check(ee_bytes(EE_SEED, 8) == expect_seed, "EEPROM seed after session");
    tag_key  = expect_key;
    tag_seed = expect_seed;
    if (kc) n_keccak++; else n_spongent++;
    // step durations against the published step times
    for (int s = 1; s <= 8; s++) begin
      real ms, ref_ms;
      if (corrupt_z && (s == 6 || s == 7)) continue;
      ms     = real'(step_len[s]) / 800.0;
      ref_ms = kc ? t_kc[s] : t_sp[s];
      check(ms > 0.75 * ref_ms && ms < 1.25 * ref_ms, $sformatf("step %0d duration", s));
    end
  endtask

  initial begin
    bytes_t k0, sd0;
    for (int i = 0; i < 16; i++) k0.push_back(8'($urandom));
    for (int i = 0; i < 8; i++) sd0.push_back(8'($urandom));
    for (int i = 0; i < 1024; i++) u_eeprom.mem[i] = 8'hFF;
    u_eeprom.mem[EE_STATE] = 8'h00;
    foreach (k0[i])  u_eeprom.mem[EE_KEY + i]  = k0[i];
    foreach (sd0[i]) u_eeprom.mem[EE_SEED + i] = sd0[i];
    s_cur = k0; s_prev = k0; tag_key = k0; tag_seed = sd0;
    repeat (10) @(posedge clk);
    por_n = 1;

    session(HASH_SPONGENT, 0, 0);
    session(HASH_KECCAK,   1, 0);
    session(HASH_KECCAK,   0, 0);
    session(HASH_SPONGENT, 0, 1);

    check(rate_kbps > 90.0 && rate_kbps < 100.0, "reply rate near 95 kbit/s");
    check(!tx_underflow, "no reply underflow");
    check(n_spongent > 0, "SPONGENT-160 session");
    check(n_keccak > 0, "Keccak session");
    check(n_accept > 0, "authentication accepted");
    check(n_reject > 0, "authentication rejected");
    check(n_resync > 0, "resynchronisation through S_{i-1}");
    check(n_ignored > 0, "frame of wrong length ignored");
    check(n_keywrite > 0 && n_seedwrite > n_keywrite, "key write done and skipped");
    check(n_hashperm > 0, "hash permutations");
    check(n_sr_rd > 0 && n_sr_wr > 0, "SRAM reads and writes");
    check(n_ee_rd > 0 && n_ee_wr > 0, "EEPROM reads and page-buffer writes");
    check(n_ee_prog == n_keywrite + n_seedwrite, "one block write per key and seed update");
    check(bad_sr == 0, "SRAM writes inside the working area");
    check(bad_ee == 0, "EEPROM writes only to seed and key");
    check(busy_req == 0, "no EEPROM request during a block write");
    for (int s = 0; s <= 8; s++) check(step_seen[s] > 0, $sformatf("step %0d seen", s));
    $display("sessions: SPONGENT %0d, Keccak %0d; accepted %0d, rejected %0d, resync %0d, ignored frames %0d",
             n_spongent, n_keccak, n_accept, n_reject, n_resync, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
