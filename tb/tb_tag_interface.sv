// Testbench for tag_interface at its default parameters. A 64-bit PIE frame
// (Tari 25 us) on rx_env must come out as eight bytes and a frame end with 64
// bits; a 28-byte reply offered on the byte port must appear on tx_mod as
// FM0 at 95.5 kbit/s; a reader frame sent while the reply is on the air must
// be ignored. The 800 kHz strobe rate is checked as well.
module tb_tag_interface;
  localparam int TARI = 320, PW = 160, HALF = 67;
  logic clk = 0, rst_n = 0, rx = 1, mod, c6, c800, c40;
  logic bv, fe, tv, tl, tr, act, uf;
  logic [7:0] bd, td;
  logic [8:0] fb;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  tag_interface dut (.clk, .rst_n, .ce_6m4(c6), .ce_800k(c800), .ce_40k(c40),
    .rx_env(rx), .tx_mod(mod), .rx_byte_valid(bv), .rx_byte_data(bd),
    .rx_frame_end(fe), .rx_frame_bits(fb), .tx_valid(tv), .tx_data(td), .tx_last(tl),
    .tx_ready(tr), .tx_active(act), .tx_underflow(uf));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  byte unsigned got[$], txq[$];
  int frames = 0, fbits = 0, n800 = 0;
  always @(posedge clk) begin
    if (c800) n800++;
    if (c800 && bv) got.push_back(bd);
    if (c800 && fe) begin frames++; fbits = fb; end
  end
  // the byte port is sampled on the clock edge; the queue moves half a cycle later
  logic took;
  always @(posedge clk) took <= c800 && tv && tr;
  always @(negedge clk) if (took) void'(txq.pop_front());
  always_comb begin
    tv = txq.size() > 0;
    td = tv ? txq[0] : 8'h00;
    tl = txq.size() == 1;
  end

  task automatic send(byte unsigned d[$], int nbits);
    rx = 1; repeat (TARI) @(posedge clk);
    rx = 0; repeat (PW) @(posedge clk);
    for (int i = 0; i < nbits; i++) begin
      rx = 1; repeat ((d[i/8][7 - i%8] ? 2 * TARI : TARI) - PW) @(posedge clk);
      rx = 0; repeat (PW) @(posedge clk);
    end
    rx = 1; repeat (4 * TARI) @(posedge clk);
  endtask

  initial begin
    byte unsigned x[$], y[$], dec[$];
    int t0, c0;
    bit ok, prev, h1, h2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = n800;
    for (int i = 0; i < 8; i++) x.push_back(8'($urandom));
    t0 = cyc;
    send(x, 64);
    check(frames == 1 && fbits == 64, "64-bit frame end");
    check(got == x, "challenge bytes");
    check(n800 - c0 == (cyc - t0) / 16 || n800 - c0 == (cyc - t0) / 16 + 1, "800 kHz strobe rate");
    // reply, with a reader frame sent during it
    for (int i = 0; i < 28; i++) y.push_back(8'($urandom));
    txq = y;
    fork
      begin
        while (mod == 0) @(posedge clk);
        t0 = cyc; ok = 1; prev = 0; dec = {};
        for (int i = 0; i <= 224; i++) begin
          while (cyc < t0 + 2 * i * HALF + HALF / 2) @(posedge clk);
          h1 = mod;
          while (cyc < t0 + (2 * i + 1) * HALF + HALF / 2) @(posedge clk);
          h2 = mod;
          if (h1 == prev) ok = 0;
          prev = h2;
          if (i < 224) begin
            if (i % 8 == 0) dec.push_back(0);
            dec[i/8][7 - i%8] = (h1 == h2);
          end
        end
      end
      begin
        while (!act) @(posedge clk);
        repeat (2000) @(posedge clk);
        send(x, 16);
      end
    join
    while (act) @(posedge clk);
    check(ok, "FM0 framing");
    check(dec == y, "reply bytes");
    check(frames == 1, "frame during the reply ignored");
    check(!uf, "no underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
