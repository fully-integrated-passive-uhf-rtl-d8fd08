// Testbench for fm0_encoder. Replies of 1..30 random bytes are fed through
// the byte port on 800 kHz strobes and decoded from tx_mod by sampling the
// middle of every half bit (67 cycles each). Checked: the bytes, the level
// inversion at every bit boundary, the closing dummy 1, the return to 0, the
// turnaround of T1_TICKS 40 kHz periods before the first edge, the bit time
// (134 cycles, 95.5 kbit/s), and that a reply whose next byte does not come
// is closed with underflow set.
module tb_fm0_encoder;
  localparam int HALF = 67, T1 = 4;
  logic clk = 0, rst_n = 0, cb, ch, c40, tv = 0, tl = 0, tr, mod, act, uf;
  logic [7:0] td = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign cb  = (cyc % 16 == 15);
  assign c40 = (cyc % 320 == 319);
  assign ch  = (cyc % HALF == HALF - 1);

  fm0_encoder #(.T1_TICKS(T1)) dut (.clk, .rst_n, .ce_byte(cb), .ce_half(ch), .ce_40k(c40),
    .tx_valid(tv), .tx_data(td), .tx_last(tl), .tx_ready(tr), .tx_mod(mod),
    .active(act), .underflow(uf));

  byte unsigned q[$];
  bit feed_stop = 0;
  // byte feeder: one byte per accepted strobe
  // the byte port is sampled on the clock edge; the queue moves half a cycle later
  logic took;
  always @(posedge clk) took <= cb && tv && tr;
  always @(negedge clk) if (took) void'(q.pop_front());
  always_comb begin
    tv = (q.size() > 0) && !feed_stop;
    td = (q.size() > 0) ? q[0] : 8'h00;
    tl = (q.size() == 1);
  end

  task automatic decode(int nbits, output byte unsigned d[$], output bit ok, output int t_first);
    int t0;
    bit prev, h1, h2;
    d = {};
    ok = 1;
    while (mod == 0) @(posedge clk);
    t0 = cyc;
    t_first = cyc;
    prev = 0;
    for (int i = 0; i <= nbits; i++) begin
      while (cyc < t0 + 2 * i * HALF + HALF / 2) @(posedge clk);
      h1 = mod;
      while (cyc < t0 + (2 * i + 1) * HALF + HALF / 2) @(posedge clk);
      h2 = mod;
      if (h1 == prev) ok = 0;
      prev = h2;
      if (i < nbits) begin
        if (i % 8 == 0) d.push_back(0);
        d[i/8][7 - i%8] = (h1 == h2);
      end else if (h1 != h2) ok = 0;
    end
    while (cyc < t0 + (2 * nbits + 2) * HALF + HALF / 2) @(posedge clk);
    if (mod != 0) ok = 0;
  endtask

  initial begin
    byte unsigned src[$], got[$];
    bit ok;
    int tq, tf;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      automatic int n = (t == 0) ? 28 : $urandom_range(1, 30);
      src = {};
      for (int i = 0; i < n; i++) src.push_back(8'($urandom));
      @(posedge clk);
      tq = cyc;
      q = src;
      decode(8 * n, got, ok, tf);
      checks++; if (!ok) begin failures++; $display("reply %0d: FM0 framing", t); end
      checks++; if (got != src) begin failures++; $display("reply %0d: data mismatch", t); end
      checks++;
      if (tf - tq < (T1 - 1) * 320 || tf - tq > (T1 + 1) * 320 + 2 * HALF) begin
        failures++; $display("reply %0d: first edge after %0d cycles", t, tf - tq);
      end
      while (act) @(posedge clk);
      checks++; if (uf) begin failures++; $display("reply %0d: spurious underflow", t); end
    end
    // underflow: two bytes offered, the second held back
    q = {8'hC3, 8'h3C, 8'h55};
    wait (q.size() == 1);
    feed_stop = 1;
    while (!act) @(posedge clk);
    while (act) @(posedge clk);
    checks++; if (!uf) begin failures++; $display("underflow not flagged"); end
    feed_stop = 0;
    q = {};
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
