// Testbench for memory_controller, connected to the real SRAM, EEPROM model
// (short program time), hash block and comparator; the reader side is played
// by the testbench (byte pulses in, a byte sink with a random ready out).
// Every command is run and its effect checked against the memories and the
// reference hash model: EEPROM->SRAM copy, SRAM->EEPROM block write (and its
// wait for the program time), HASH with both algorithms, TX with the last
// flag only on the final byte, RX including bytes beyond the buffer, and
// CMP for equal and unequal ranges. Copy speed (one byte per cycle) and
// compare speed (two cycles per pair) are checked.
module tb_memory_controller;
  import rfid_pkg::*;
  import ref_hash_pkg::*;

  localparam int PT = 30;
  logic clk = 0, rst_n = 0, ce, ce_prog;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce      = (cyc % 16 == 15);
  assign ce_prog = (cyc % 2 == 1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic       cmd_valid = 0, cmd_ready, done;
  mc_cmd_t    cmd;
  logic [8:0] rx_bits;
  logic       sr_en, sr_we, ee_req, ee_we, ee_prog, ee_busy;
  logic [6:0] sr_addr;
  logic [7:0] sr_wdata, sr_rdata, ee_wdata, ee_rdata;
  logic [9:0] ee_addr;
  logic       h_start, h_iv, h_il, h_ir, h_ov, h_or, h_bz;
  pad_mode_e  h_pad;
  logic [7:0] h_id, h_od;
  logic       tx_v, tx_l, tx_r = 0;
  logic [7:0] tx_d;
  logic       rx_bv = 0, rx_fe = 0;
  logic [7:0] rx_bd = 0;
  logic [8:0] rx_fb = 0;
  logic       c_clear, c_valid, c_eq;
  logic [7:0] c_a, c_b, c_cnt;
  hash_sel_e  hsel = HASH_SPONGENT;

  memory_controller dut (.clk, .rst_n, .ce, .cmd_valid, .cmd, .cmd_ready, .done, .rx_bits,
    .sr_en, .sr_we, .sr_addr, .sr_wdata, .sr_rdata,
    .ee_req, .ee_we, .ee_addr, .ee_wdata, .ee_rdata, .ee_prog, .ee_busy,
    .h_start, .h_pad, .h_in_valid(h_iv), .h_in_data(h_id), .h_in_last(h_il), .h_in_ready(h_ir),
    .h_out_valid(h_ov), .h_out_data(h_od), .h_out_ready(h_or),
    .tx_valid(tx_v), .tx_data(tx_d), .tx_last(tx_l), .tx_ready(tx_r),
    .rx_byte_valid(rx_bv), .rx_byte_data(rx_bd), .rx_frame_end(rx_fe), .rx_frame_bits(rx_fb),
    .c_clear, .c_valid, .c_a, .c_b);
  sram_128x8 u_sram (.clk, .ce, .en(sr_en), .we(sr_we), .addr(sr_addr), .wdata(sr_wdata), .rdata(sr_rdata));
  eeprom_1k #(.PROG_TICKS(PT)) u_ee (.clk, .rst_n, .ce, .ce_prog, .req(ee_req), .we(ee_we),
    .addr(ee_addr), .wdata(ee_wdata), .rdata(ee_rdata), .prog(ee_prog), .busy(ee_busy));
  hash_function u_h (.clk, .rst_n, .ce, .hash_sel(hsel), .start(h_start), .pad_mode(h_pad),
    .in_valid(h_iv), .in_data(h_id), .in_last(h_il), .in_ready(h_ir),
    .out_valid(h_ov), .out_data(h_od), .out_ready(h_or), .busy(h_bz));
  comparator u_c (.clk, .rst_n, .ce, .clear(c_clear), .in_valid(c_valid), .a(c_a), .b(c_b),
    .equal(c_eq), .count(c_cnt));

  // byte sink with random ready
  byte unsigned txq[$];
  int tx_lasts = 0, tx_last_pos = -1;
  always @(posedge clk) if (ce) begin
    if (tx_v && tx_r) begin
      txq.push_back(tx_d);
      if (tx_l) begin tx_lasts++; tx_last_pos = txq.size() - 1; end
    end
    tx_r <= ($urandom_range(0, 2) != 0);
  end

  function automatic mc_cmd_t mk(mc_op_e op, int src, int dst, int len, int len2, pad_mode_e p, bit last);
    mc_cmd_t c;
    c.op = op; c.src = 10'(src); c.dst = 10'(dst); c.len = 8'(len); c.len2 = 8'(len2);
    c.pad = p; c.last = last;
    return c;
  endfunction

  // issue a command, return the enabled cycles it took
  task automatic run(mc_cmd_t c, output int ncyc);
    int t0;
    @(negedge clk);
    while (!(ce && cmd_ready)) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    t0 = cyc;
    #1 cmd_valid = 0;
    while (!(ce && done)) @(posedge clk);
    ncyc = (cyc - t0) / 16;
  endtask

  function automatic bytes_t sram_bytes(int base, int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(u_sram.mem[base + i]);
    return r;
  endfunction
  function automatic bytes_t ee_bytes(int base, int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(u_ee.mem[base + i]);
    return r;
  endfunction

  initial begin
    int n;
    bytes_t m, e;
    for (int i = 0; i < 1024; i++) u_ee.mem[i] = 8'($urandom);
    for (int i = 0; i < 128; i++) u_sram.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // EEPROM -> SRAM
    run(mk(OP_EE2SR, 10'h010, 7'h10, 16, 0, PAD_H0, 0), n);
    check(sram_bytes(16, 16) == ee_bytes(16, 16), "EE2SR data");
    check(n <= 18, $sformatf("EE2SR 16 bytes in %0d cycles", n));

    // SRAM -> EEPROM block write
    run(mk(OP_SR2EE, 7'h10, 10'h120, 16, 0, PAD_H0, 0), n);
    check(ee_bytes(10'h120, 16) == sram_bytes(16, 16), "SR2EE data");
    check(n * 8 >= PT, $sformatf("SR2EE waited %0d cycles for programming", n));
    run(mk(OP_SR2EE, 7'h40, 10'h138, 8, 0, PAD_H0, 0), n);
    check(ee_bytes(10'h138, 8) == sram_bytes(64, 8), "SR2EE half page");

    // HASH, both algorithms
    for (int a = 0; a < 2; a++) begin
      hsel = a ? HASH_KECCAK : HASH_SPONGENT;
      m = sram_bytes(16, 32);
      run(mk(OP_HASH, 7'h10, 7'h60, 32, 20, PAD_H1, 0), n);
      e = tag_hash(a, 1, m, 20);
      check(sram_bytes(96, 20) == e, $sformatf("HASH alg %0d", a));
      m = sram_bytes(8, 8);
      run(mk(OP_HASH, 7'h08, 7'h28, 8, 16, PAD_PRNG, 0), n);
      e = tag_hash(a, 3, m, 16);
      check(sram_bytes(40, 16) == e, $sformatf("PRNG alg %0d", a));
    end

    // TX
    txq = {};
    tx_lasts = 0;
    run(mk(OP_TX, 7'h28, 0, 8, 0, PAD_H0, 0), n);
    run(mk(OP_TX, 7'h60, 0, 20, 0, PAD_H0, 1), n);
    e = sram_bytes(40, 8);
    for (int i = 0; i < 20; i++) e.push_back(u_sram.mem[96 + i]);
    check(txq == e, "TX bytes");
    check(tx_lasts == 1 && tx_last_pos == 27, "TX last flag on the final byte only");

    // RX: 22 bytes arrive, 20 fit
    fork
      run(mk(OP_RX, 0, 7'h50, 20, 0, PAD_H0, 0), n);
      begin
        m = {};
        for (int i = 0; i < 22; i++) begin
          m.push_back(8'($urandom));
          repeat (40) @(posedge clk);
          @(negedge clk); while (!ce) @(negedge clk);
          rx_bv = 1; rx_bd = m[i];
          @(posedge clk); #1 rx_bv = 0;
        end
        @(negedge clk); while (!ce) @(negedge clk);
        rx_fe = 1; rx_fb = 9'd176;
        @(posedge clk); #1 rx_fe = 0;
      end
    join
    check(sram_bytes(80, 20) == m[0:19], "RX bytes");
    check(u_sram.mem[100] != m[20] || u_sram.mem[101] != m[21], "RX stops at the buffer end");
    check(rx_bits == 176, "RX bit count");

    // CMP
    for (int i = 0; i < 20; i++) u_sram.mem[104 + i] = u_sram.mem[80 + i];
    run(mk(OP_CMP, 7'h50, 7'h68, 20, 0, PAD_H0, 0), n);
    check(c_eq == 1 && c_cnt == 20, "CMP equal");
    check(n <= 42, $sformatf("CMP 20 pairs in %0d cycles", n));
    u_sram.mem[104 + 19] = u_sram.mem[104 + 19] ^ 8'h01;
    run(mk(OP_CMP, 7'h50, 7'h68, 20, 0, PAD_H0, 0), n);
    check(c_eq == 0, "CMP last byte differs");
    u_sram.mem[104 + 19] = u_sram.mem[104 + 19] ^ 8'h01;
    u_sram.mem[104] = u_sram.mem[104] ^ 8'h80;
    run(mk(OP_CMP, 7'h50, 7'h68, 20, 0, PAD_H0, 0), n);
    check(c_eq == 0, "CMP first byte differs");

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
