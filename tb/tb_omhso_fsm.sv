// Testbench for omhso_fsm. The memory controller is played by the testbench:
// it accepts each command after a random delay, answers `done` after another
// one and returns scripted frame lengths and comparison results. Two sessions
// are checked command by command against the tag side of the protocol: one
// where Z matches (key update and seed update) and one where it does not (seed
// update only), each preceded by reader frames of the wrong length, which must
// be ignored. The step number shown during each command, auth_ok,
// key_updated and the session_done pulse are checked too.
module tb_omhso_fsm;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cmd_valid, cmd_ready = 0, done = 0, cmp_eq = 0;
  mc_cmd_t    cmd;
  logic [8:0] rx_bits = 0;
  logic [3:0] step;
  logic       auth_ok, key_updated, session_done;

  omhso_fsm dut (.clk, .rst_n, .ce, .cmd_valid, .cmd, .cmd_ready, .done, .rx_bits,
    .cmp_equal(cmp_eq), .step, .auth_ok, .key_updated, .session_done);

  always @(negedge clk) ce <= ($urandom_range(0, 2) != 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int sessions_done = 0;
  always @(posedge clk) if (ce && session_done) sessions_done++;

  // accept one command; return it and the step shown while it ran
  task automatic serve(int bits, bit eq, output mc_cmd_t got, output logic [3:0] st);
    repeat ($urandom_range(0, 5)) @(posedge clk);
    @(negedge clk); cmd_ready = 1;
    do @(posedge clk); while (!(ce && cmd_valid));
    got = cmd;
    #1 cmd_ready = 0;
    repeat ($urandom_range(1, 6)) @(posedge clk);
    st = step;
    @(negedge clk); done = 1; rx_bits = 9'(bits); cmp_eq = eq;
    do @(posedge clk); while (!ce);
    #1 done = 0;
  endtask

  task automatic expect_cmd(int bits, bit eq, mc_op_e op, int src, int dst, int len, int len2,
                            pad_mode_e pad, bit last, int stp, string what);
    mc_cmd_t g;
    logic [3:0] s;
    serve(bits, eq, g, s);
    check(g.op == op && g.src == 10'(src) && g.dst == 10'(dst) && g.len == 8'(len) &&
          (op != OP_HASH || (g.len2 == 8'(len2) && g.pad == pad)) && (op != OP_TX || g.last == last),
          $sformatf("%s: got op %0d src %h dst %h len %0d len2 %0d", what, g.op, g.src, g.dst, g.len, g.len2));
    check(s == 4'(stp), $sformatf("%s: step %0d expected %0d", what, s, stp));
  endtask

  task automatic session(bit match);
    int sd0 = sessions_done;
    expect_cmd(0, 0, OP_EE2SR, 'h000, 'h00, 16, 0, PAD_H0, 0, 1, "load state and seed");
    expect_cmd(0, 0, OP_EE2SR, 'h010, 'h10, 16, 0, PAD_H0, 0, 2, "load key");
    expect_cmd(160, 0, OP_RX, 0, 'h20, 8, 0, PAD_H0, 0, 0, "wait X (160-bit frame)");
    expect_cmd(63, 0, OP_RX, 0, 'h20, 8, 0, PAD_H0, 0, 0, "wait X (63-bit frame)");
    expect_cmd(64, 0, OP_RX, 0, 'h20, 8, 0, PAD_H0, 0, 0, "wait X");
    check(!auth_ok && !key_updated, "results cleared by a new challenge");
    expect_cmd(0, 0, OP_HASH, 'h08, 'h28, 8, 16, PAD_PRNG, 0, 3, "PRNG");
    expect_cmd(0, 0, OP_HASH, 'h10, 'h38, 32, 20, PAD_H0, 0, 3, "beta = H0");
    expect_cmd(0, 0, OP_TX, 'h28, 0, 8, 0, PAD_H0, 0, 0, "send alpha");
    expect_cmd(0, 0, OP_TX, 'h38, 0, 20, 0, PAD_H0, 1, 0, "send beta");
    expect_cmd(64, 0, OP_RX, 0, 'h50, 20, 0, PAD_H0, 0, 0, "wait Z (64-bit frame)");
    expect_cmd(160, 0, OP_RX, 0, 'h50, 20, 0, PAD_H0, 0, 0, "wait Z");
    expect_cmd(0, 0, OP_HASH, 'h10, 'h68, 32, 20, PAD_H1, 0, 4, "Z' = H1");
    expect_cmd(0, match, OP_CMP, 'h50, 'h68, 20, 0, PAD_H0, 0, 5, "compare");
    if (match) begin
      expect_cmd(0, 0, OP_HASH, 'h10, 'h10, 16, 16, PAD_H2, 0, 6, "new key = H2");
      expect_cmd(0, 0, OP_SR2EE, 'h10, 'h010, 16, 0, PAD_H0, 0, 7, "write key");
    end
    expect_cmd(0, 0, OP_SR2EE, 'h30, 'h008, 8, 0, PAD_H0, 0, 8, "write seed");
    repeat (4) @(posedge clk);
    check(auth_ok == match, "auth_ok");
    check(key_updated == match, "key_updated");
    check(sessions_done == sd0 + 1, "session_done pulsed once");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    session(1);
    session(0);
    session(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
