// Testbench for keccak_core. With RATE_BYTES=136 the core must produce the
// published Keccak-256 digests of "" and "abc"; a second instance at the
// default rate is compared with the reference model for random messages of
// lengths that cross the block boundary, over a squeeze of two blocks. The
// permutation latency (24 enabled cycles) is checked, and ce is toggled so
// that the core must hold still on disabled cycles.
module tb_keccak_core;
  import ref_hash_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       init;
  logic       iv [2];
  logic [7:0] id [2];
  logic       il [2];
  logic       ir [2];
  logic       ov [2];
  logic [7:0] od [2];
  logic       orr [2];
  logic       bz [2];

  keccak_core #(.RATE_BYTES(136)) u256 (.clk, .rst_n, .ce, .init,
    .in_valid(iv[0]), .in_data(id[0]), .in_last(il[0]), .in_ready(ir[0]),
    .out_valid(ov[0]), .out_data(od[0]), .out_ready(orr[0]), .busy(bz[0]));
  keccak_core u168 (.clk, .rst_n, .ce, .init,
    .in_valid(iv[1]), .in_data(id[1]), .in_last(il[1]), .in_ready(ir[1]),
    .out_valid(ov[1]), .out_data(od[1]), .out_ready(orr[1]), .busy(bz[1]));

  // ce high on 3 of 4 cycles
  always @(negedge clk) ce <= ($urandom_range(0, 3) != 0);

  int busy_cnt [2];
  always @(posedge clk) for (int k = 0; k < 2; k++)
    if (init && ce) busy_cnt[k] <= 0; else if (ce && bz[k]) busy_cnt[k] <= busy_cnt[k] + 1;

  task automatic run(int u, bytes_t msg, int outlen, output bytes_t res, output int perm_cyc);
    int n = 0, t0 = 0, cnt_ce = 0;
    bit counting = 0;
    res = {};
    perm_cyc = 0;
    @(negedge clk); init = 1;
    do @(posedge clk); while (!ce); #1 init = 0;
    while (n < msg.size()) begin
      @(negedge clk);
      iv[u] = 1; id[u] = msg[n]; il[u] = (n == msg.size() - 1);
      @(posedge clk);
      if (ce && ir[u]) n++;
      #1 iv[u] = 0;
    end
    // count enabled cycles spent with busy high
    while (res.size() < outlen) begin
      @(negedge clk);
      orr[u] = 1;
      @(posedge clk);
      if (ce && ov[u]) res.push_back(od[u]);
      #1;
    end
    orr[u] = 0;
    perm_cyc = busy_cnt[u];
  endtask

  initial begin
    bytes_t m, r, e;
    int pc;
    iv = '{0, 0}; il = '{0, 0}; id = '{0, 0}; orr = '{0, 0}; init = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // reference model against the published Keccak-256 digests
    m = {};
    e = keccak_hash(m, 136, 4);
    checks++; if ({e[0], e[1], e[2], e[3]} != 32'hc5d24601) begin failures++; $display("ref keccak256('') wrong"); end

    m = {8'h61, 8'h62, 8'h63};
    run(0, m, 32, r, pc);
    checks++;
    if ({r[0], r[1], r[2], r[3], r[28], r[29], r[30], r[31]} != 64'h4e03657a_a12d6c45) begin
      failures++; $display("keccak256(abc) mismatch: %h %h %h %h", r[0], r[1], r[2], r[3]);
    end
    checks++;
    if (pc != 24) begin failures++; $display("permutation took %0d cycles, expected 24", pc); end

    for (int t = 0; t < 12; t++) begin
      int len;
      len = (t < 4) ? 166 + t : $urandom_range(1, 200);
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      run(1, m, 200, r, pc);
      e = keccak_hash(m, 168, 200);
      checks++;
      if (r != e) begin failures++; $display("mismatch len %0d", len); end
      checks++;
      // one permutation per absorbed block plus one for squeezing past 168 bytes
      if (pc != 24 * ((len + 168) / 168 + 1)) begin
        failures++; $display("len %0d: %0d permutation cycles", len, pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
