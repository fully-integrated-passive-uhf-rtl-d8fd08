// Testbench for spongent160. Random messages of 0..40 bytes (both parities,
// so the padding falls into a fresh block or the second byte of a block) are
// hashed with 20-byte and longer squeezes and compared with the reference
// model. The permutation latency is checked: 90 enabled cycles per
// permutation, ceil((N+1)/2) absorbing permutations for N bytes, and one more
// per further 2 bytes squeezed. ce is held low on random cycles.
module tb_spongent160;
  import ref_hash_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       init = 0, iv = 0, il = 0, ir, ov, orr = 0, bz;
  logic [7:0] id = 0, od;

  spongent160 dut (.clk, .rst_n, .ce, .init,
    .in_valid(iv), .in_data(id), .in_last(il), .in_ready(ir),
    .out_valid(ov), .out_data(od), .out_ready(orr), .busy(bz));

  always @(negedge clk) ce <= ($urandom_range(0, 3) != 0);

  int busy_cnt;
  always @(posedge clk)
    if (init && ce) busy_cnt <= 0; else if (ce && bz) busy_cnt <= busy_cnt + 1;

  task automatic run(bytes_t msg, int outlen, output bytes_t res);
    int n = 0;
    res = {};
    @(negedge clk); init = 1;
    do @(posedge clk); while (!ce); #1 init = 0;
    while (n < msg.size()) begin
      @(negedge clk);
      iv = 1; id = msg[n]; il = (n == msg.size() - 1);
      @(posedge clk);
      if (ce && ir) n++;
      #1 iv = 0;
    end
    while (res.size() < outlen) begin
      @(negedge clk);
      orr = 1;
      @(posedge clk);
      if (ce && ov) res.push_back(od);
      #1;
    end
    orr = 0;
  endtask

  initial begin
    bytes_t m, r, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      int len, outlen, perms;
      len = (t < 4) ? t + 1 : $urandom_range(1, 40);
      outlen = (t % 3 == 0) ? 25 : 20;
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      run(m, outlen, r);
      e = spongent_hash(m, outlen);
      checks++;
      if (r != e) begin
        failures++; $display("len %0d: digest mismatch %h%h.. vs %h%h..", len, r[0], r[1], e[0], e[1]);
      end
      perms = (len + 2) / 2 + (outlen + 1) / 2 - 1;
      checks++;
      if (busy_cnt != 90 * perms) begin
        failures++; $display("len %0d: %0d permutation cycles, expected %0d", len, busy_cnt, 90 * perms);
      end
    end
    // Distinct messages give distinct digests
    begin
      bytes_t a, b;
      m = {8'h00}; run(m, 20, a);
      m = {8'h01}; run(m, 20, b);
      checks++; if (a == b) begin failures++; $display("digests collide"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
