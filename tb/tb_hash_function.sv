// Testbench for hash_function. For both algorithms and all four uses (H0, H1,
// H2, PRNG) random messages of the lengths the tag uses (8, 16, 32 bytes) and
// a few others are hashed and compared with the reference model, which
// appends the use's suffix byte before the algorithm's padding. Also checked:
// the four uses give four different digests of one message, the idle core
// does not move while the other one works, and ce=0 freezes the block.
module tb_hash_function;
  import rfid_pkg::*;
  import ref_hash_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  hash_sel_e  sel = HASH_SPONGENT;
  pad_mode_e  pm = PAD_H0;
  logic       start = 0, iv = 0, il = 0, ir, ov, orr = 0, bz;
  logic [7:0] id = 0, od;

  hash_function dut (.clk, .rst_n, .ce, .hash_sel(sel), .start, .pad_mode(pm),
    .in_valid(iv), .in_data(id), .in_last(il), .in_ready(ir),
    .out_valid(ov), .out_data(od), .out_ready(orr), .busy(bz));

  always @(negedge clk) ce <= ($urandom_range(0, 4) != 0);

  task automatic run(bytes_t msg, int outlen, output bytes_t res);
    int n = 0;
    res = {};
    @(negedge clk); start = 1;
    do @(posedge clk); while (!ce); #1 start = 0;
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
    bytes_t m, r, e, d[4];
    int lens[5] = '{8, 16, 32, 1, 50};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2; a++) begin
      sel = a ? HASH_KECCAK : HASH_SPONGENT;
      for (int u = 0; u < 4; u++) begin
        for (int li = 0; li < 5; li++) begin
          m = {};
          for (int i = 0; i < lens[li]; i++) m.push_back(8'($urandom));
          pm = pad_mode_e'(u);
          run(m, 20, r);
          e = tag_hash(a, u, m, 20);
          checks++;
          if (r != e) begin
            failures++;
            $display("alg %0d use %0d len %0d: %h%h.. expected %h%h..", a, u, lens[li], r[0], r[1], e[0], e[1]);
          end
        end
      end
      // four uses, one message, four digests
      m = {};
      for (int i = 0; i < 16; i++) m.push_back(8'($urandom));
      for (int u = 0; u < 4; u++) begin
        pm = pad_mode_e'(u);
        run(m, 20, d[u]);
      end
      for (int u = 0; u < 4; u++)
        for (int v = u + 1; v < 4; v++) begin
          checks++;
          if (d[u] == d[v]) begin failures++; $display("uses %0d and %0d collide", u, v); end
        end
    end
    // the unselected core holds its state
    begin
      logic [175:0] s_before;
      sel = HASH_SPONGENT;
      s_before = dut.u_spongent.st;
      sel = HASH_KECCAK; pm = PAD_H0;
      m = {8'h01, 8'h02, 8'h03};
      run(m, 20, r);
      checks++;
      if (dut.u_spongent.st != s_before) begin failures++; $display("idle SPONGENT core moved"); end
    end
    // ce low: nothing moves
    begin
      logic [1599:0] k_before;
      @(negedge clk);
      force ce = 0;
      k_before = dut.u_keccak.st;
      orr = 1; iv = 1;
      repeat (20) @(posedge clk);
      #1;
      checks++;
      if (dut.u_keccak.st != k_before) begin failures++; $display("state moved with ce=0"); end
      orr = 0; iv = 0;
      release ce;
    end
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
