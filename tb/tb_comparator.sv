// Testbench for comparator: random strings of 1..24 byte pairs, equal or with
// one differing byte at a random place, with idle and ce=0 cycles between
// pairs; checks equal and count after each string.
module tb_comparator;
  logic clk = 0, rst_n = 0, ce = 0, clear = 0, iv = 0, equal;
  logic [7:0] a = 0, b = 0, count;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  comparator dut (.clk, .rst_n, .ce, .clear, .in_valid(iv), .a, .b, .equal, .count);

  task automatic cyc(bit c, bit cl, bit v, logic [7:0] x, logic [7:0] y);
    @(negedge clk); ce = c; clear = cl; iv = v; a = x; b = y;
    @(posedge clk); #1 ce = 0; clear = 0; iv = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic int n = $urandom_range(1, 24);
      automatic int bad = (t % 2) ? $urandom_range(0, n - 1) : -1;
      cyc(1, 1, 0, 0, 0);
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] x = 8'($urandom);
        automatic logic [7:0] y = (i == bad) ? x ^ (8'h01 << $urandom_range(0, 7)) : x;
        cyc(1, 0, 1, x, y);
        if ($urandom_range(0, 2) == 0) cyc(0, 0, 1, 8'h00, 8'hFF);   // ignored, ce low
        if ($urandom_range(0, 2) == 0) cyc(1, 0, 0, 8'h00, 8'hFF);   // idle
      end
      checks++;
      if (equal != (bad < 0)) begin failures++; $display("string %0d: equal=%0d, mismatch at %0d", t, equal, bad); end
      checks++;
      if (count != 8'(n)) begin failures++; $display("string %0d: count %0d expected %0d", t, count, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
