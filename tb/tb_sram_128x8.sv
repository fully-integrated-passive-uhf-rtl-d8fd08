// Testbench for sram_128x8: fills the memory with random bytes, reads every
// address back (data one enabled cycle after the address), checks that
// writes and reads are ignored while ce or en is low, and that rdata holds
// between reads.
module tb_sram_128x8;
  logic clk = 0, ce = 0, en = 0, we = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] model [128];

  sram_128x8 dut (.clk, .ce, .en, .we, .addr, .wdata, .rdata);

  task automatic acc(bit c, bit e, bit w, logic [6:0] a, logic [7:0] d);
    @(negedge clk);
    ce = c; en = e; we = w; addr = a; wdata = d;
    @(posedge clk);
    #1 ce = 0; en = 0; we = 0;
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      model[i] = 8'($urandom);
      acc(1, 1, 1, 7'(i), model[i]);
    end
    // ignored writes
    acc(0, 1, 1, 7'd5, ~model[5]);
    acc(1, 0, 1, 7'd6, ~model[6]);
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 128; i++) begin
        automatic int a = r ? $urandom_range(0, 127) : i;
        acc(1, 1, 0, 7'(a), 8'h00);
        checks++;
        if (rdata != model[a]) begin failures++; $display("addr %0d: %h expected %h", a, rdata, model[a]); end
      end
    // rdata holds while no read happens
    acc(1, 1, 0, 7'd9, 0);
    acc(0, 1, 0, 7'd10, 0);
    acc(1, 0, 0, 7'd11, 0);
    checks++;
    if (rdata != model[9]) begin failures++; $display("rdata did not hold"); end
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
