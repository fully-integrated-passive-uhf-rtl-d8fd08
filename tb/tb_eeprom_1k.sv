// Testbench for the eeprom_1k model, with a short program time
// (PROG_TICKS=40). Checks reads of preloaded data, that a block write changes
// only the loaded bytes of the addressed page and only when programming ends,
// that busy lasts exactly PROG_TICKS ce_prog ticks, and that accesses while
// busy are ignored.
module tb_eeprom_1k;
  localparam int PT = 40;
  logic clk = 0, rst_n = 0, ce, ce_prog, req = 0, we = 0, prog = 0, busy;
  logic [9:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] model [1024];

  eeprom_1k #(.PROG_TICKS(PT)) dut (.clk, .rst_n, .ce, .ce_prog, .req, .we,
    .addr, .wdata, .rdata, .prog, .busy);

  // ce every 8 cycles, ce_prog every cycle (ratio of 800 kHz to 6.4 MHz)
  always @(posedge clk) cyc <= cyc + 1;
  assign ce      = (cyc % 8 == 7);
  assign ce_prog = 1'b1;

  task automatic acc(bit r, bit w, bit p, logic [9:0] a, logic [7:0] d);
    @(negedge clk);
    while (!ce) @(negedge clk);
    req = r; we = w; prog = p; addr = a; wdata = d;
    @(posedge clk);
    #1 req = 0; we = 0; prog = 0;
  endtask

  task automatic rd(logic [9:0] a, string what);
    acc(1, 0, 0, a, 0);
    checks++;
    if (rdata != model[a]) begin failures++; $display("%s: addr %0d = %h expected %h", what, a, rdata, model[a]); end
  endtask

  initial begin
    int t0, t1;
    for (int i = 0; i < 1024; i++) begin
      model[i] = 8'($urandom);
      dut.mem[i] = model[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) rd(10'($urandom_range(0, 1023)), "preload");
    // load 5 bytes of page 0x21
    for (int i = 3; i < 8; i++) acc(1, 1, 0, {6'h21, 4'(i)}, 8'(i * 17));
    rd({6'h21, 4'd4}, "before programming");
    acc(0, 0, 1, 0, 0);
    t0 = cyc;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    // access while busy is ignored
    @(negedge clk); req = 1; we = 1; addr = {6'h21, 4'd0}; wdata = 8'h99;
    repeat (8) @(posedge clk);
    #1 req = 0; we = 0;
    while (busy) @(posedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 != PT) begin failures++; $display("busy for %0d ticks, expected %0d", t1 - t0, PT); end
    for (int i = 3; i < 8; i++) model[{6'h21, 4'(i)}] = 8'(i * 17);
    for (int i = 0; i < 16; i++) rd({6'h21, 4'(i)}, "after programming");
    rd({6'h20, 4'd5}, "neighbouring page");
    rd({6'h22, 4'd5}, "neighbouring page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
