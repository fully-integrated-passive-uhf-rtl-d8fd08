// Testbench for clock_divider: over 6400 cycles of 12.8 MHz (0.5 ms) counts
// 3200 strobes of 6.4 MHz, 400 of 800 kHz, 20 of 40 kHz and the reply
// half-bit strobes; checks the spacing of each strobe and that every 800 kHz
// and 40 kHz strobe falls on a 6.4 MHz strobe.
module tb_clock_divider;
  logic clk = 0, rst_n = 0, c6, c800, c40, ch;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .rst_n, .ce_6m4(c6), .ce_800k(c800), .ce_40k(c40), .ce_half(ch));

  int n6 = 0, n800 = 0, n40 = 0, nh = 0, misalign = 0, badgap = 0;
  int last800 = -1, lasth = -1, cyc = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (6400) begin
      @(posedge clk);
      if (c6) n6++;
      if (c800) begin
        n800++;
        if (last800 >= 0 && cyc - last800 != 16) badgap++;
        last800 = cyc;
        if (!c6) misalign++;
      end
      if (c40) begin n40++; if (!c6 || !c800) misalign++; end
      if (ch) begin
        nh++;
        if (lasth >= 0 && cyc - lasth != 67) badgap++;
        lasth = cyc;
      end
      cyc++;
    end
    checks++; if (n6 != 3200)  begin failures++; $display("6.4 MHz strobes: %0d", n6); end
    checks++; if (n800 != 400) begin failures++; $display("800 kHz strobes: %0d", n800); end
    checks++; if (n40 != 20)   begin failures++; $display("40 kHz strobes: %0d", n40); end
    checks++; if (nh < 95 || nh > 96) begin failures++; $display("half-bit strobes: %0d", nh); end
    checks++; if (misalign != 0) begin failures++; $display("misaligned strobes: %0d", misalign); end
    checks++; if (badgap != 0) begin failures++; $display("uneven strobe spacing: %0d", badgap); end
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
