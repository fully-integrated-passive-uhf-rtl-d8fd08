// Clock divider of the interface block.
//
// From the 12.8 MHz oscillator clock it derives the slower rates the tag
// uses: 6.4 MHz (EEPROM), 800 kHz (comparator, controller, hash block,
// memory controller, SRAM), 40 kHz (reply timing) and the half-bit rate of
// the reply. Each rate is a one-cycle enable strobe in the 12.8 MHz domain
// rather than a separate clock, so the whole digital part is one clock domain
// and every block advances only on its strobe. Strobes are aligned: every
// 800 kHz and 40 kHz strobe coincides with a 6.4 MHz strobe.
//
// From the published design: the 12.8 MHz source and the 6.4 MHz, 800 kHz and 40 kHz
// rates. Enables instead of divided clocks, and the reply half-bit divider
// (67, giving 95.5 kbit/s FM0), are this design's choices.
module clock_divider #(
  parameter int unsigned DIV_6M4  = 2,
  parameter int unsigned DIV_800K = 16,
  parameter int unsigned DIV_40K  = 320,
  parameter int unsigned DIV_HALF = 67
) (
  input  logic clk,        // 12.8 MHz
  input  logic rst_n,
  output logic ce_6m4,
  output logic ce_800k,
  output logic ce_40k,
  output logic ce_half
);

  logic [$clog2(DIV_40K)-1:0]  c40;
  logic [$clog2(DIV_HALF)-1:0] ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c40 <= '0;
      ch  <= '0;
    end else begin
      c40 <= (c40 == $bits(c40)'(DIV_40K - 1)) ? '0 : c40 + 1'b1;
      ch  <= (ch == $bits(ch)'(DIV_HALF - 1)) ? '0 : ch + 1'b1;
    end
  end

  // DIV_40K is a multiple of DIV_800K, which is a multiple of DIV_6M4, so one
  // counter serves the three related rates.
  assign ce_6m4  = (32'(c40) % DIV_6M4)  == DIV_6M4 - 1;
  assign ce_800k = (32'(c40) % DIV_800K) == DIV_800K - 1;
  assign ce_40k  = (32'(c40) == DIV_40K - 1);
  assign ce_half = (32'(ch) == DIV_HALF - 1);

endmodule
