// Interface block: clock generation and the link between the analog front
// end and the digital part.
//
// It holds the clock divider (12.8 MHz -> 6.4 MHz, 800 kHz, 40 kHz and the
// reply half-bit enables), the reader command decoder (PIE frames from the
// demodulated envelope rx_env to bytes) and the response encoder (bytes to
// the FM0 signal tx_mod that drives the backscatter modulator). The decoder
// is disabled while a reply is being sent, since the link is half duplex.
//
// Timing: everything runs on the 12.8 MHz clock; the byte ports towards the
// memory controller change only on ce_800k.
//
// From the published design: the interface block generates the clocks from 12.8 MHz,
// decodes reader commands and forms the tag response. The line codes and the
// framing are this design's choices (see pie_decoder and fm0_encoder).
module tag_interface #(
  parameter int unsigned DIV_HALF = 67,
  parameter int unsigned PIVOT    = 30,
  parameter int unsigned TIMEOUT  = 60,
  parameter int unsigned T1_TICKS = 4
) (
  input  logic       clk,          // 12.8 MHz from the analog clock block
  input  logic       rst_n,        // power-on reset
  output logic       ce_6m4,
  output logic       ce_800k,
  output logic       ce_40k,
  // analog front end
  input  logic       rx_env,
  output logic       tx_mod,
  // reader bytes
  output logic       rx_byte_valid,
  output logic [7:0] rx_byte_data,
  output logic       rx_frame_end,
  output logic [8:0] rx_frame_bits,
  // reply bytes
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_last,
  output logic       tx_ready,
  output logic       tx_active,
  output logic       tx_underflow
);

  logic ce_half;

  clock_divider #(.DIV_HALF(DIV_HALF)) u_div (
    .clk, .rst_n, .ce_6m4, .ce_800k, .ce_40k, .ce_half
  );

  pie_decoder #(.PIVOT(PIVOT), .TIMEOUT(TIMEOUT)) u_dec (
    .clk, .rst_n, .ce(ce_800k), .enable(!tx_active), .rx_env,
    .byte_valid(rx_byte_valid), .byte_data(rx_byte_data),
    .frame_end(rx_frame_end), .frame_bits(rx_frame_bits)
  );

  fm0_encoder #(.T1_TICKS(T1_TICKS)) u_enc (
    .clk, .rst_n, .ce_byte(ce_800k), .ce_half, .ce_40k,
    .tx_valid, .tx_data, .tx_last, .tx_ready, .tx_mod,
    .active(tx_active), .underflow(tx_underflow)
  );

endmodule
