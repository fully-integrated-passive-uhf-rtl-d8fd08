// Volatile memory: 128 x 8-bit single-port SRAM.
//
// Holds the working data of one authentication run: the tag state, seed and
// key loaded from EEPROM, the reader's X and Z, and the hash outputs. One
// access per enabled cycle; `we` writes wdata to addr, otherwise the addressed
// byte appears on rdata after the enabled clock edge (one-cycle read
// latency) and stays there until the next read. Contents are not reset.
//
// From the published design: 128 bytes, 8-bit data width, clocked at 800 kHz. The
// synchronous read port is this design's choice.
module sram_128x8 #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce && en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
