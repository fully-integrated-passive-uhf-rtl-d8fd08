// Behavioural model of the 1 Kbyte EEPROM macro (a process-specific
// nonvolatile memory: the cell array, charge pump and sense amplifiers are not
// logic). It models the access protocol and the block-write time.
//
// Read: with ce, req=1 and we=0 the byte at addr appears on rdata after the
// clock edge. Block write: with ce, req=1 and we=1 the byte is loaded into a
// PAGE-byte page buffer (the page is set by the upper address bits); `prog`
// then starts programming, `busy` rises, and after PROG_TICKS cycles of the
// 6.4 MHz enable ce_prog the loaded bytes are committed to the array and busy
// falls. Requests while busy are ignored. The array is not reset: it is
// nonvolatile, and a testbench preloads it through `mem`.
//
// From the published design: 1 Kbyte, holds the secret key and the PRNG seed, runs on
// the 6.4 MHz clock, and one block write takes 4.33 ms (27712 cycles of
// 6.4 MHz). The port, the 16-byte page and the read timing are this model's
// choices.
module eeprom_1k #(
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned PAGE       = 16,
  parameter int unsigned PROG_TICKS = 27712,
  parameter int unsigned AW         = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,        // access strobe (800 kHz)
  input  logic          ce_prog,   // programming time base (6.4 MHz)
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  input  logic          prog,
  output logic          busy
);

  localparam int unsigned PW = $clog2(PAGE);

  logic [7:0]         mem [DEPTH];
  logic [7:0]         pbuf [PAGE];
  logic [PAGE-1:0]    pload;
  logic [AW-PW-1:0]   page;
  logic [31:0]        timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      pload <= '0;
      page  <= '0;
      timer <= '0;
      rdata <= '0;
    end else begin
      if (busy) begin
        if (ce_prog) begin
          if (timer == PROG_TICKS - 1) begin
            for (int i = 0; i < PAGE; i++)
              if (pload[i]) mem[{page, PW'(i)}] <= pbuf[i];
            pload <= '0;
            busy  <= 1'b0;
          end
          timer <= timer + 1;
        end
      end else if (ce) begin
        if (prog) begin
          busy  <= 1'b1;
          timer <= '0;
        end else if (req && we) begin
          pbuf[addr[PW-1:0]]  <= wdata;
          pload[addr[PW-1:0]] <= 1'b1;
          page                <= addr[AW-1:PW];
        end else if (req) begin
          rdata <= mem[addr];
        end
      end
    end
  end

endmodule
