// Testbench for pie_decoder. Sends PIE frames of random length (including
// lengths that are not whole bytes) with Tari = 25 us sampled at 800 kHz,
// with +-8 % random jitter on every symbol, and checks the bytes, the frame
// bit count, and that a frame sent while enable is low produces nothing.
module tb_pie_decoder;
  localparam int TARI = 320, PW = 160;   // in 12.8 MHz cycles
  logic clk = 0, rst_n = 0, ce, en = 1, rx = 1, bv, fe;
  logic [7:0] bd;
  logic [8:0] fb;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 16 == 15);

  pie_decoder dut (.clk, .rst_n, .ce, .enable(en), .rx_env(rx),
    .byte_valid(bv), .byte_data(bd), .frame_end(fe), .frame_bits(fb));

  byte unsigned got[$];
  int frames = 0, last_bits = 0;
  always @(posedge clk) if (ce) begin
    if (bv) got.push_back(bd);
    if (fe) begin frames++; last_bits = fb; end
  end

  function automatic int jit(int n);
    return n + $urandom_range(0, n / 6) - n / 12;
  endfunction

  task automatic send(byte unsigned data[$], int nbits);
    rx = 1; repeat (TARI) @(posedge clk);
    rx = 0; repeat (PW) @(posedge clk);
    for (int i = 0; i < nbits; i++) begin
      int len = jit(data[i/8][7 - i%8] ? 2 * TARI : TARI);
      rx = 1; repeat (len - PW) @(posedge clk);
      rx = 0; repeat (PW) @(posedge clk);
    end
    rx = 1; repeat (5 * TARI) @(posedge clk);
  endtask

  initial begin
    byte unsigned d[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 14; t++) begin
      automatic int nb = (t == 0) ? 64 : (t == 1) ? 160 : $urandom_range(1, 70);
      int f0;
      d = {};
      for (int i = 0; i < (nb + 7) / 8; i++) d.push_back(8'($urandom));
      got = {};
      f0 = frames;
      send(d, nb);
      checks++;
      if (frames != f0 + 1 || last_bits != nb) begin
        failures++; $display("frame %0d: %0d frames, %0d bits, expected %0d", t, frames - f0, last_bits, nb);
      end
      checks++;
      if (got.size() != nb / 8) begin failures++; $display("frame %0d: %0d bytes", t, got.size()); end
      else for (int i = 0; i < nb / 8; i++) begin
        checks++;
        if (got[i] != d[i]) begin failures++; $display("frame %0d byte %0d: %h expected %h", t, i, got[i], d[i]); end
      end
    end
    // disabled: nothing decoded
    en = 0;
    got = {};
    begin
      automatic int f0 = frames;
      d = {8'h12, 8'h34};
      send(d, 16);
      checks++;
      if (frames != f0 || got.size() != 0) begin failures++; $display("decoded while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
