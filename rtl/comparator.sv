// Comparator block: decides whether two byte strings are equal.
//
// `clear` starts a comparison. Each cycle with ce and in_valid presents one
// byte pair (a, b); `equal` stays 1 only while every pair so far matched, and
// `count` says how many pairs were compared. The memory controller feeds it
// Z and Z' from SRAM, one pair per two SRAM reads.
//
// From the published design: a comparator block that compares data such as the hash
// output with the data sent from the server, on the 800 kHz clock. The
// byte-serial form matches the 8-bit SRAM and is this design's choice.
module comparator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic       equal,
  output logic [7:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      equal <= 1'b0;
      count <= '0;
    end else if (ce) begin
      if (clear) begin
        equal <= 1'b1;
        count <= '0;
      end else if (in_valid) begin
        equal <= equal && (a == b);
        count <= count + 1'b1;
      end
    end
  end

endmodule
