// csa: one carry-save adder array, W independent full adders.
//
// Adds three W-bit integers x + y + z without carry propagation: the save
// vector s is the bitwise sum, the carry vector c is the bitwise majority
// shifted one place up, so that s + c = x + y + z exactly. The critical path is
// one full adder whatever W is. Purely combinational.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W:0]   c
);
  always_comb begin
    s = x ^ y ^ z;
    c = {((x & y) | (x & z) | (y & z)), 1'b0};
  end
endmodule
