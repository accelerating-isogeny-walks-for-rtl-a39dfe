// cs_add: integer addition of two carry-save numbers (the ADD unit).
//
// a = a_c + a_s and b = b_c + b_s, each share W bits. Two carry-save adder
// arrays in sequence add the four shares: the first adds a_c, a_s and b_c, the
// second adds its two outputs and b_s. The result r = r_c + r_s equals a + b
// exactly; the shares are W+2 bits wide and are never summed, so no carry
// chain exists. Critical path: two full adders. Combinational.
module cs_add #(
  parameter int unsigned W = vdf_pkg::M_DEFAULT
) (
  input  logic [W-1:0] a_c,
  input  logic [W-1:0] a_s,
  input  logic [W-1:0] b_c,
  input  logic [W-1:0] b_s,
  output logic [W+1:0] r_c,
  output logic [W+1:0] r_s
);
  logic [W-1:0] s1;
  logic [W:0]   c1;
  logic [W:0]   s2;
  logic [W+1:0] c2;

  csa #(.W(W))   u_l1 (.x(a_c), .y(a_s), .z(b_c), .s(s1), .c(c1));
  csa #(.W(W+1)) u_l2 (.x({1'b0, s1}), .y(c1), .z({1'b0, b_s}), .s(s2), .c(c2));

  assign r_s = {1'b0, s2};
  assign r_c = c2;
endmodule
