// fp_add: modular addition in carry-save form (the MADD unit).
//
// r = a + b (mod P), all three as pairs of M-bit shares. A carry-save addition
// (cs_add, two FA levels) gives (M+2)-bit shares whose true sum is below
// 2^(M+2); the LUT reduction with i = 2 (cs_red, carry of its small adder
// dropped) brings them back to M bits. No carry chain longer than 3 bits.
// Combinational; critical path about four full adders, a half adder and the
// table multiplexer.
module fp_add #(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic [M-1:0] a_c,
  input  logic [M-1:0] a_s,
  input  logic [M-1:0] b_c,
  input  logic [M-1:0] b_s,
  output logic [M-1:0] r_c,
  output logic [M-1:0] r_s
);
  logic [M+1:0] t_c, t_s;

  cs_add #(.W(M)) u_add (.a_c, .a_s, .b_c, .b_s, .r_c(t_c), .r_s(t_s));
  cs_red #(.M(M), .I(2), .P(P), .WRAP(1'b1)) u_red (.a_c(t_c), .a_s(t_s), .r_c, .r_s);
endmodule
