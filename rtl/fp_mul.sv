// fp_mul: modular Montgomery multiplication in carry-save form (MMUL; the MUL
// and RED blocks of the FITER datapath).
//
// r = a * b * R^-1 (mod P), R = 2^(M+3), all as pairs of M-bit shares. Three
// stages, all combinational:
//   cs_mul       four sub-products merged into (2M+2)-bit shares
//   cs_mont_red  Montgomery reduction to (M+1)-bit shares
//   cs_red       LUT reduction with i = 1 to M-bit shares
// Operands are kept in the Montgomery domain (x stored as x*R mod P), so the
// R^-1 cancels and chains of products stay consistent.
module fp_mul #(
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
  logic [2*M+1:0] p_c, p_s;
  logic [M:0]     m_c, m_s;

  cs_mul      #(.M(M))       u_mul  (.a_c, .a_s, .b_c, .b_s, .r_c(p_c), .r_s(p_s));
  cs_mont_red #(.M(M), .P(P)) u_mont (.x_c(p_c), .x_s(p_s), .r_c(m_c), .r_s(m_s));
  cs_red      #(.M(M), .I(1), .P(P), .WRAP(1'b0)) u_red (.a_c(m_c), .a_s(m_s), .r_c, .r_s);
endmodule
