// fp_sqr: modular Montgomery squaring in carry-save form (MSQR).
//
// r = a^2 * R^-1 (mod P), R = 2^(M+3), as pairs of M-bit shares: cs_sqr
// (a_c^2 + a_s^2 + 2 a_c a_s, one CSA level), then cs_mont_red to (M+1)-bit
// shares, then cs_red with i = 1 to M-bit shares. Combinational. Used by the
// unrolled 4-isogeny evaluator for its two squarings.
module fp_sqr #(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic [M-1:0] a_c,
  input  logic [M-1:0] a_s,
  output logic [M-1:0] r_c,
  output logic [M-1:0] r_s
);
  logic [2*M+1:0] p_c, p_s;
  logic [M:0]     m_c, m_s;

  cs_sqr      #(.M(M))       u_sqr  (.a_c, .a_s, .r_c(p_c), .r_s(p_s));
  cs_mont_red #(.M(M), .P(P)) u_mont (.x_c(p_c), .x_s(p_s), .r_c(m_c), .r_s(m_s));
  cs_red      #(.M(M), .I(1), .P(P), .WRAP(1'b0)) u_red (.a_c(m_c), .a_s(m_s), .r_c, .r_s);
endmodule
