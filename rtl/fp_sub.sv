// fp_sub: modular subtraction in carry-save form (the MSUB unit).
//
// r = a - b (mod P), all as pairs of M-bit shares. To avoid ever needing the
// sign of a carry-save number, 3P is added before subtracting: the subtractor
// (cs_sub) forms a_c + a_s + ~b_c + ~b_s + 3P + 2 in three CSA levels, modulo
// 2^(M+3). Since b < 2^(M+1) <= 3P, the true value a - b + 3P lies in
// [0, 2^(M+3)), so the LUT reduction (cs_red, i = 3, working modulo 2^(M+3))
// returns a correct M-bit result. This needs a - b + 3P >= 2^(M-1) for every
// input, i.e. 3P >= 2^(M+1) + 2^(M-1) (P above about 0.84 * 2^M), which holds
// for primes close to 2^M; it is checked at start of simulation.
// Combinational; critical path about seven full adders, an inverter, a half
// adder and the table multiplexer.
module fp_sub #(
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
  localparam int unsigned  WO = M + 3;
  localparam logic [WO-1:0] K3P = WO'(3) * WO'(P);

  logic [WO-1:0] t_c, t_s;

  cs_sub #(.W(M), .WO(WO), .K(K3P)) u_sub (.a_c, .a_s, .b_c, .b_s, .r_c(t_c), .r_s(t_s));
  cs_red #(.M(M), .I(3), .P(P), .WRAP(1'b1)) u_red (.a_c(t_c), .a_s(t_s), .r_c, .r_s);

  initial assert (K3P >= (WO'(1) << (M + 1)) + (WO'(1) << (M - 1)))
    else $error("fp_sub: 3P must be at least 2^(M+1) + 2^(M-1)");
endmodule
