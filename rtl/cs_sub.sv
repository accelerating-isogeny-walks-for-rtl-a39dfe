// cs_sub: integer subtraction of carry-save numbers (the SUB unit).
//
// Computes r = a - b + K modulo 2^WO, with a = a_c + a_s and b = b_c + b_s
// (W-bit shares) and a constant K. Both shares of b are turned into two's
// complement at once: -b = ~b_c + 1 + ~b_s + 1, so six integers are summed,
// a_c + a_s + ~b_c + ~b_s + K + 2, in three carry-save adder levels. Carries out
// of bit WO-1 are dropped, so the shares are WO bits and r_c + r_s equals
// a - b + K modulo 2^WO. When the caller chooses K so that a - b + K is never
// negative and below 2^WO (the modular subtractor uses K = 3p), the reduction
// that follows can work modulo 2^WO and sign detection is never needed.
// Critical path: one inverter and three full adders. Combinational.
module cs_sub #(
  parameter int unsigned W    = vdf_pkg::M_DEFAULT,
  parameter int unsigned WO   = W + 3,
  parameter logic [WO-1:0] K  = '0
) (
  input  logic [W-1:0]  a_c,
  input  logic [W-1:0]  a_s,
  input  logic [W-1:0]  b_c,
  input  logic [W-1:0]  b_s,
  output logic [WO-1:0] r_c,
  output logic [WO-1:0] r_s
);
  localparam logic [WO-1:0] TWO = WO'(2);

  logic [WO-1:0] ac, as_, nbc, nbs;
  logic [WO-1:0] s1, s2, s3, s4;
  logic [WO:0]   c1, c2, c3, c4;

  assign ac  = WO'(a_c);
  assign as_ = WO'(a_s);
  assign nbc = ~WO'(b_c);
  assign nbs = ~WO'(b_s);

  // level 1: two arrays side by side
  csa #(.W(WO)) u_l1a (.x(ac),  .y(as_), .z(nbc), .s(s1), .c(c1));
  csa #(.W(WO)) u_l1b (.x(nbs), .y(K),   .z(TWO), .s(s2), .c(c2));
  // level 2
  csa #(.W(WO)) u_l2  (.x(s1), .y(c1[WO-1:0]), .z(s2), .s(s3), .c(c3));
  // level 3
  csa #(.W(WO)) u_l3  (.x(s3), .y(c3[WO-1:0]), .z(c2[WO-1:0]), .s(s4), .c(c4));

  assign r_s = s4;
  assign r_c = c4[WO-1:0];

  // The carries out of the top bit are discarded on purpose (arithmetic mod 2^WO).
  logic unused_carry;
  assign unused_carry = ^{c1[WO], c2[WO], c3[WO], c4[WO]};
endmodule
