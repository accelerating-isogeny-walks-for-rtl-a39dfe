// cs_mont_red: Montgomery reduction of a carry-save number.
//
// Input x = x_c + x_s with (2M+2)-bit shares (a product or square); output
// r = r_c + r_s with (M+1)-bit shares and r = x * R^-1 (mod P), R = 2^(M+3).
//
// Each share is reduced on its own, which needs no carry between the shares:
//   q_k = (x_k mod R) * P' mod R,  with P' = -P^-1 mod R
//   r_k = (x_k + q_k * P) / R      (the division is exact: a bit slice)
// The low M+3 bits of x_k + q_k * P are zero by construction and are simply
// not read, so a linter reports them as unused.
// Since x_k < 2^(2M+2) and q_k < R, r_k < 2^(M-1) + P < 2^(M+1), so each output
// share fits in M+1 bits. P' is computed at elaboration by Newton iteration.
// The multiplications are written with * and left to synthesis.
// Combinational; critical path: two multiplier trees and an adder.
module cs_mont_red #(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic [2*M+1:0] x_c,
  input  logic [2*M+1:0] x_s,
  output logic [M:0]     r_c,
  output logic [M:0]     r_s
);
  localparam int unsigned RW = M + 3;      // R = 2^RW
  localparam int unsigned XW = 2 * M + 4;  // width of x_k + q_k * P

  // -P^-1 mod 2^RW. For odd P, v = P is an inverse modulo 8; every Newton step
  // v <- v * (2 - P * v) doubles the number of correct low bits.
  function automatic logic [RW-1:0] neg_pinv();
    logic [RW-1:0] v, pp;
    pp = RW'(P);
    v  = pp;
    for (int n = 3; n < int'(RW); n = n * 2)
      v = v * (RW'(2) - pp * v);
    return ~v + RW'(1);
  endfunction

  localparam logic [RW-1:0] PINV_NEG = neg_pinv();

  function automatic logic [M:0] reduce_share(input logic [2*M+1:0] x);
    logic [RW-1:0] q;
    logic [XW-1:0] t;
    q = x[RW-1:0] * PINV_NEG;
    t = XW'(x) + XW'(q) * XW'(P);
    return t[XW-1:RW];
  endfunction

  always_comb begin
    r_c = reduce_share(x_c);
    r_s = reduce_share(x_s);
  end
endmodule
