// iso4_eval: one 4-isogeny evaluation, fully unrolled (the 4-iso-e unit).
//
// Maps the projective point (X : Z) to its image (X' : Z') under the 4-isogeny
// whose kernel has the x-coordinates w0 (the point of order 2) and w1 (the
// points of order 4, both of which share this x-coordinate, hence the square):
//   X' = X * (X*w0 - Z) * (X*w1 - Z)^2
//   Z' = Z * (X - w0*Z) * (X - w1*Z)^2
// Dataflow, each stage in parallel:
//   1. four products    Z*w0, Z*w1, X*w0, X*w1
//   2. four subtractions X - Z*w0, X - Z*w1, X*w0 - Z, X*w1 - Z
//   3. two products and two squares: Z*(X - Z*w0), (X - Z*w1)^2,
//      X*(X*w0 - Z), (X*w1 - Z)^2
//   4. two products giving Z' and X'.
// In all 8 multipliers, 2 squarers, 4 subtractors and 10 Montgomery
// reductions. The critical path is one modular subtraction and three modular
// multiplications. All values are Montgomery-domain carry-save pairs; the kernel
// points arrive as plain M-bit integers (save share zero). Combinational: the
// surrounding register bank gives one evaluation per clock cycle.
module iso4_eval #(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic [M-1:0] x_c,
  input  logic [M-1:0] x_s,
  input  logic [M-1:0] z_c,
  input  logic [M-1:0] z_s,
  input  logic [M-1:0] w0,
  input  logic [M-1:0] w1,
  output logic [M-1:0] xo_c,
  output logic [M-1:0] xo_s,
  output logic [M-1:0] zo_c,
  output logic [M-1:0] zo_s
);
  localparam logic [M-1:0] ZERO = '0;

  // stage 1
  logic [M-1:0] zw0_c, zw0_s, zw1_c, zw1_s, xw0_c, xw0_s, xw1_c, xw1_s;
  fp_mul #(.M(M), .P(P)) u_zw0 (.a_c(z_c), .a_s(z_s), .b_c(w0), .b_s(ZERO), .r_c(zw0_c), .r_s(zw0_s));
  fp_mul #(.M(M), .P(P)) u_zw1 (.a_c(z_c), .a_s(z_s), .b_c(w1), .b_s(ZERO), .r_c(zw1_c), .r_s(zw1_s));
  fp_mul #(.M(M), .P(P)) u_xw0 (.a_c(x_c), .a_s(x_s), .b_c(w0), .b_s(ZERO), .r_c(xw0_c), .r_s(xw0_s));
  fp_mul #(.M(M), .P(P)) u_xw1 (.a_c(x_c), .a_s(x_s), .b_c(w1), .b_s(ZERO), .r_c(xw1_c), .r_s(xw1_s));

  // stage 2
  logic [M-1:0] d0_c, d0_s, d1_c, d1_s, e0_c, e0_s, e1_c, e1_s;
  fp_sub #(.M(M), .P(P)) u_d0 (.a_c(x_c),   .a_s(x_s),   .b_c(zw0_c), .b_s(zw0_s), .r_c(d0_c), .r_s(d0_s));
  fp_sub #(.M(M), .P(P)) u_d1 (.a_c(x_c),   .a_s(x_s),   .b_c(zw1_c), .b_s(zw1_s), .r_c(d1_c), .r_s(d1_s));
  fp_sub #(.M(M), .P(P)) u_e0 (.a_c(xw0_c), .a_s(xw0_s), .b_c(z_c),   .b_s(z_s),   .r_c(e0_c), .r_s(e0_s));
  fp_sub #(.M(M), .P(P)) u_e1 (.a_c(xw1_c), .a_s(xw1_s), .b_c(z_c),   .b_s(z_s),   .r_c(e1_c), .r_s(e1_s));

  // stage 3
  logic [M-1:0] f0_c, f0_s, g1_c, g1_s, h0_c, h0_s, k1_c, k1_s;
  fp_mul #(.M(M), .P(P)) u_f0 (.a_c(z_c), .a_s(z_s), .b_c(d0_c), .b_s(d0_s), .r_c(f0_c), .r_s(f0_s));
  fp_sqr #(.M(M), .P(P)) u_g1 (.a_c(d1_c), .a_s(d1_s), .r_c(g1_c), .r_s(g1_s));
  fp_mul #(.M(M), .P(P)) u_h0 (.a_c(x_c), .a_s(x_s), .b_c(e0_c), .b_s(e0_s), .r_c(h0_c), .r_s(h0_s));
  fp_sqr #(.M(M), .P(P)) u_k1 (.a_c(e1_c), .a_s(e1_s), .r_c(k1_c), .r_s(k1_s));

  // stage 4
  fp_mul #(.M(M), .P(P)) u_zo (.a_c(f0_c), .a_s(f0_s), .b_c(g1_c), .b_s(g1_s), .r_c(zo_c), .r_s(zo_s));
  fp_mul #(.M(M), .P(P)) u_xo (.a_c(h0_c), .a_s(h0_s), .b_c(k1_c), .b_s(k1_s), .r_c(xo_c), .r_s(xo_s));
endmodule
