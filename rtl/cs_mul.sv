// cs_mul: integer multiplication of two carry-save numbers (the MUL unit).
//
// With a = a_c + a_s and b = b_c + b_s (M-bit shares) the product is the sum of
// four sub-products, a_c*b_c + a_c*b_s + a_s*b_c + a_s*b_s, each formed from
// M*M AND-gate partial products. The four sub-products are then merged by two
// carry-save adder levels into a (2M+2)-bit carry-save result, never summed.
//
// Each sub-product is written with the * operator: the partial-product
// compression tree (Wallace or Dadda) is left to synthesis rather than spelled
// out bit by bit, which keeps this description readable and simulable at
// M = 1506. Combinational.
module cs_mul #(
  parameter int unsigned M = vdf_pkg::M_DEFAULT
) (
  input  logic [M-1:0]   a_c,
  input  logic [M-1:0]   a_s,
  input  logic [M-1:0]   b_c,
  input  logic [M-1:0]   b_s,
  output logic [2*M+1:0] r_c,
  output logic [2*M+1:0] r_s
);
  logic [2*M-1:0] p_cc, p_cs, p_sc, p_ss;

  always_comb begin
    p_cc = (2*M)'(a_c) * (2*M)'(b_c);
    p_cs = (2*M)'(a_c) * (2*M)'(b_s);
    p_sc = (2*M)'(a_s) * (2*M)'(b_c);
    p_ss = (2*M)'(a_s) * (2*M)'(b_s);
  end

  logic [2*M-1:0] s1;
  logic [2*M:0]   c1;
  logic [2*M:0]   s2;
  logic [2*M+1:0] c2;

  csa #(.W(2*M))   u_l1 (.x(p_cc), .y(p_cs), .z(p_sc), .s(s1), .c(c1));
  csa #(.W(2*M+1)) u_l2 (.x({1'b0, s1}), .y(c1), .z({1'b0, p_ss}), .s(s2), .c(c2));

  assign r_s = {1'b0, s2};
  assign r_c = c2;
endmodule
