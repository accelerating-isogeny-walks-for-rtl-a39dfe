// cs_sqr: integer squaring of a carry-save number (the SQR unit).
//
// a^2 = (a_c + a_s)^2 = a_c^2 + a_s^2 + 2*a_c*a_s. The three terms (2M, 2M and
// 2M+1 bits) are merged by one carry-save adder array into a (2M+2)-bit
// carry-save result. As in cs_mul, the terms are written with the * operator
// and their partial-product trees are left to synthesis. Combinational; one
// CSA level shorter than cs_mul.
module cs_sqr #(
  parameter int unsigned M = vdf_pkg::M_DEFAULT
) (
  input  logic [M-1:0]   a_c,
  input  logic [M-1:0]   a_s,
  output logic [2*M+1:0] r_c,
  output logic [2*M+1:0] r_s
);
  logic [2*M:0] q_cc, q_ss, q_cs2;

  always_comb begin
    q_cc  = (2*M+1)'(a_c) * (2*M+1)'(a_c);
    q_ss  = (2*M+1)'(a_s) * (2*M+1)'(a_s);
    q_cs2 = ((2*M+1)'(a_c) * (2*M+1)'(a_s)) << 1;
  end

  logic [2*M:0]   s1;
  logic [2*M+1:0] c1;
  csa #(.W(2*M+1)) u_l1 (.x(q_cc), .y(q_ss), .z(q_cs2), .s(s1), .c(c1));

  assign r_s = {1'b0, s1};
  assign r_c = c1;
endmodule
