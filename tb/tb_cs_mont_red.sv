// tb_cs_mont_red: checks the carry-save Montgomery reduction: for random
// (2m+2)-bit shares x, the (m+1)-bit output r must satisfy r * 2^(m+3) = x
// (mod p). Run at m = 89 (p = 2^89 - 1) and m = 40 (p = 2^40 - 585).
module tb_cs_mont_red;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};
  localparam int unsigned M2 = 40;
  localparam logic [M2-1:0] P2 = {M2{1'b1}} - M2'(584);

  logic [2*M+1:0]  x_c, x_s;
  logic [M:0]      r_c, r_s;
  logic [2*M2+1:0] y_c, y_s;
  logic [M2:0]     q_c, q_s;
  int checks = 0, failures = 0;

  cs_mont_red #(.M(M),  .P(P))  dut   (.x_c, .x_s, .r_c, .r_s);
  cs_mont_red #(.M(M2), .P(P2)) dut40 (.x_c(y_c), .x_s(y_s), .r_c(q_c), .r_s(q_s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t p, p2, lhs, rhs;
    p  = big_t'(P);
    p2 = big_t'(P2);
    for (int t = 0; t < 300; t++) begin
      x_c = (2*M+2)'(rand_bits(2*M+2)); x_s = (2*M+2)'(rand_bits(2*M+2));
      y_c = (2*M2+2)'(rand_bits(2*M2+2)); y_s = (2*M2+2)'(rand_bits(2*M2+2));
      if (t == 0) begin x_c = '1; x_s = '1; y_c = '1; y_s = '1; end
      #1;
      lhs = ((big_t'(r_c) + big_t'(r_s)) << (M + 3)) % p;
      rhs = (big_t'(x_c) + big_t'(x_s)) % p;
      checks++;
      if (lhs != rhs) begin failures++; $display("mont m=89 mismatch t=%0d", t); end
      lhs = ((big_t'(q_c) + big_t'(q_s)) << (M2 + 3)) % p2;
      rhs = (big_t'(y_c) + big_t'(y_s)) % p2;
      checks++;
      if (lhs != rhs) begin failures++; $display("mont m=40 mismatch t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
