// tb_fp_sub: checks the carry-save modular unit r = a - b (mod p), with
// R = 2^(m+3), on random m-bit shares (any value below 2^m, as the datapath
// produces) and all-ones corner cases. Runs at m = 89 (p = 2^89 - 1) and at
// m = 40 (p = 2^40 - 585), the two small sizes of the synthesis study.
module tb_fp_sub;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};
  localparam int unsigned M2 = 40;
  localparam logic [M2-1:0] P2 = {M2{1'b1}} - M2'(584);

  logic [M-1:0]  a_c, a_s, b_c, b_s, r_c, r_s;
  logic [M2-1:0] c_c, c_s, d_c, d_s, q_c, q_s;
  int checks = 0, failures = 0;

  fp_sub #(.M(M),  .P(P))  dut   (.a_c, .a_s, .b_c, .b_s, .r_c, .r_s);
  fp_sub #(.M(M2), .P(P2)) dut40 (.a_c(c_c), .a_s(c_s), .b_c(d_c), .b_s(d_s), .r_c(q_c), .r_s(q_s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(input big_t a, input big_t b, input big_t got, input big_t p,
                            input int unsigned m);
    return (got % p) == (submod(a, b, p));
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      a_c = M'(rand_bits(M));   a_s = M'(rand_bits(M));
      b_c = M'(rand_bits(M));   b_s = M'(rand_bits(M));
      c_c = M2'(rand_bits(M2)); c_s = M2'(rand_bits(M2));
      d_c = M2'(rand_bits(M2)); d_s = M2'(rand_bits(M2));
      if (t == 0) begin a_c = '1; a_s = '1; b_c = '1; b_s = '1; c_c = '1; c_s = '1; d_c = '1; d_s = '1; end
      if (t == 1) begin a_c = '0; a_s = '0; b_c = '1; b_s = '1; c_c = '0; c_s = '0; d_c = '1; d_s = '1; end
      #1;
      checks++;
      if (!ok(big_t'(a_c) + big_t'(a_s), big_t'(b_c) + big_t'(b_s), big_t'(r_c) + big_t'(r_s),
              big_t'(P), M)) begin
        failures++; $display("fp_sub m=%0d mismatch t=%0d", M, t);
      end
      checks++;
      if (!ok(big_t'(c_c) + big_t'(c_s), big_t'(d_c) + big_t'(d_s), big_t'(q_c) + big_t'(q_s),
              big_t'(P2), M2)) begin
        failures++; $display("fp_sub m=%0d mismatch t=%0d", M2, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
