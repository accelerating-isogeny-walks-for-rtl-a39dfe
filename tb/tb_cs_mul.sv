// tb_cs_mul: checks that the carry-save product shares sum exactly to
// (a_c + a_s) * (b_c + b_s).
module tb_cs_mul;
  import tb_util_pkg::*;
  localparam int unsigned M = 89;
  logic [M-1:0]   a_c, a_s, b_c, b_s;
  logic [2*M+1:0] r_c, r_s;
  int checks = 0, failures = 0;

  cs_mul #(.M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t exp_v, got;
    for (int t = 0; t < 300; t++) begin
      if (t == 0) begin a_c = '1; a_s = '1; b_c = '1; b_s = '1; end
      else begin
        a_c = M'(rand_bits(M)); a_s = M'(rand_bits(M));
        b_c = M'(rand_bits(M)); b_s = M'(rand_bits(M));
      end
      #1;
      exp_v = (big_t'(a_c) + big_t'(a_s)) * (big_t'(b_c) + big_t'(b_s));
      got   = big_t'(r_c) + big_t'(r_s);
      checks++;
      if (got != exp_v) begin failures++; $display("cs_mul mismatch t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
