// tb_cs_red: checks the LUT-based carry-save reduction.
//  * the worked example p = 61, m = 6: shares 56 and 75 reduce to carry 22 and
//    save 48 (70 = 9 mod 61);
//  * random inputs for i = 1 (full index) at m = 6 and m = 89, and for i = 2 and
//    i = 3 with the carry of the index adder dropped (arithmetic mod 2^(m+i)),
//    on shares of values in [2^(m-1), 2^(m+i)) that may have wrapped.
// In every case the output shares must be m bits and congruent to the input.
module tb_cs_red;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};   // 2^89 - 1
  localparam logic [5:0]  P6 = 6'd61;

  logic [6:0]   e_c, e_s;
  logic [5:0]   e_rc, e_rs;
  logic [M:0]   a1_c, a1_s;
  logic [M-1:0] r1_c, r1_s;
  logic [M+1:0] a2_c, a2_s;
  logic [M-1:0] r2_c, r2_s;
  logic [M+2:0] a3_c, a3_s;
  logic [M-1:0] r3_c, r3_s;
  int checks = 0, failures = 0;

  cs_red #(.M(6), .I(1), .P(P6), .WRAP(1'b0)) dut_ex (.a_c(e_c), .a_s(e_s), .r_c(e_rc), .r_s(e_rs));
  cs_red #(.M(M), .I(1), .P(P), .WRAP(1'b0)) dut_i1 (.a_c(a1_c), .a_s(a1_s), .r_c(r1_c), .r_s(r1_s));
  cs_red #(.M(M), .I(2), .P(P), .WRAP(1'b1)) dut_i2 (.a_c(a2_c), .a_s(a2_s), .r_c(r2_c), .r_s(r2_s));
  cs_red #(.M(M), .I(3), .P(P), .WRAP(1'b1)) dut_i3 (.a_c(a3_c), .a_s(a3_s), .r_c(r3_c), .r_s(r3_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cs_red mismatch: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t p, p6, m2, m3, t2, t3;
    p  = big_t'(P);
    p6 = big_t'(P6);
    m2 = big_t'(1) << (M + 2);
    m3 = big_t'(1) << (M + 3);
    // worked example
    e_c = 7'd56; e_s = 7'd75;
    #1;
    check(e_rc == 6'd22 && e_rs == 6'd48, "worked example");
    for (int t = 0; t < 200; t++) begin
      e_c  = 7'($urandom()); e_s = 7'($urandom());
      a1_c = (M+1)'(rand_bits(M + 1)); a1_s = (M+1)'(rand_bits(M + 1));
      // WRAP: shares of a value T in [2^(m-1), 2^(m+i)), possibly wrapped mod 2^(m+i)
      t2   = (big_t'(1) << (M - 1)) + rand_bits(M + 2) % (m2 - (big_t'(1) << (M - 1)));
      t3   = (big_t'(1) << (M - 1)) + rand_bits(M + 3) % (m3 - (big_t'(1) << (M - 1)));
      a2_c = (M+2)'(rand_bits(M + 2)); a2_s = (M+2)'((t2 + m2 - big_t'(a2_c)) % m2);
      a3_c = (M+3)'(rand_bits(M + 3)); a3_s = (M+3)'((t3 + m3 - big_t'(a3_c)) % m3);
      if (t == 0) begin a1_c = '1; a1_s = '1; end
      #1;
      check((big_t'(e_rc) + big_t'(e_rs)) % p6 == (big_t'(e_c) + big_t'(e_s)) % p6, "m=6 random");
      check((big_t'(r1_c) + big_t'(r1_s)) % p == (big_t'(a1_c) + big_t'(a1_s)) % p, "i=1");
      check((big_t'(r2_c) + big_t'(r2_s)) % p == t2 % p, "i=2 wrap");
      check((big_t'(r3_c) + big_t'(r3_s)) % p == t3 % p, "i=3 wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
