// tb_cs_add: random and corner-case checks that the two carry-save adder
// levels give shares whose sum is exactly a + b.
module tb_cs_add;
  import tb_util_pkg::*;
  localparam int unsigned W = 89;
  logic [W-1:0] a_c, a_s, b_c, b_s;
  logic [W+1:0] r_c, r_s;
  int checks = 0, failures = 0;

  cs_add #(.W(W)) dut (.*);

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
        a_c = W'(rand_bits(W)); a_s = W'(rand_bits(W));
        b_c = W'(rand_bits(W)); b_s = W'(rand_bits(W));
      end
      #1;
      exp_v = big_t'(a_c) + big_t'(a_s) + big_t'(b_c) + big_t'(b_s);
      got   = big_t'(r_c) + big_t'(r_s);
      checks++;
      if (got != exp_v) begin failures++; $display("cs_add mismatch t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
