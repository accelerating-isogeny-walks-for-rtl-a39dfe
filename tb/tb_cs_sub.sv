// tb_cs_sub: checks that the six-operand two's-complement subtractor gives
// shares whose sum equals a - b + K modulo 2^WO.
module tb_cs_sub;
  import tb_util_pkg::*;
  localparam int unsigned W  = 89;
  localparam int unsigned WO = W + 3;
  localparam logic [WO-1:0] K = WO'(92'h5_1234_5678_9abc_def0_1357);
  logic [W-1:0]  a_c, a_s, b_c, b_s;
  logic [WO-1:0] r_c, r_s;
  int checks = 0, failures = 0;

  cs_sub #(.W(W), .WO(WO), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t exp_v, got, modw;
    modw = big_t'(1) << WO;
    for (int t = 0; t < 300; t++) begin
      if (t == 0) begin a_c = '0; a_s = '0; b_c = '1; b_s = '1; end
      else begin
        a_c = W'(rand_bits(W)); a_s = W'(rand_bits(W));
        b_c = W'(rand_bits(W)); b_s = W'(rand_bits(W));
      end
      #1;
      exp_v = (big_t'(a_c) + big_t'(a_s) + big_t'(K) + 4 * modw - big_t'(b_c) - big_t'(b_s)) % modw;
      got   = (big_t'(r_c) + big_t'(r_s)) % modw;
      checks++;
      if (got != exp_v) begin failures++; $display("cs_sub mismatch t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
