// tb_iso4_eval: checks the unrolled 4-isogeny evaluator against the plain
// modular formulas X' = X (X w0 - Z)(X w1 - Z)^2, Z' = Z (X - w0 Z)(X - w1 Z)^2.
// Random field elements are converted to the Montgomery domain (x*2^(m+3) mod
// p), the point is given as random carry-save pairs, and the outputs must be
// the Montgomery forms of the reference results. m = 89, p = 2^89 - 1.
module tb_iso4_eval;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};

  logic [M-1:0] x_c, x_s, z_c, z_s, w0, w1, xo_c, xo_s, zo_c, zo_s;
  int checks = 0, failures = 0;

  iso4_eval #(.M(M), .P(P)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t p, x, z, a, b, xr, zr, c, s;
    p = big_t'(P);
    for (int t = 0; t < 200; t++) begin
      x = rand_bits(M) % p; z = rand_bits(M) % p;
      a = rand_bits(M) % p; b = rand_bits(M) % p;
      split_cs(to_mont(x, p, M), p, M, c, s); x_c = M'(c); x_s = M'(s);
      split_cs(to_mont(z, p, M), p, M, c, s); z_c = M'(c); z_s = M'(s);
      w0 = M'(to_mont(a, p, M));
      w1 = M'(to_mont(b, p, M));
      #1;
      iso4_ref(x, z, a, b, p, xr, zr);
      checks++;
      if ((big_t'(xo_c) + big_t'(xo_s)) % p != to_mont(xr, p, M)) begin
        failures++; $display("X' mismatch t=%0d", t);
      end
      checks++;
      if ((big_t'(zo_c) + big_t'(zo_s)) % p != to_mont(zr, p, M)) begin
        failures++; $display("Z' mismatch t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
