// tb_fave: runs a walk of N 4-isogenies on the FAVE accelerator and checks the
// result against the plain modular reference, and that the walk streams at one
// evaluation per clock cycle: out_valid must rise at the (N+1)-th clock edge
// after the first evaluation is issued (N evaluations, then the output copy). A second walk uses separate FAVE_LDW and FAVE_ISO instructions
// with idle cycles in between. m = 89, p = 2^89 - 1.
module tb_fave;
  import vdf_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};
  localparam int N = 12;

  logic         clk = 1'b0, rst_n, ins_valid;
  fave_op_e     ins;
  logic [M-1:0] p0_x, p0_z, w0_in, w1_in;
  logic         out_valid;
  logic [M-1:0] phi_x_c, phi_x_s, phi_z_c, phi_z_s;
  int checks = 0, failures = 0, cycles = 0;

  fave #(.M(M), .P(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input fave_op_e op, input big_t a = '0, input big_t b = '0);
    @(negedge clk);
    ins_valid = 1'b1; ins = op;
    p0_x = M'(a); p0_z = M'(b); w0_in = M'(a); w1_in = M'(b);
  endtask

  task automatic idle();
    @(negedge clk);
    ins_valid = 1'b0; ins = FAVE_NOP;
  endtask

  big_t p, x, z, xr, zr, k0 [N], k1 [N];

  task automatic check_out(input string what);
    wait (out_valid);
    #1;
    checks++;
    if ((big_t'(phi_x_c) + big_t'(phi_x_s)) % p != to_mont(xr, p, M) ||
        (big_t'(phi_z_c) + big_t'(phi_z_s)) % p != to_mont(zr, p, M)) begin
      failures++; $display("fave: wrong phi(P0) in %s", what);
    end
  endtask

  initial begin
    int start;
    p = big_t'(P);
    ins_valid = 1'b0; ins = FAVE_NOP; rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      x = rand_bits(M) % p; z = rand_bits(M) % p;
      foreach (k0[i]) begin k0[i] = rand_bits(M) % p; k1[i] = rand_bits(M) % p; end
      xr = x; zr = z;
      for (int i = 0; i < N; i++) iso4_ref(xr, zr, k0[i], k1[i], p, xr, zr);
      issue(FAVE_LDP, to_mont(x, p, M), to_mont(z, p, M));
      if (run == 0) begin
        // streaming: each evaluation loads the next kernel pair
        issue(FAVE_LDW, to_mont(k0[0], p, M), to_mont(k1[0], p, M));
        for (int i = 0; i < N; i++) begin
          if (i < N - 1) issue(FAVE_ISO_LDW, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
          else           issue(FAVE_ISO);
          if (i == 0) start = cycles;
        end
        issue(FAVE_OUT);
        idle();
        wait (out_valid);
        checks++;
        if (cycles - start != N + 1) begin
          failures++; $display("fave: %0d cycles for %0d evaluations", cycles - start - 1, N);
        end
        check_out("streaming walk");
      end else begin
        for (int i = 0; i < N; i++) begin
          issue(FAVE_LDW, to_mont(k0[i], p, M), to_mont(k1[i], p, M));
          idle();
          issue(FAVE_ISO);
          idle();
        end
        issue(FAVE_OUT);
        idle();
        check_out("walk with separate loads");
      end
      idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
