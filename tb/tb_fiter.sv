// tb_fiter: runs a walk of N 4-isogenies on the FITER cryptoprocessor with the
// 14-instruction evaluation program (4 MUL, 4 SUB, 2 MUL, 2 squares, 2 MUL),
// loading the next kernel pair in parallel with the first two instructions of
// each evaluation. Checks the final point against the plain modular reference,
// that each evaluation takes 14 cycles, and the modular addition through an ADD
// followed by two outputs. m = 89, p = 2^89 - 1.
module tb_fiter;
  import vdf_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned M  = 89;
  localparam logic [M-1:0] P = {M{1'b1}};
  localparam int N = 5;

  logic         clk = 1'b0, rst_n, ins_valid;
  fiter_ins_t   ins;
  logic [M-1:0] ld_data;
  logic         out_valid;
  logic [M-1:0] dout_c, dout_s;
  int checks = 0, failures = 0, cycles = 0;

  fiter #(.M(M), .P(P)) dut (.*);

  always #5 clk = ~clk;
  // count cycles and the span of the arithmetic instructions of the walk
  int first_op = -1, last_op = -1, n_ops = 0;
  always @(posedge clk) begin
    cycles++;
    if (rst_n && ins_valid && (ins.op == FI_MUL || ins.op == FI_SUB)) begin
      if (first_op < 0) first_op = cycles;
      last_op = cycles;
      n_ops++;
    end
  end

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input fiter_op_e op, input int dst, input int a, input int b,
                       input bit ld = 1'b0, input int ld_addr = 0, input big_t data = '0);
    @(negedge clk);
    ins_valid   = 1'b1;
    ins.op      = op;
    ins.dst     = fiter_addr_t'(dst);
    ins.src_a   = fiter_addr_t'(a);
    ins.src_b   = fiter_addr_t'(b);
    ins.ld_en   = ld;
    ins.ld_addr = fiter_addr_t'(ld_addr);
    ld_data     = M'(data);
  endtask

  // one 4-isogeny: X in r0, Z in r1, kernel points in (wa, wb); the next pair
  // is loaded into (na, nb) during the first two instructions
  task automatic iso4(input int wa, input int wb, input bit ld, input int na, input int nb,
                      input big_t n0, input big_t n1);
    issue(FI_MUL, 4, 1, wa, ld, na, n0);   // Z*w0
    issue(FI_MUL, 5, 1, wb, ld, nb, n1);   // Z*w1
    issue(FI_MUL, 6, 0, wa);               // X*w0
    issue(FI_MUL, 7, 0, wb);               // X*w1
    issue(FI_SUB, 4, 0, 4);                // X - Z*w0
    issue(FI_SUB, 5, 0, 5);                // X - Z*w1
    issue(FI_SUB, 6, 6, 1);                // X*w0 - Z
    issue(FI_SUB, 7, 7, 1);                // X*w1 - Z
    issue(FI_MUL, 4, 1, 4);                // Z (X - Z*w0)
    issue(FI_MUL, 5, 5, 5);                // (X - Z*w1)^2
    issue(FI_MUL, 6, 0, 6);                // X (X*w0 - Z)
    issue(FI_MUL, 7, 7, 7);                // (X*w1 - Z)^2
    issue(FI_MUL, 1, 4, 5);                // Z'
    issue(FI_MUL, 0, 6, 7);                // X'
  endtask

  big_t p, x, z, xr, zr, got, k0 [N+1], k1 [N+1];

  initial begin
    p = big_t'(P);
    ins_valid = 1'b0; ins = '0; ld_data = '0; rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    x = rand_bits(M) % p; z = rand_bits(M) % p;
    foreach (k0[i]) begin k0[i] = rand_bits(M) % p; k1[i] = rand_bits(M) % p; end
    xr = x; zr = z;
    for (int i = 0; i < N; i++) iso4_ref(xr, zr, k0[i], k1[i], p, xr, zr);
    // loads only
    issue(FI_NOP, 0, 0, 0, 1'b1, 0, to_mont(x, p, M));
    issue(FI_NOP, 0, 0, 0, 1'b1, 1, to_mont(z, p, M));
    issue(FI_NOP, 0, 0, 0, 1'b1, 2, to_mont(k0[0], p, M));
    issue(FI_NOP, 0, 0, 0, 1'b1, 3, to_mont(k1[0], p, M));
    for (int i = 0; i < N; i++) begin
      if (i % 2 == 0) iso4(2, 3, 1'b1, 12, 13, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
      else            iso4(12, 13, 1'b1, 2, 3, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
    end
    issue(FI_ADD, 8, 0, 1);
    @(posedge clk);
    checks++;
    if (last_op - first_op + 1 != 14 * N || n_ops != 14 * N) begin
      failures++; $display("fiter: %0d cycles for %0d evaluations", last_op - first_op + 1, N);
    end
    issue(FI_OUT, 0, 0, 0);
    @(posedge clk); #1;
    got = (big_t'(dout_c) + big_t'(dout_s)) % p;
    checks++;
    if (!out_valid || got != to_mont(xr, p, M)) begin failures++; $display("fiter: wrong X'"); end
    issue(FI_OUT, 0, 1, 0);
    @(posedge clk); #1;
    got = (big_t'(dout_c) + big_t'(dout_s)) % p;
    checks++;
    if (!out_valid || got != to_mont(zr, p, M)) begin failures++; $display("fiter: wrong Z'"); end
    issue(FI_OUT, 0, 8, 0);
    @(posedge clk); #1;
    got = (big_t'(dout_c) + big_t'(dout_s)) % p;
    checks++;
    if (!out_valid || got != to_mont((xr + zr) % p, p, M)) begin failures++; $display("fiter: wrong X'+Z'"); end
    @(negedge clk);
    ins_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("fiter: out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
