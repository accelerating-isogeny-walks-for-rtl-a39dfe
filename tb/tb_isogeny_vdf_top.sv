// tb_isogeny_vdf_top: end-to-end test of both evaluators at the full size
// (m = 1506, p = 2^1506 - 257; the top's parameters are left at their defaults).
//
// FAVE walks NF 4-isogenies: streamed (FAVE_ISO_LDW, one per cycle) and then
// with separate FAVE_LDW / FAVE_ISO instructions. FITER walks NI 4-isogenies
// with the 14-instruction program, loading the next kernel pair during the
// first two instructions, then adds X' + Z'. Both results are compared with the
// plain modular reference, the cycle counts with 1 and 14 cycles per
// evaluation, and every mechanism (each FAVE instruction, each FITER operation,
// a square, a load alongside an operation, a load alone, an output) must have
// occurred at least once.
module tb_isogeny_vdf_top;
  import vdf_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned M = vdf_pkg::M_DEFAULT;
  localparam int NF = 16;
  localparam int NI = 3;

  logic         clk = 1'b0, rst_n;
  logic         fave_ins_valid;
  fave_op_e     fave_ins;
  logic [M-1:0] fave_p0_x, fave_p0_z, fave_w0, fave_w1;
  logic         fave_out_valid;
  logic [M-1:0] fave_phi_x_c, fave_phi_x_s, fave_phi_z_c, fave_phi_z_s;
  logic         fiter_ins_valid;
  fiter_ins_t   fiter_ins;
  logic [M-1:0] fiter_ld_data;
  logic         fiter_out_valid;
  logic [M-1:0] fiter_dout_c, fiter_dout_s;
  int checks = 0, failures = 0, cycles = 0;

  isogeny_vdf_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_ldp = 0, n_ldw = 0, n_iso = 0, n_iso_ldw = 0, n_fave_out = 0;
  int n_add = 0, n_sub = 0, n_mul = 0, n_sqr = 0, n_ld_par = 0, n_ld_only = 0, n_fiter_out = 0;
  int fave_first = -1, fave_last = -1, fiter_first = -1, fiter_last = -1;
  always @(posedge clk) begin
    cycles++;
    if (rst_n && fave_ins_valid) begin
      unique case (fave_ins)
        FAVE_LDP:     n_ldp++;
        FAVE_LDW:     n_ldw++;
        FAVE_ISO:     n_iso++;
        FAVE_ISO_LDW: n_iso_ldw++;
        FAVE_OUT:     n_fave_out++;
        default: ;
      endcase
    end
    if (rst_n && fiter_ins_valid) begin
      case (fiter_ins.op)
        FI_ADD: n_add++;
        FI_SUB: n_sub++;
        FI_MUL: if (fiter_ins.src_a == fiter_ins.src_b) n_sqr++; else n_mul++;
        FI_OUT: n_fiter_out++;
        default: ;
      endcase
      if (fiter_ins.ld_en && fiter_ins.op != FI_NOP) n_ld_par++;
      if (fiter_ins.ld_en && fiter_ins.op == FI_NOP) n_ld_only++;
    end
  end

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  big_t p;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- FAVE driver ----------------
  task automatic fave_issue(input fave_op_e op, input big_t a = '0, input big_t b = '0);
    @(negedge clk);
    fave_ins_valid = 1'b1; fave_ins = op;
    fave_p0_x = M'(a); fave_p0_z = M'(b); fave_w0 = M'(a); fave_w1 = M'(b);
  endtask

  task automatic fave_run(input bit streamed);
    big_t x, z, xr, zr, k0 [NF], k1 [NF];
    int t0;
    x = rand_bits(M) % p; z = rand_bits(M) % p;
    foreach (k0[i]) begin k0[i] = rand_bits(M) % p; k1[i] = rand_bits(M) % p; end
    xr = x; zr = z;
    for (int i = 0; i < NF; i++) iso4_ref(xr, zr, k0[i], k1[i], p, xr, zr);
    fave_issue(FAVE_LDP, to_mont(x, p, M), to_mont(z, p, M));
    if (streamed) begin
      fave_issue(FAVE_LDW, to_mont(k0[0], p, M), to_mont(k1[0], p, M));
      for (int i = 0; i < NF; i++) begin
        if (i < NF - 1) fave_issue(FAVE_ISO_LDW, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
        else            fave_issue(FAVE_ISO);
        if (i == 0) t0 = cycles;
      end
    end else begin
      for (int i = 0; i < NF; i++) begin
        fave_issue(FAVE_LDW, to_mont(k0[i], p, M), to_mont(k1[i], p, M));
        fave_issue(FAVE_ISO);
      end
    end
    fave_issue(FAVE_OUT);
    @(negedge clk);
    fave_ins_valid = 1'b0;
    if (streamed) check(cycles - t0 == NF + 1, "FAVE: one 4-isogeny per cycle");
    check(fave_out_valid, "FAVE: out_valid after FAVE_OUT");
    check((big_t'(fave_phi_x_c) + big_t'(fave_phi_x_s)) % p == to_mont(xr, p, M), "FAVE: X of phi(P0)");
    check((big_t'(fave_phi_z_c) + big_t'(fave_phi_z_s)) % p == to_mont(zr, p, M), "FAVE: Z of phi(P0)");
  endtask

  // ---------------- FITER driver ----------------
  task automatic fi_issue(input fiter_op_e op, input int dst, input int a, input int b,
                          input bit ld = 1'b0, input int ld_addr = 0, input big_t data = '0);
    @(negedge clk);
    fiter_ins_valid   = 1'b1;
    fiter_ins.op      = op;
    fiter_ins.dst     = fiter_addr_t'(dst);
    fiter_ins.src_a   = fiter_addr_t'(a);
    fiter_ins.src_b   = fiter_addr_t'(b);
    fiter_ins.ld_en   = ld;
    fiter_ins.ld_addr = fiter_addr_t'(ld_addr);
    fiter_ld_data     = M'(data);
  endtask

  task automatic fi_iso4(input int wa, input int wb, input int na, input int nb,
                         input big_t n0, input big_t n1);
    fi_issue(FI_MUL, 4, 1, wa, 1'b1, na, n0);
    fi_issue(FI_MUL, 5, 1, wb, 1'b1, nb, n1);
    fi_issue(FI_MUL, 6, 0, wa);
    fi_issue(FI_MUL, 7, 0, wb);
    fi_issue(FI_SUB, 4, 0, 4);
    fi_issue(FI_SUB, 5, 0, 5);
    fi_issue(FI_SUB, 6, 6, 1);
    fi_issue(FI_SUB, 7, 7, 1);
    fi_issue(FI_MUL, 4, 1, 4);
    fi_issue(FI_MUL, 5, 5, 5);
    fi_issue(FI_MUL, 6, 0, 6);
    fi_issue(FI_MUL, 7, 7, 7);
    fi_issue(FI_MUL, 1, 4, 5);
    fi_issue(FI_MUL, 0, 6, 7);
  endtask

  task automatic fiter_out(input int r, input big_t expect_v, input string what);
    fi_issue(FI_OUT, 0, r, 0);
    @(posedge clk); #1;
    check(fiter_out_valid && (big_t'(fiter_dout_c) + big_t'(fiter_dout_s)) % p == expect_v, what);
  endtask

  task automatic fiter_run();
    big_t x, z, xr, zr, k0 [NI+1], k1 [NI+1];
    int t0, t1;
    x = rand_bits(M) % p; z = rand_bits(M) % p;
    foreach (k0[i]) begin k0[i] = rand_bits(M) % p; k1[i] = rand_bits(M) % p; end
    xr = x; zr = z;
    for (int i = 0; i < NI; i++) iso4_ref(xr, zr, k0[i], k1[i], p, xr, zr);
    fi_issue(FI_NOP, 0, 0, 0, 1'b1, 0, to_mont(x, p, M));
    fi_issue(FI_NOP, 0, 0, 0, 1'b1, 1, to_mont(z, p, M));
    fi_issue(FI_NOP, 0, 0, 0, 1'b1, 2, to_mont(k0[0], p, M));
    fi_issue(FI_NOP, 0, 0, 0, 1'b1, 3, to_mont(k1[0], p, M));
    t0 = cycles;
    for (int i = 0; i < NI; i++) begin
      if (i % 2 == 0) fi_iso4(2, 3, 12, 13, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
      else            fi_iso4(12, 13, 2, 3, to_mont(k0[i+1], p, M), to_mont(k1[i+1], p, M));
    end
    t1 = cycles;
    check(t1 - t0 == 14 * NI, "FITER: 14 cycles per 4-isogeny");
    fi_issue(FI_ADD, 8, 0, 1);
    fiter_out(0, to_mont(xr, p, M), "FITER: X'");
    fiter_out(1, to_mont(zr, p, M), "FITER: Z'");
    fiter_out(8, to_mont((xr + zr) % p, p, M), "FITER: X' + Z'");
    @(negedge clk);
    fiter_ins_valid = 1'b0;
  endtask

  initial begin
    p = (big_t'(1) << M) - big_t'(257);
    rst_n = 1'b0;
    fave_ins_valid = 1'b0; fave_ins = FAVE_NOP;
    fave_p0_x = '0; fave_p0_z = '0; fave_w0 = '0; fave_w1 = '0;
    fiter_ins_valid = 1'b0; fiter_ins = '0; fiter_ld_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin fave_run(1'b1); fave_run(1'b0); end
      fiter_run();
    join
    check(n_ldp > 0,       "mechanism FAVE_LDP never happened");
    check(n_ldw > 0,       "mechanism FAVE_LDW never happened");
    check(n_iso > 0,       "mechanism FAVE_ISO never happened");
    check(n_iso_ldw > 0,   "mechanism FAVE_ISO_LDW never happened");
    check(n_fave_out > 0,  "mechanism FAVE_OUT never happened");
    check(n_add > 0,       "mechanism FITER add never happened");
    check(n_sub > 0,       "mechanism FITER sub never happened");
    check(n_mul > 0,       "mechanism FITER mul never happened");
    check(n_sqr > 0,       "mechanism FITER square never happened");
    check(n_ld_par > 0,    "mechanism FITER load beside an operation never happened");
    check(n_ld_only > 0,   "mechanism FITER load alone never happened");
    check(n_fiter_out > 0, "mechanism FITER output never happened");
    $display("mechanisms: LDP=%0d LDW=%0d ISO=%0d ISO_LDW=%0d FAVE_OUT=%0d ADD=%0d SUB=%0d MUL=%0d SQR=%0d LD+OP=%0d LD=%0d FITER_OUT=%0d",
             n_ldp, n_ldw, n_iso, n_iso_ldw, n_fave_out, n_add, n_sub, n_mul, n_sqr, n_ld_par, n_ld_only, n_fiter_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
