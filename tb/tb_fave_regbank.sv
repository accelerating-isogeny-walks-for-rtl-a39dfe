// tb_fave_regbank: drives the FAVE register bank through reset, a P0 load, a
// kernel-point load, an update from the evaluator inputs, a combined update
// and kernel load, and an output copy, comparing the registers each cycle with
// a model kept in the testbench.
module tb_fave_regbank;
  import vdf_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned M = 40;

  logic         clk = 1'b0, rst_n;
  fave_cmd_t    cmd;
  logic [M-1:0] p0_x, p0_z, w0_in, w1_in, iso_x_c, iso_x_s, iso_z_c, iso_z_s;
  logic [M-1:0] p_x_c, p_x_s, p_z_c, p_z_s, w0, w1;
  logic         out_valid;
  logic [M-1:0] phi_x_c, phi_x_s, phi_z_c, phi_z_s;
  logic [M-1:0] m_p [4], m_w [2], m_phi [4];
  logic         m_ov;
  int checks = 0, failures = 0, cycles = 0;

  fave_regbank #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input fave_cmd_t c);
    cmd = c;
    p0_x = M'(rand_bits(M)); p0_z = M'(rand_bits(M));
    w0_in = M'(rand_bits(M)); w1_in = M'(rand_bits(M));
    iso_x_c = M'(rand_bits(M)); iso_x_s = M'(rand_bits(M));
    iso_z_c = M'(rand_bits(M)); iso_z_s = M'(rand_bits(M));
    @(posedge clk);
    #1;
    if (c.out_en) begin m_phi[0] = m_p[0]; m_phi[1] = m_p[1]; m_phi[2] = m_p[2]; m_phi[3] = m_p[3]; end
    m_ov = c.out_en;
    if (c.ld_p) begin m_p[0] = p0_x; m_p[1] = '0; m_p[2] = p0_z; m_p[3] = '0; end
    else if (c.upd_p) begin m_p[0] = iso_x_c; m_p[1] = iso_x_s; m_p[2] = iso_z_c; m_p[3] = iso_z_s; end
    if (c.ld_w) begin m_w[0] = w0_in; m_w[1] = w1_in; end
    checks++;
    if ({p_x_c, p_x_s, p_z_c, p_z_s} != {m_p[0], m_p[1], m_p[2], m_p[3]} ||
        {w0, w1} != {m_w[0], m_w[1]} || out_valid != m_ov ||
        (m_ov && {phi_x_c, phi_x_s, phi_z_c, phi_z_s} != {m_phi[0], m_phi[1], m_phi[2], m_phi[3]})) begin
      failures++; $display("regbank mismatch at cycle %0d cmd=%b", cycles, c);
    end
    @(negedge clk);
  endtask

  initial begin
    cmd = '0; rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (m_p[k]) m_p[k] = '0;
    m_w[0] = '0; m_w[1] = '0;
    checks++;
    if ({p_x_c, p_x_s, p_z_c, p_z_s, w0, w1, out_valid} != '0) begin failures++; $display("reset"); end
    for (int t = 0; t < 60; t++) begin
      fave_cmd_t c;
      c = fave_cmd_t'(4'($urandom()));
      if (c.ld_p) c.upd_p = 1'b0;
      step(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
