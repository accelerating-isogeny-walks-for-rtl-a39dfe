// tb_fiter_regbank: random writes, loads (in the same cycle as writes, to other
// registers), reads on both ports and output copies on the FITER register
// bank, compared every cycle with an array model in the testbench; also checks
// that reset clears every register.
module tb_fiter_regbank;
  import vdf_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned M = 40;
  localparam int unsigned NREGS = vdf_pkg::FITER_NREGS;

  logic         clk = 1'b0, rst_n;
  fiter_addr_t  rd_a, rd_b, wr_addr, ld_addr;
  logic [M-1:0] a_c, a_s, b_c, b_s, wr_c, wr_s, ld_data, dout_c, dout_s;
  logic         wr_en, ld_en, out_en, out_valid;
  logic [M-1:0] mc [NREGS], ms [NREGS], m_oc, m_os;
  int checks = 0, failures = 0, cycles = 0;

  fiter_regbank #(.M(M), .NREGS(NREGS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; ld_en = 1'b0; out_en = 1'b0;
    rd_a = '0; rd_b = '0; wr_addr = '0; ld_addr = '0; wr_c = '0; wr_s = '0; ld_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NREGS); k++) begin
      rd_a = fiter_addr_t'(k); rd_b = fiter_addr_t'(k);
      #1;
      checks++;
      if ({a_c, a_s, b_c, b_s} != '0) begin failures++; $display("r%0d not cleared", k); end
      mc[k] = '0; ms[k] = '0;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wr_en = 1'($urandom()); ld_en = 1'($urandom()); out_en = 1'($urandom());
      wr_addr = fiter_addr_t'($urandom()); ld_addr = fiter_addr_t'($urandom());
      if (ld_addr == wr_addr) ld_addr = wr_addr + 1'b1;
      rd_a = fiter_addr_t'($urandom()); rd_b = fiter_addr_t'($urandom());
      wr_c = M'(rand_bits(M)); wr_s = M'(rand_bits(M)); ld_data = M'(rand_bits(M));
      #1;
      checks++;
      if (a_c != mc[rd_a] || a_s != ms[rd_a] || b_c != mc[rd_b] || b_s != ms[rd_b]) begin
        failures++; $display("read mismatch t=%0d", t);
      end
      m_oc = mc[rd_a]; m_os = ms[rd_a];
      @(posedge clk);
      #1;
      if (wr_en) begin mc[wr_addr] = wr_c; ms[wr_addr] = wr_s; end
      if (ld_en) begin mc[ld_addr] = ld_data; ms[ld_addr] = '0; end
      checks++;
      if (out_valid != out_en || (out_en && (dout_c != m_oc || dout_s != m_os))) begin
        failures++; $display("output mismatch t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
