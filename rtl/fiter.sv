// fiter: the serial isogeny-walk cryptoprocessor.
//
// Executes one modular operation per clock cycle: it reads two registers,
// computes in parallel a modular addition (fp_add), a modular subtraction
// (fp_sub) and a modular Montgomery multiplication (fp_mul: integer multiplier
// MUL followed by the reduction RED), and a multiplexer picks the one named by
// the instruction right before the result is written back to the register bank.
// The same carry-save arithmetic units as in the unrolled accelerator are
// used; one 4-isogeny evaluation is the 14-instruction sequence
//   4 MUL, 4 SUB, 2 MUL, 2 squares (MUL with equal sources), 2 MUL
// and so takes 14 cycles. The kernel points of the next evaluation can be
// loaded through ld_data during those cycles, since a load writes a register
// in the same cycle as an arithmetic result.
//
// Interface: ins/ins_valid (vdf_pkg::fiter_ins_t), ld_data (plain M-bit
// Montgomery-domain value for the instruction's load), dout_c/dout_s with
// out_valid one cycle after an FI_OUT. The register count (16) and the
// instruction encoding are this design's own.
module fiter
  import vdf_pkg::*;
#(
  parameter int unsigned  M     = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P     = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1),
  parameter int unsigned  NREGS = vdf_pkg::FITER_NREGS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ins_valid,
  input  fiter_ins_t   ins,
  input  logic [M-1:0] ld_data,
  output logic         out_valid,
  output logic [M-1:0] dout_c,
  output logic [M-1:0] dout_s
);
  fiter_addr_t  rd_a, rd_b, wr_addr, ld_addr;
  logic         wr_en, ld_en, out_en;
  fiter_sel_e   sel;

  logic [M-1:0] a_c, a_s, b_c, b_s;
  logic [M-1:0] add_c, add_s, sub_c, sub_s, mul_c, mul_s;
  logic [M-1:0] wr_c, wr_s;

  fiter_ctrl u_ctrl (
    .ins_valid, .ins, .rd_a, .rd_b, .wr_en, .wr_addr, .sel, .ld_en, .ld_addr, .out_en
  );

  fiter_regbank #(.M(M), .NREGS(NREGS)) u_regs (
    .clk, .rst_n, .rd_a, .rd_b, .a_c, .a_s, .b_c, .b_s,
    .wr_en, .wr_addr, .wr_c, .wr_s, .ld_en, .ld_addr, .ld_data,
    .out_en, .out_valid, .dout_c, .dout_s
  );

  fp_add #(.M(M), .P(P)) u_madd (.a_c, .a_s, .b_c, .b_s, .r_c(add_c), .r_s(add_s));
  fp_sub #(.M(M), .P(P)) u_msub (.a_c, .a_s, .b_c, .b_s, .r_c(sub_c), .r_s(sub_s));
  fp_mul #(.M(M), .P(P)) u_mmul (.a_c, .a_s, .b_c, .b_s, .r_c(mul_c), .r_s(mul_s));

  // result multiplexer in front of the register bank
  always_comb begin
    unique case (sel)
      SEL_SUB: begin wr_c = sub_c; wr_s = sub_s; end
      SEL_MUL: begin wr_c = mul_c; wr_s = mul_s; end
      default: begin wr_c = add_c; wr_s = add_s; end
    endcase
  end
endmodule
