// fiter_ctrl: control unit of the FITER cryptoprocessor.
//
// Decodes one instruction (vdf_pkg::fiter_ins_t) per clock cycle into
//   * the two read addresses of the register bank (src_a, src_b),
//   * the result write enable, address and result-multiplexer select
//     (add, subtract or multiply; a square is a multiply with src_a == src_b),
//   * the load enable and address for the input port, which is written in the
//     same cycle as an arithmetic result,
//   * the output enable (FI_OUT copies r[src_a] to the output register).
// Every instruction is one modular operation completed in one cycle. With
// ins_valid low nothing is written. Purely combinational; the instruction
// encoding is this design's own.
module fiter_ctrl
  import vdf_pkg::*;
(
  input  logic        ins_valid,
  input  fiter_ins_t  ins,
  output fiter_addr_t rd_a,
  output fiter_addr_t rd_b,
  output logic        wr_en,
  output fiter_addr_t wr_addr,
  output fiter_sel_e  sel,
  output logic        ld_en,
  output fiter_addr_t ld_addr,
  output logic        out_en
);
  always_comb begin
    rd_a    = ins.src_a;
    rd_b    = ins.src_b;
    wr_addr = ins.dst;
    ld_addr = ins.ld_addr;
    ld_en   = ins_valid && ins.ld_en;
    wr_en   = 1'b0;
    out_en  = 1'b0;
    sel     = SEL_ADD;
    if (ins_valid) begin
      unique case (ins.op)
        FI_ADD:  begin wr_en = 1'b1; sel = SEL_ADD; end
        FI_SUB:  begin wr_en = 1'b1; sel = SEL_SUB; end
        FI_MUL:  begin wr_en = 1'b1; sel = SEL_MUL; end
        FI_OUT:  out_en = 1'b1;
        default: ;
      endcase
    end
  end

  // A load and a result must not target the same register in one cycle.
  always_comb assert (!(wr_en && ld_en && (wr_addr == ld_addr)))
    else $error("fiter_ctrl: load and result write to the same register");
endmodule
