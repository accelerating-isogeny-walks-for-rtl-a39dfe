// tb_fiter_ctrl: checks the FITER instruction decoder on random instructions
// against an independent table: read addresses, write enable and address,
// result select, load enable and address, output enable, with the valid strobe
// high and low.
module tb_fiter_ctrl;
  import vdf_pkg::*;
  logic        ins_valid;
  fiter_ins_t  ins;
  fiter_addr_t rd_a, rd_b, wr_addr, ld_addr;
  logic        wr_en, ld_en, out_en;
  fiter_sel_e  sel;
  int checks = 0, failures = 0;

  fiter_ctrl dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fiter_op_e ops[5] = '{FI_NOP, FI_ADD, FI_SUB, FI_MUL, FI_OUT};
    for (int t = 0; t < 400; t++) begin
      bit e_wr, e_out;
      ins_valid   = ($urandom() % 4) != 0;
      ins.op      = ops[$urandom() % 5];
      ins.dst     = fiter_addr_t'($urandom());
      ins.src_a   = fiter_addr_t'($urandom());
      ins.src_b   = fiter_addr_t'($urandom());
      ins.ld_en   = 1'($urandom());
      ins.ld_addr = fiter_addr_t'($urandom());
      if (ins.ld_addr == ins.dst) ins.ld_addr = ins.dst + 1'b1;
      #1;
      e_wr  = ins_valid && (ins.op == FI_ADD || ins.op == FI_SUB || ins.op == FI_MUL);
      e_out = ins_valid && ins.op == FI_OUT;
      checks++;
      if (rd_a != ins.src_a || rd_b != ins.src_b || wr_en != e_wr || out_en != e_out ||
          ld_en != (ins_valid && ins.ld_en) ||
          (ld_en && ld_addr != ins.ld_addr) || (wr_en && wr_addr != ins.dst) ||
          (ins_valid && ins.op == FI_ADD && sel != SEL_ADD) ||
          (ins_valid && ins.op == FI_SUB && sel != SEL_SUB) ||
          (ins_valid && ins.op == FI_MUL && sel != SEL_MUL)) begin
        failures++; $display("fiter_ctrl mismatch t=%0d op=%0d", t, ins.op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
