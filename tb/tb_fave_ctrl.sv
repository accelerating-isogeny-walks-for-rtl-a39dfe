// tb_fave_ctrl: checks the FAVE instruction decoder for every opcode with the
// valid strobe high and low against a table of expected commands.
module tb_fave_ctrl;
  import vdf_pkg::*;
  logic      ins_valid;
  fave_op_e  ins;
  fave_cmd_t cmd;
  int checks = 0, failures = 0;

  fave_ctrl dut (.*);

  function automatic fave_cmd_t expected(input fave_op_e op, input logic v);
    fave_cmd_t e = '0;
    if (v) begin
      e.ld_p   = (op == FAVE_LDP);
      e.ld_w   = (op == FAVE_LDW) || (op == FAVE_ISO_LDW);
      e.upd_p  = (op == FAVE_ISO) || (op == FAVE_ISO_LDW);
      e.out_en = (op == FAVE_OUT);
    end
    return e;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fave_op_e ops[6] = '{FAVE_NOP, FAVE_LDP, FAVE_LDW, FAVE_ISO, FAVE_ISO_LDW, FAVE_OUT};
    for (int v = 0; v < 2; v++)
      foreach (ops[k]) begin
        ins_valid = v[0];
        ins = ops[k];
        #1;
        checks++;
        if (cmd != expected(ops[k], v[0])) begin
          failures++; $display("fave_ctrl op=%0d valid=%0d cmd=%b", ops[k], v, cmd);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
