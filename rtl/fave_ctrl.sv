// fave_ctrl: control unit of the FAVE accelerator.
//
// Decodes one FAVE instruction per clock cycle into the register-bank command
// (vdf_pkg::fave_cmd_t): load the point P0, load the kernel points, replace P
// by its 4-isogeny image, copy P to the output register. FAVE_ISO_LDW both
// evaluates with the current kernel points and loads the next pair, so a walk
// streams at one 4-isogeny per cycle. With ins_valid low every command bit is
// low. Purely combinational; the opcodes are this design's own encoding.
module fave_ctrl
  import vdf_pkg::*;
(
  input  logic      ins_valid,
  input  fave_op_e  ins,
  output fave_cmd_t cmd
);
  always_comb begin
    cmd = '0;
    if (ins_valid) begin
      unique case (ins)
        FAVE_NOP:     ;
        FAVE_LDP:     cmd.ld_p   = 1'b1;
        FAVE_LDW:     cmd.ld_w   = 1'b1;
        FAVE_ISO:     cmd.upd_p  = 1'b1;
        FAVE_ISO_LDW: begin cmd.upd_p = 1'b1; cmd.ld_w = 1'b1; end
        FAVE_OUT:     cmd.out_en = 1'b1;
        default:      ;
      endcase
    end
  end

  // At most one writer of P per cycle.
  always_comb assert (!(cmd.ld_p && cmd.upd_p)) else $error("fave_ctrl: two writers of P");
endmodule
