// fave: the fully unrolled isogeny-walk accelerator.
//
// Evaluates a walk of 4-isogenies on a point, one 4-isogeny per clock cycle.
// Three parts: the control unit (fave_ctrl) decodes the instruction, the
// register bank (fave_regbank) holds P, the kernel points and the result, and
// the combinational 4-iso-e unit (iso4_eval) maps P to its image. Going further
// (several evaluators in series) would not shorten the walk: the clock period
// would grow by as much as the cycle count shrinks.
//
// Use: FAVE_LDP with P0 on p0_x/p0_z; FAVE_LDW with the first kernel pair on
// w0_in/w1_in; then one FAVE_ISO_LDW per 4-isogeny, with the next pair on the
// kernel ports (the evaluation uses the pair loaded before); FAVE_OUT; phi(P0)
// appears on phi_* with out_valid one cycle later. Inputs are plain M-bit
// Montgomery-domain integers (x*R mod P, R = 2^(M+3)); outputs are carry-save
// pairs of the Montgomery-domain result. Conversions into and out of this form
// are left to the host. The opcode encoding is this design's own.
module fave
  import vdf_pkg::*;
#(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ins_valid,
  input  fave_op_e     ins,
  input  logic [M-1:0] p0_x,
  input  logic [M-1:0] p0_z,
  input  logic [M-1:0] w0_in,
  input  logic [M-1:0] w1_in,
  output logic         out_valid,
  output logic [M-1:0] phi_x_c,
  output logic [M-1:0] phi_x_s,
  output logic [M-1:0] phi_z_c,
  output logic [M-1:0] phi_z_s
);
  fave_cmd_t    cmd;
  logic [M-1:0] p_x_c, p_x_s, p_z_c, p_z_s, w0, w1;
  logic [M-1:0] iso_x_c, iso_x_s, iso_z_c, iso_z_s;

  fave_ctrl u_ctrl (.ins_valid, .ins, .cmd);

  fave_regbank #(.M(M)) u_regs (
    .clk, .rst_n, .cmd, .p0_x, .p0_z, .w0_in, .w1_in,
    .iso_x_c, .iso_x_s, .iso_z_c, .iso_z_s,
    .p_x_c, .p_x_s, .p_z_c, .p_z_s, .w0, .w1,
    .out_valid, .phi_x_c, .phi_x_s, .phi_z_c, .phi_z_s
  );

  iso4_eval #(.M(M), .P(P)) u_iso (
    .x_c(p_x_c), .x_s(p_x_s), .z_c(p_z_c), .z_s(p_z_s), .w0, .w1,
    .xo_c(iso_x_c), .xo_s(iso_x_s), .zo_c(iso_z_c), .zo_s(iso_z_s)
  );
endmodule
