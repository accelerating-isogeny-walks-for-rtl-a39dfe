// isogeny_vdf_top: the two isogeny-walk evaluators side by side.
//
// fave  - fully unrolled: one 4-isogeny evaluation per clock cycle, with the
//         kernel points streamed in each cycle (2*M bits per cycle).
// fiter - serial: one modular operation per clock cycle, 14 cycles per
//         4-isogeny evaluation, about a tenth of the arithmetic.
// Both share the carry-save modular arithmetic units and the field parameters
// M and P, and run on one clock and one synchronous active-low reset. Each has
// its own instruction, data and result ports, prefixed fave_ and fiter_; the
// host that sends instructions and the memory that supplies the precomputed
// kernel points sit outside.
module isogeny_vdf_top
  import vdf_pkg::*;
#(
  parameter int unsigned  M = vdf_pkg::M_DEFAULT,
  parameter logic [M-1:0] P = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  // FAVE
  input  logic         fave_ins_valid,
  input  fave_op_e     fave_ins,
  input  logic [M-1:0] fave_p0_x,
  input  logic [M-1:0] fave_p0_z,
  input  logic [M-1:0] fave_w0,
  input  logic [M-1:0] fave_w1,
  output logic         fave_out_valid,
  output logic [M-1:0] fave_phi_x_c,
  output logic [M-1:0] fave_phi_x_s,
  output logic [M-1:0] fave_phi_z_c,
  output logic [M-1:0] fave_phi_z_s,
  // FITER
  input  logic         fiter_ins_valid,
  input  fiter_ins_t   fiter_ins,
  input  logic [M-1:0] fiter_ld_data,
  output logic         fiter_out_valid,
  output logic [M-1:0] fiter_dout_c,
  output logic [M-1:0] fiter_dout_s
);
  fave #(.M(M), .P(P)) u_fave (
    .clk, .rst_n, .ins_valid(fave_ins_valid), .ins(fave_ins),
    .p0_x(fave_p0_x), .p0_z(fave_p0_z), .w0_in(fave_w0), .w1_in(fave_w1),
    .out_valid(fave_out_valid), .phi_x_c(fave_phi_x_c), .phi_x_s(fave_phi_x_s),
    .phi_z_c(fave_phi_z_c), .phi_z_s(fave_phi_z_s)
  );

  fiter #(.M(M), .P(P)) u_fiter (
    .clk, .rst_n, .ins_valid(fiter_ins_valid), .ins(fiter_ins), .ld_data(fiter_ld_data),
    .out_valid(fiter_out_valid), .dout_c(fiter_dout_c), .dout_s(fiter_dout_s)
  );
endmodule
