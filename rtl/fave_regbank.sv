// fave_regbank: register bank of the FAVE accelerator.
//
// Holds the running point P = (X : Z) as carry-save pairs of M-bit shares, the
// two kernel points w0, w1 of the current 4-isogeny (plain M-bit integers) and
// the output register phi(P0). Registers were preferred to SRAM so that every
// access takes no extra cycle. On each rising clock edge, following cmd:
//   ld_p    P   <- (p0_x, p0_z) with zero save shares
//   upd_p   P   <- (iso_x, iso_z), the 4-iso-e result for the current P
//   ld_w    w0, w1 <- w0_in, w1_in
//   out_en  phi <- P, out_valid goes high for one cycle
// P, w0, w1 are read combinationally by the 4-iso-e unit. Synchronous
// active-low reset clears every register (this design's choice).
module fave_regbank
  import vdf_pkg::*;
#(
  parameter int unsigned M = vdf_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fave_cmd_t    cmd,
  input  logic [M-1:0] p0_x,
  input  logic [M-1:0] p0_z,
  input  logic [M-1:0] w0_in,
  input  logic [M-1:0] w1_in,
  input  logic [M-1:0] iso_x_c,
  input  logic [M-1:0] iso_x_s,
  input  logic [M-1:0] iso_z_c,
  input  logic [M-1:0] iso_z_s,
  output logic [M-1:0] p_x_c,
  output logic [M-1:0] p_x_s,
  output logic [M-1:0] p_z_c,
  output logic [M-1:0] p_z_s,
  output logic [M-1:0] w0,
  output logic [M-1:0] w1,
  output logic         out_valid,
  output logic [M-1:0] phi_x_c,
  output logic [M-1:0] phi_x_s,
  output logic [M-1:0] phi_z_c,
  output logic [M-1:0] phi_z_s
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_x_c <= '0; p_x_s <= '0; p_z_c <= '0; p_z_s <= '0;
      w0    <= '0; w1    <= '0;
      phi_x_c <= '0; phi_x_s <= '0; phi_z_c <= '0; phi_z_s <= '0;
      out_valid <= 1'b0;
    end else begin
      if (cmd.ld_p) begin
        p_x_c <= p0_x; p_x_s <= '0;
        p_z_c <= p0_z; p_z_s <= '0;
      end else if (cmd.upd_p) begin
        p_x_c <= iso_x_c; p_x_s <= iso_x_s;
        p_z_c <= iso_z_c; p_z_s <= iso_z_s;
      end
      if (cmd.ld_w) begin
        w0 <= w0_in;
        w1 <= w1_in;
      end
      out_valid <= cmd.out_en;
      if (cmd.out_en) begin
        phi_x_c <= p_x_c; phi_x_s <= p_x_s;
        phi_z_c <= p_z_c; phi_z_s <= p_z_s;
      end
    end
  end
endmodule
