// fiter_regbank: register bank of the FITER cryptoprocessor.
//
// NREGS registers, each a carry-save pair of M-bit shares. Two combinational
// read ports (a, b) feed the arithmetic units. On a rising clock edge:
//   wr_en   r[wr_addr] <- (wr_c, wr_s), the selected unit's result
//   ld_en   r[ld_addr] <- (ld_data, 0), a value from the input port
//   out_en  output register <- r[rd_a], out_valid high for one cycle
// A write and a load may happen in the same cycle to different registers.
// Registers rather than SRAM keep every access within the cycle. Synchronous
// active-low reset clears all registers (this design's choice).
module fiter_regbank
  import vdf_pkg::*;
#(
  parameter int unsigned M     = vdf_pkg::M_DEFAULT,
  parameter int unsigned NREGS = vdf_pkg::FITER_NREGS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fiter_addr_t  rd_a,
  input  fiter_addr_t  rd_b,
  output logic [M-1:0] a_c,
  output logic [M-1:0] a_s,
  output logic [M-1:0] b_c,
  output logic [M-1:0] b_s,
  input  logic         wr_en,
  input  fiter_addr_t  wr_addr,
  input  logic [M-1:0] wr_c,
  input  logic [M-1:0] wr_s,
  input  logic         ld_en,
  input  fiter_addr_t  ld_addr,
  input  logic [M-1:0] ld_data,
  input  logic         out_en,
  output logic         out_valid,
  output logic [M-1:0] dout_c,
  output logic [M-1:0] dout_s
);
  logic [M-1:0] rc [NREGS];
  logic [M-1:0] rs [NREGS];

  assign a_c = rc[rd_a];
  assign a_s = rs[rd_a];
  assign b_c = rc[rd_b];
  assign b_s = rs[rd_b];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NREGS); k++) begin
        rc[k] <= '0;
        rs[k] <= '0;
      end
      out_valid <= 1'b0;
      dout_c    <= '0;
      dout_s    <= '0;
    end else begin
      if (wr_en) begin
        rc[wr_addr] <= wr_c;
        rs[wr_addr] <= wr_s;
      end
      if (ld_en) begin
        rc[ld_addr] <= ld_data;
        rs[ld_addr] <= '0;
      end
      out_valid <= out_en;
      if (out_en) begin
        dout_c <= a_c;
        dout_s <= a_s;
      end
    end
  end

  initial assert (NREGS == (1 << $bits(fiter_addr_t)))
    else $error("fiter_regbank: NREGS must match the address width of vdf_pkg");
endmodule
