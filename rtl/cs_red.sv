// cs_red: the LUT-based reduction of a carry-save number (the RED unit for
// additions and subtractions, and the last step after Montgomery reduction).
//
// Input a = a_c + a_s with (M+I)-bit shares; output r = r_c + r_s with M-bit
// shares and r = a (mod P). Steps:
//   1. the top I+1 bits of both shares, a_x[M+I-1:M-1], are added by a small
//      ripple adder into M_idx;
//   2. a lookup table gives S = M_idx * 2^(M-1) mod P;
//   3. one carry-save adder array adds the two low parts a_x[M-2:0] and S.
// Because both low parts have M-1 bits and S has M bits, bit M-1 of the CSA sees
// only S's bit: its carry out is zero and both outputs fit in M bits.
// The output shares are each below 2^M, so r may exceed P (up to 2^(M+1)-2); it
// is a valid input for every unit of the datapath.
//
// WRAP = 1 drops the carry out of step 1, i.e. the shares are taken as a value
// modulo 2^(M+I). This is right whenever the true value is known to be below
// 2^(M+I) (after an addition, or a subtraction offset by a multiple of P) and
// keeps the table at 2^(I+1) entries. Precisely, the result is right when the
// represented value T satisfies 2^(M-1) <= T < 2^(M+I), or when the shares are
// exact (not wrapped) and T < 2^(M+I). WRAP = 0 keeps the full sum, with
// 2^(I+2)-1 entries. The table is computed at elaboration from P.
// Combinational; critical path: the (I+1)-bit adder, a table lookup, one FA.
module cs_red #(
  parameter int unsigned   M    = vdf_pkg::M_DEFAULT,
  parameter int unsigned   I    = 1,
  parameter logic [M-1:0]  P    = {M{1'b1}} - M'(vdf_pkg::P_OFFSET - 1),
  parameter bit            WRAP = 1'b0
) (
  input  logic [M+I-1:0] a_c,
  input  logic [M+I-1:0] a_s,
  output logic [M-1:0]   r_c,
  output logic [M-1:0]   r_s
);
  localparam int unsigned IW   = WRAP ? I + 1 : I + 2;  // table index width
  localparam int unsigned NLUT = WRAP ? (1 << (I + 1)) : (1 << (I + 2)) - 1;
  localparam int unsigned TW   = M + I + 3;             // width for the table arithmetic

  // idx * 2^(M-1) mod P
  function automatic logic [M-1:0] lut_entry(input int unsigned idx);
    logic [TW-1:0] v;
    v = TW'(idx) << (M - 1);
    v = v % TW'(P);
    return v[M-1:0];
  endfunction

  logic [M-1:0] lut [NLUT];
  for (genvar k = 0; k < NLUT; k++) begin : g_lut
    localparam logic [M-1:0] ENTRY = lut_entry(k);
    assign lut[k] = ENTRY;
  end

  logic [I+1:0]  msum;
  logic [IW-1:0] idx;
  logic [M-1:0]  sval;

  always_comb begin
    msum = (I+2)'(a_c[M+I-1:M-1]) + (I+2)'(a_s[M+I-1:M-1]);
    idx  = msum[IW-1:0];
    sval = lut[idx];
  end

  logic [M-1:0] s_out;
  logic [M:0]   c_out;
  csa #(.W(M)) u_csa (
    .x({1'b0, a_c[M-2:0]}), .y({1'b0, a_s[M-2:0]}), .z(sval),
    .s(s_out), .c(c_out)
  );

  assign r_s = s_out;
  assign r_c = c_out[M-1:0];  // c_out[M] is always 0: bit M-1 has one nonzero input

  logic unused;
  assign unused = c_out[M] ^ (WRAP ? msum[I+1] : 1'b0);

  // idx never exceeds the table when WRAP = 0 (max is 2*(2^(I+1)-1))
  always_comb assert (int'(idx) < NLUT) else $error("cs_red: table index out of range");
endmodule
