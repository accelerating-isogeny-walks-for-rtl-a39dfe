// vdf_pkg: constants and instruction types shared by the isogeny-walk
// accelerators.
//
// Field elements are m-bit integers modulo a prime p. Every datapath keeps them
// in carry-save (CS) form, as a pair of m-bit shares (c, s) whose sum is the
// value, and in the Montgomery domain with R = 2^(m+3). The default size m = 1506
// is the prime size of the isogeny VDF being attacked. The prime itself is this
// design's choice: the largest prime below 2^1506 that is 7 mod 8,
// p = 2^1506 - 257.
//
// Two instruction sets are defined here:
//   * FAVE (fully unrolled, one 4-isogeny evaluation per cycle): a 3-bit opcode
//     that uploads the point, uploads kernel points, evaluates, downloads.
//   * FITER (one modular operation per cycle): a word holding the operation,
//     destination and two source registers, plus an independent load of the
//     input port into a register in the same cycle.
// The encodings are this design's own.
package vdf_pkg;

  localparam int unsigned M_DEFAULT = 1506;  // bit length of p
  localparam int unsigned P_OFFSET  = 257;   // p = 2^M_DEFAULT - P_OFFSET

  // ---------------- FAVE ----------------
  typedef enum logic [2:0] {
    FAVE_NOP     = 3'd0,  // do nothing
    FAVE_LDP     = 3'd1,  // P <- P0 input port
    FAVE_LDW     = 3'd2,  // (w0, w1) <- kernel-point input ports
    FAVE_ISO     = 3'd3,  // P <- phi4(P) with the stored kernel points
    FAVE_ISO_LDW = 3'd4,  // FAVE_ISO and FAVE_LDW in the same cycle (streaming)
    FAVE_OUT     = 3'd5   // phi(P0) output register <- P
  } fave_op_e;

  typedef struct packed {
    logic ld_p;    // load P from the P0 port
    logic ld_w;    // load the kernel-point registers
    logic upd_p;   // replace P by the 4-iso-e result
    logic out_en;  // copy P to the output register
  } fave_cmd_t;

  // ---------------- FITER ----------------
  localparam int unsigned FITER_NREGS = 16;
  localparam int unsigned FITER_AW    = $clog2(FITER_NREGS);
  typedef logic [FITER_AW-1:0] fiter_addr_t;

  typedef enum logic [2:0] {
    FI_NOP = 3'd0,  // no arithmetic (a load may still happen)
    FI_ADD = 3'd1,  // r[dst] <- r[src_a] + r[src_b] mod p
    FI_SUB = 3'd2,  // r[dst] <- r[src_a] - r[src_b] mod p
    FI_MUL = 3'd3,  // r[dst] <- r[src_a] * r[src_b] * R^-1 mod p (square if src_a == src_b)
    FI_OUT = 3'd4   // output register <- r[src_a]
  } fiter_op_e;

  typedef struct packed {
    fiter_op_e   op;
    fiter_addr_t dst;
    fiter_addr_t src_a;
    fiter_addr_t src_b;
    logic        ld_en;    // also write the input port into r[ld_addr]
    fiter_addr_t ld_addr;
  } fiter_ins_t;

  // Result multiplexer select in front of the register bank.
  typedef enum logic [1:0] {
    SEL_ADD = 2'd0,
    SEL_SUB = 2'd1,
    SEL_MUL = 2'd2
  } fiter_sel_e;

endpackage
